// tb_wallace_encoder_pipe: test of the pipelined Wallace tree encoder.
// Three instances run side by side on independent random input streams:
//   dut_a  N = 4, register rows after every level (default, latency 2)
//   dut_b  N = 4, a single row in front of the last level (latency 1)
//   dut_c  N = 5, rows after every level (latency 3)
// A new word is applied every cycle (one sample per clock). At each falling
// edge the output must equal the population count of the word applied
// LATENCY cycles earlier; this checks both the count and the exact number
// of clock edges through the pipeline. The stream mixes clean thermometer
// codes, codes with bubbles and random words. After reset the registers must
// be clear: with an all-zero input every output reads 0.
module tb_wallace_encoder_pipe;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int CYCLES = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [14:0] th_a, th_b;
  logic [30:0] th_c;
  logic [3:0]  bin_a, bin_b;
  logic [4:0]  bin_c;
  int checks = 0, failures = 0;

  wallace_encoder_pipe dut_a (.clk(clk), .rst_n(rst_n), .thermo(th_a), .bin(bin_a));
  wallace_encoder_pipe #(.N(4), .PIPE_MASK(2'b10)) dut_b (
    .clk(clk), .rst_n(rst_n), .thermo(th_b), .bin(bin_b));
  wallace_encoder_pipe #(.N(5)) dut_c (.clk(clk), .rst_n(rst_n), .thermo(th_c), .bin(bin_c));

  always #2500 clk = ~clk;

  initial begin
    #(64'd5000 * (64'(CYCLES) + 64'd100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [30:0] stim(int w);
    logic [30:0] v;
    int k;
    k = int'($urandom_range(0, w));
    case ($urandom_range(0, 2))
      0: v = 31'((64'd1 << k) - 1);                          // clean code
      1: begin                                              // bubble
        v = 31'((64'd1 << k) - 1);
        v[$urandom_range(0, w - 1)] ^= 1'b1;
      end
      default: v = 31'({$urandom, $urandom});
    endcase
    if (w < 31) v &= 31'((64'd1 << w) - 1);
    return v;
  endfunction

  int hist_a [$], hist_b [$], hist_c [$];

  task automatic check(string tag, int got, int exp, int cyc);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s cycle %0d got %0d expected %0d", tag, cyc, got, exp);
    end
  endtask

  initial begin
    th_a = '0; th_b = '0; th_c = '0;
    repeat (3) @(negedge clk);
    // reset state: registers clear, all-zero input
    check("reset a", int'(bin_a), 0, -1);
    check("reset b", int'(bin_b), 0, -1);
    check("reset c", int'(bin_c), 0, -1);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      if (hist_a.size() > 1) check("a", int'(bin_a), hist_a[hist_a.size() - 2], cyc);
      if (hist_b.size() > 0) check("b", int'(bin_b), hist_b[hist_b.size() - 1], cyc);
      if (hist_c.size() > 2) check("c", int'(bin_c), hist_c[hist_c.size() - 3], cyc);
      th_a = 15'(stim(15));
      th_b = 15'(stim(15));
      th_c = stim(31);
      hist_a.push_back($countones(th_a));
      hist_b.push_back($countones(th_b));
      hist_c.push_back($countones(th_c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

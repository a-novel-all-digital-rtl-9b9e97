// tb_wallace_encoder: test of the combinational Wallace tree encoder.
//  1. The sixteen clean thermometer codes of the 4-bit truth table
//     (0, 1, 11, ..., fifteen ones) must give the codes 0 .. 15.
//  2. Thermometer codes with first-, second- and third-order bubbles (one,
//     two or three zeros inside the run of ones, or stray ones above it)
//     must give the number of ones, i.e. the bubble moves the code only by
//     the number of misplaced bits.
//  3. All 2^15 input words: bin must equal the population count.
//  4. A 5-bit instance (31 inputs) on random words.
// Reference values are computed with $countones and shifts in the testbench.
module tb_wallace_encoder;
  timeunit 1ps;
  timeprecision 1ps;

  logic [14:0] th4;
  logic [3:0]  bin4;
  logic [30:0] th5;
  logic [4:0]  bin5;
  int checks = 0, failures = 0;
  int bubbles = 0;

  wallace_encoder dut4 (.thermo(th4), .bin(bin4));
  wallace_encoder #(.N(5)) dut5 (.thermo(th5), .bin(bin5));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check4(string tag, int exp);
    #10;
    checks++;
    if (int'(bin4) != exp) begin
      failures++;
      $display("FAIL %s thermo=%b got %0d expected %0d", tag, th4, bin4, exp);
    end
  endtask

  initial begin
    th5 = '0;
    // 1. clean thermometer codes
    for (int k = 0; k <= 15; k++) begin
      th4 = 15'((32'd1 << k) - 1);
      check4("clean", k);
    end
    // 2. bubbles of order 1..3 inside a run of ones, and stray ones above it
    for (int top = 4; top <= 15; top++) begin
      for (int ord = 1; ord <= 3; ord++) begin
        for (int pos = 0; pos + ord < top; pos++) begin
          th4 = 15'((32'd1 << top) - 1);
          for (int b = 0; b < ord; b++) th4[pos + b] = 1'b0;
          bubbles++;
          check4("bubble", top - ord);
        end
      end
    end
    for (int top = 0; top <= 12; top++) begin
      th4 = 15'((32'd1 << top) - 1);
      th4[top + 2] = 1'b1;           // a stray one two places above the run
      bubbles++;
      check4("sparkle", top + 1);
    end
    // 3. exhaustive
    for (int v = 0; v < (1 << 15); v++) begin
      th4 = 15'(v);
      check4("all", $countones(15'(v)));
    end
    // 4. five-bit instance
    for (int i = 0; i < 2000; i++) begin
      th5 = 31'($urandom);
      if (i < 32) th5 = 31'((64'd1 << i) - 1);
      #10;
      checks++;
      if (int'(bin5) != $countones(th5)) begin
        failures++;
        $display("FAIL N=5 thermo=%b got %0d", th5, bin5);
      end
    end
    $display("bubble patterns tested: %0d", bubbles);
    if (bubbles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

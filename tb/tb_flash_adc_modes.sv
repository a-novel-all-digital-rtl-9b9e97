// tb_flash_adc_modes: the flash ADC with its two alternative encoder
// configurations, run side by side on the same input.
//   dut_comb  PIPELINED = 0: combinational Wallace encoder, y follows the
//             comparators without a clock; checked 4.85 ns after each input
//             change.
//   dut_one   PIPE_MASK = 2'b10: a single register row in front of the last
//             adder level, so y shows a sample's code from the rising edge
//             that sampled it onwards.
// Both are driven with a 1 mV-step ramp from 0.65 V to 1.55 V and must give
// the ideal code (number of thresholds vrefl + (vrefh - vrefl)(2k+1)/30 below
// the input) for every sample; every code 0..15 must appear.
module tb_flash_adc_modes;
  import flash_adc_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic   clk = 1'b0, rst_n = 1'b0;
  uvolt_t vin, vrefh, vrefl;
  logic [3:0]  y_comb, y_one;
  logic [14:0] th_comb, th_one;   // observed only through y
  int checks = 0, failures = 0;
  int seen_comb [16], seen_one [16];

  flash_adc #(.PIPELINED(1'b0)) dut_comb (
    .clk(clk), .rst_n(rst_n), .vin(vin), .vrefh(vrefh), .vrefl(vrefl),
    .y(y_comb), .thermo(th_comb));
  flash_adc #(.PIPE_MASK(2'b10)) dut_one (
    .clk(clk), .rst_n(rst_n), .vin(vin), .vrefh(vrefh), .vrefl(vrefl),
    .y(y_one), .thermo(th_one));

  always #2500 clk = ~clk;

  initial begin
    #(64'd100_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real thr [15];

  function automatic int ideal(real v);
    int c = 0;
    for (int k = 0; k < 15; k++) if (v > thr[k]) c++;
    return c;
  endfunction

  task automatic check(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t got %0d expected %0d", tag, $time, got, exp);
    end
  endtask

  initial begin
    real v;
    vrefh = VREFH_UV;
    vrefl = VREFL_UV;
    vin   = 32'sd650_000;
    for (int k = 0; k < 15; k++)
      thr[k] = real'(VREFL_UV) + (real'(VREFH_UV) - real'(VREFL_UV)) * real'(2 * k + 1) / 30.0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // Each input is held for two clock periods: applied 100 ps after edge
    // P, checked on the combinational variant 50 ps before edge P+1 and on
    // the one-row variant half a period after edge P+1, which sampled it.
    for (int mv = 650; mv <= 1550; mv++) begin
      @(posedge clk);
      #100;
      vin = uvolt_t'(mv * 1000);
      v = real'(vin);
      #4750;
      check("combinational", int'(y_comb), ideal(v));
      seen_comb[y_comb]++;
      #2650;
      check("one-row", int'(y_one), ideal(v));
      seen_one[y_one]++;
    end
    for (int c = 0; c < 16; c++) begin
      checks++;
      if (seen_comb[c] == 0 || seen_one[c] == 0) begin
        failures++;
        $display("FAIL code %0d missing", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

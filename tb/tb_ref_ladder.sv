// tb_ref_ladder: test of the reference ladder model.
// For several (vrefh, vrefl) pairs, including the converter's 1.5 V / 0.7 V,
// every tap is compared with vrefl + (vrefh - vrefl)(2k + 1)/30, computed in
// real arithmetic in the testbench (R/2 end resistors and 14 equal inner
// resistors), within 1 uV. Also checked: taps rise monotonically and
// neighbouring taps are one step apart.
module tb_ref_ladder;
  import flash_adc_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  uvolt_t vrefh, vrefl;
  uvolt_t [14:0] vref;
  int checks = 0, failures = 0;

  ref_ladder dut (.vrefh(vrefh), .vrefl(vrefl), .vref(vref));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(uvolt_t h, uvolt_t l);
    real exp, step;
    vrefh = h;
    vrefl = l;
    #10;
    step = (real'(h) - real'(l)) / 15.0;
    for (int k = 0; k < 15; k++) begin
      exp = real'(l) + (real'(h) - real'(l)) * real'(2 * k + 1) / 30.0;
      checks++;
      if (real'(vref[k]) > exp + 1.0 || real'(vref[k]) < exp - 1.0) begin
        failures++;
        $display("FAIL h=%0d l=%0d tap %0d = %0d expected %f", h, l, k, vref[k], exp);
      end
      if (k > 0) begin
        checks++;
        if (real'(vref[k] - vref[k-1]) > step + 2.0 || real'(vref[k] - vref[k-1]) < step - 2.0) begin
          failures++;
          $display("FAIL h=%0d l=%0d step at tap %0d = %0d", h, l, k, vref[k] - vref[k-1]);
        end
      end
    end
  endtask

  initial begin
    run(VREFH_UV, VREFL_UV);
    $display("taps at 1.5 V / 0.7 V: bottom %0d uV, top %0d uV, step %0d uV",
             vref[0], vref[14], vref[1] - vref[0]);
    run(32'sd1_800_000, 32'sd0);
    run(32'sd1_500_000, 32'sd500_000);
    run(32'sd1_000_003, 32'sd999_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_flash_adc_sweep: dynamic performance of the flash ADC against input
// frequency, at a 100 MHz and at a 200 MHz conversion clock.
//
// For each clock and each input frequency (up to just below the Nyquist
// frequency) a 0.4 V-amplitude sine around 1.1 V is converted for 256
// samples. Each input value is applied 100 ps after a rising edge and held
// for one period; y shows its code two edges after the sampling edge. Every
// code is checked against the ideal code computed in the testbench, and the
// signal-to-noise-and-distortion ratio of vrefl + code * LSB against the
// known input is reported with the effective number of bits. Inputs within
// 5 uV of a threshold are not code-checked (a comparator with equal inputs
// keeps its previous decision). The SNDR must
// be at least 20 dB at every point (an ideal 4-bit converter with this
// ladder gives about 25 dB).
module tb_flash_adc_sweep;
  import flash_adc_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int LAT = 2;
  localparam int NS  = 256;

  logic   clk = 1'b0, rst_n = 1'b0;
  uvolt_t vin, vrefh, vrefl;
  logic [3:0]  y;
  logic [14:0] thermo;     // observed only through y
  int checks = 0, failures = 0;
  int unsigned half_ps = CLK_PERIOD_PS / 2;

  flash_adc dut (.clk(clk), .rst_n(rst_n), .vin(vin), .vrefh(vrefh),
                 .vrefl(vrefl), .y(y), .thermo(thermo));

  always #(half_ps) clk = ~clk;

  initial begin
    #(64'd500_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real thr [15];
  real lsb;

  function automatic int ideal(real v);
    int c = 0;
    for (int k = 0; k < 15; k++) if (v > thr[k]) c++;
    return c;
  endfunction

  // An input within 5 uV of a threshold is not checked: at equality the
  // comparator cannot resolve and keeps its previous decision.
  function automatic bit near_thr(real v);
    for (int k = 0; k < 15; k++) if (v > thr[k] - 5.0 && v < thr[k] + 5.0) return 1'b1;
    return 1'b0;
  endfunction

  task automatic run(real f_hz, int unsigned period_ps);
    real q [$];
    real t, e2, sndr, vs;
    int n;
    half_ps = period_ps / 2;
    e2 = 0.0; n = 0;
    for (int i = 0; i < NS + LAT + 1; i++) begin
      @(posedge clk);
      #100;
      if (i < NS) begin
        t = real'(i) * real'(period_ps) * 1.0e-12;
        vin = uvolt_t'($rtoi(1_100_000.0 + 400_000.0 * $sin(2.0 * 3.14159265358979 * f_hz * t)));
      end
      q.push_back(real'(vin));
      @(negedge clk);
      if (q.size() > LAT && n < NS) begin
        vs = q[q.size() - LAT - 1];
        if (!near_thr(vs)) checks++;
        if (!near_thr(vs) && int'(y) != ideal(vs)) begin
          failures++;
          if (failures < 20) $display("FAIL f=%0.2f MHz vin=%0.0f y=%0d expected %0d", f_hz / 1.0e6, vs, y, ideal(vs));
        end
        e2 += (vs - (real'(vrefl) + real'(y) * lsb)) ** 2;
        n++;
      end
    end
    sndr = 20.0 * $log10((400_000.0 / $sqrt(2.0)) / $sqrt(e2 / real'(n)));
    $display("clock %0d MHz, input %6.2f MHz: SNDR %0.2f dB, ENOB %0.2f bits",
             1_000_000 / period_ps, f_hz / 1.0e6, sndr, (sndr - 1.76) / 6.02);
    checks++;
    if (sndr < 20.0) begin
      failures++;
      $display("FAIL SNDR too low");
    end
  endtask

  initial begin
    static real f100 [8] = '{1.66e6, 3.3e6, 5.0e6, 6.6e6, 10.0e6, 12.8e6, 24.8e6, 49.3e6};
    static real f200 [6] = '{1.66e6, 10.0e6, 24.8e6, 33.2e6, 50.0e6, 97.3e6};
    vrefh = VREFH_UV;
    vrefl = VREFL_UV;
    vin   = 32'sd1_100_000;
    lsb   = (real'(VREFH_UV) - real'(VREFL_UV)) / 15.0;
    for (int k = 0; k < 15; k++)
      thr[k] = real'(VREFL_UV) + (real'(VREFH_UV) - real'(VREFL_UV)) * real'(2 * k + 1) / 30.0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    foreach (f100[i]) run(f100[i], 10000);
    foreach (f200[i]) run(f200[i], 5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

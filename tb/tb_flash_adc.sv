// tb_flash_adc: end-to-end test of the 4-bit flash ADC at its default
// parameters (pipelined Wallace encoder, two register rows, 15 comparators,
// 1.5 V / 0.7 V references).
//
// The input is changed 100 ps after a rising clock edge and held for one
// period; the next rising edge samples it and y must show its code two edges
// later. Every sample's code is compared with the ideal code computed in the
// testbench: the number of thresholds vrefl + (vrefh - vrefl)(2k + 1)/30,
// k = 0..14, that the input exceeds.
//
// Workloads, one after the other:
//  1. slow ramp 0.65 V -> 1.55 V in 1 mV steps at 200 MS/s; from the code
//     transitions the testbench derives each code's width and reports the
//     differential and integral non-linearity (must stay within 0.25 LSB and
//     0.6 LSB);
//  2. 10 MHz sine, 0.4 V amplitude around 1.1 V, at 200 MS/s;
//  3. 1.66 MHz sine at 100 MS/s (10 ns clock);
//  4. 33.2 MHz sine at 200 MS/s.
// For each sine the signal-to-noise-and-distortion ratio of the output,
// reconstructed as vrefl + code * LSB, is computed against the known input
// and reported with the effective number of bits.
//
// Mechanisms counted (each must occur): comparator feedback raising Vf,
// comparator feedback lowering Vf, every output code 0..15, a sample
// that changes the code by more than one step (fast input), the reset state.
module tb_flash_adc;
  import flash_adc_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int LAT = 2;          // encoder register rows
  localparam int NC  = 15;

  logic   clk = 1'b0, rst_n = 1'b0;
  uvolt_t vin, vrefh, vrefl;
  logic [3:0]  y;
  logic [14:0] thermo;

  int checks = 0, failures = 0;
  int unsigned half_ps = CLK_PERIOD_PS / 2;

  flash_adc dut (.clk(clk), .rst_n(rst_n), .vin(vin), .vrefh(vrefh),
                 .vrefl(vrefl), .y(y), .thermo(thermo));

  always #(half_ps) clk = ~clk;

  // ---- mechanism counters ----
  int n_raise = 0, n_lower = 0, n_jump = 0;
  int code_seen [16];
  for (genvar k = 0; k < NC; k++) begin : g_mon
    always @(posedge dut.g_cmp[k].u_cmp.u_logic.fb_up) n_raise++;
    always @(posedge dut.g_cmp[k].u_cmp.u_logic.fb_dn) n_lower++;
  end

  initial begin
    #(64'd200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference ----
  real thr [NC];
  real lsb;

  function automatic int ideal(real v);
    int c = 0;
    for (int k = 0; k < NC; k++) if (v > thr[k]) c++;
    return c;
  endfunction

  function automatic bit near_thr(real v);
    for (int k = 0; k < NC; k++) if (v > thr[k] - 5.0 && v < thr[k] + 5.0) return 1'b1;
    return 1'b0;
  endfunction

  // ---- sample stream with pipelined checking ----
  real q_v [$];
  int  last_code = 0;
  real err2_sum, sig_sum;
  int  n_err;
  real first_at [16];
  bit  track_ramp = 1'b0;

  task automatic sample(real v);
    int exp_c;
    @(posedge clk);
    #100;
    vin = uvolt_t'($rtoi(v));
    q_v.push_back(real'(vin));
    @(negedge clk);
    if (q_v.size() > LAT) begin
      real vs;
      vs = q_v[q_v.size() - LAT - 1];
      exp_c = ideal(vs);
      if (!near_thr(vs)) begin
        checks++;
        if (int'(y) != exp_c) begin
          failures++;
          if (failures < 20) $display("FAIL t=%0t vin=%0.0f uV y=%0d expected %0d", $time, vs, y, exp_c);
        end
      end
      code_seen[y]++;
      if (int'(y) - last_code > 1 || last_code - int'(y) > 1) n_jump++;
      last_code = int'(y);
      if (track_ramp && first_at[y] < 0.0) first_at[y] = vs;
      err2_sum += (vs - (real'(vrefl) + real'(y) * lsb)) ** 2;
      n_err++;
    end
  endtask

  task automatic flush();
    repeat (LAT + 1) sample(q_v[q_v.size() - 1]);
    q_v.delete();
  endtask

  task automatic run_sine(string name, real f_hz, int n, int unsigned period_ps);
    real amp, off, t, sndr, rms_e;
    half_ps = period_ps / 2;
    amp = 400_000.0;
    off = 1_100_000.0;
    err2_sum = 0.0; n_err = 0;
    for (int i = 0; i < n + LAT + 1; i++) begin
      t = real'(i) * real'(period_ps) * 1.0e-12;
      sample(off + amp * $sin(2.0 * 3.14159265358979 * f_hz * t));
    end
    rms_e = $sqrt(err2_sum / real'(n_err));
    sndr  = 20.0 * $log10((amp / $sqrt(2.0)) / rms_e);
    $display("%s: %0d samples, SNDR %0.2f dB, ENOB %0.2f bits", name, n, sndr, (sndr - 1.76) / 6.02);
    checks++;
    if (sndr < 20.0) begin
      failures++;
      $display("FAIL %s: SNDR too low", name);
    end
    flush();
    half_ps = CLK_PERIOD_PS / 2;
  endtask

  initial begin
    real dnl, inl, max_dnl, max_inl;
    vrefh = VREFH_UV;
    vrefl = VREFL_UV;
    vin   = 32'sd700_000;
    lsb   = (real'(VREFH_UV) - real'(VREFL_UV)) / 15.0;
    for (int k = 0; k < NC; k++)
      thr[k] = real'(VREFL_UV) + (real'(VREFH_UV) - real'(VREFL_UV)) * real'(2 * k + 1) / 30.0;
    foreach (first_at[c]) first_at[c] = -1.0;

    repeat (4) @(negedge clk);
    checks++;
    if (y != 4'd0) begin
      failures++;
      $display("FAIL reset: y=%0d", y);
    end
    rst_n = 1'b1;

    // 1. ramp
    track_ramp = 1'b1;
    for (int mv = 650; mv <= 1550; mv++) sample(real'(mv) * 1000.0);
    track_ramp = 1'b0;
    flush();
    max_dnl = 0.0; max_inl = 0.0;
    for (int c = 1; c <= 15; c++) begin
      if (first_at[c] < 0.0) continue;
      inl = (first_at[c] - thr[c-1]) / lsb;
      if (inl < 0) inl = -inl;
      if (inl > max_inl) max_inl = inl;
      if (c < 15 && first_at[c+1] >= 0.0) begin
        dnl = (first_at[c+1] - first_at[c]) / lsb - 1.0;
        if (dnl < 0) dnl = -dnl;
        if (dnl > max_dnl) max_dnl = dnl;
      end
    end
    $display("ramp: LSB %0.1f uV, max |DNL| %0.3f LSB, max |INL| %0.3f LSB (1 mV ramp steps)",
             lsb, max_dnl, max_inl);
    checks++;
    if (max_dnl > 0.25 || max_inl > 0.6) begin
      failures++;
      $display("FAIL linearity");
    end

    // 2.-4. sines
    run_sine("10 MHz sine at 200 MS/s", 10.0e6, 40, 5000);
    run_sine("1.66 MHz sine at 100 MS/s", 1.66e6, 121, 10000);
    run_sine("33.2 MHz sine at 200 MS/s", 33.2e6, 200, 5000);

    $display("mechanisms: feedback raise %0d, feedback lower %0d, multi-step code jumps %0d",
             n_raise, n_lower, n_jump);
    for (int c = 0; c < 16; c++) begin
      checks++;
      if (code_seen[c] == 0) begin
        failures++;
        $display("FAIL code %0d never produced", c);
      end
    end
    checks++;
    if (n_raise == 0 || n_lower == 0 || n_jump == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

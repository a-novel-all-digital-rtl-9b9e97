// flash_adc: the complete 4-bit flash analog-to-digital converter.
//
// vin is compared in parallel against 2^N - 1 thresholds taken from a
// resistor ladder between vrefh and vrefl. Comparator k (k = 1 .. 2^N-1)
// sees vin on its positive input and ladder tap k-1 on its negative input,
// so its output is 1 when vin lies above that tap: the comparator outputs
// form a thermometer code, ones from the bottom up to the input level. The
// Wallace tree encoder counts the ones, and the count is the output code y.
//
// Blocks: ref_ladder (behavioural), 2^N - 1 diff_comparator instances
// (behavioural front end around the synthesizable cmp_logic), and either the
// pipelined encoder wallace_encoder_pipe (PIPELINED = 1, the default and the
// converter's configuration) or the combinational wallace_encoder.
//
// Timing: the comparators run continuously; vin must have settled, through
// the comparator delay (about 3 ns, plus any feedback slewing), before the
// rising clk edge that samples it. With the default pipelined encoder, y
// shows the code of the sample taken at edge e from edge e + 2 onwards
// (one extra edge per PIPE_MASK bit). With PIPELINED = 0 y follows the
// thermometer code combinationally. Conversion rate: one sample per clk,
// 200 MS/s at the nominal 5 ns period. rst_n is asynchronous, active low,
// and clears the encoder registers and the comparator output latches.
//
// thermo is brought out for observation. Voltages are integers in
// microvolts (flash_adc_pkg::uvolt_t). Each comparator's output stage holds
// its last decision in a latch (see cmp_logic); the 15 latch bits reported
// for this module are those, and are intended.
module flash_adc
  import flash_adc_pkg::*;
#(
  parameter int unsigned  N         = ADC_BITS,
  parameter bit           PIPELINED = 1'b1,
  parameter logic [N-3:0] PIPE_MASK = '1,
  parameter int unsigned  T_PD_PS   = 2960
) (
  input  logic              clk,
  input  logic              rst_n,
  input  uvolt_t            vin,
  input  uvolt_t            vrefh,
  input  uvolt_t            vrefl,
  output logic [N-1:0]      y,
  output logic [(1<<N)-2:0] thermo
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NC = (1 << N) - 1;

  uvolt_t [NC-1:0] vref;

  ref_ladder #(.N_TAP(NC)) u_ladder (
    .vrefh(vrefh),
    .vrefl(vrefl),
    .vref (vref)
  );

  for (genvar k = 0; k < NC; k++) begin : g_cmp
    logic   outn_unused;
    uvolt_t vf_unused;
    diff_comparator #(.T_PD_PS(T_PD_PS)) u_cmp (
      .rst_n  (rst_n),
      .vinp   (vin),
      .vinn   (vref[k]),
      .fv_outp(thermo[k]),
      .fv_outn(outn_unused),
      .vf     (vf_unused)
    );
  end

  if (PIPELINED) begin : g_enc
    wallace_encoder_pipe #(.N(N), .PIPE_MASK(PIPE_MASK)) u_enc (
      .clk   (clk),
      .rst_n (rst_n),
      .thermo(thermo),
      .bin   (y)
    );
  end else begin : g_enc
    wallace_encoder #(.N(N)) u_enc (
      .thermo(thermo),
      .bin   (y)
    );
  end
endmodule

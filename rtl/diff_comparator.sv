// diff_comparator: behavioural model (not synthesizable) of the digital-gate
// fully differential voltage comparator, one per ladder tap of the flash ADC.
//
// How the real circuit works: a four-resistor summer forms
// VS_P = (V_INPUT_P + Vf)/2 and VS_N = (V_INPUT_N + Vf)/2, where Vf is a
// common-mode feedback voltage held on a capacitor Cf. Symmetric inverters
// (trip point VDD/2) turn VS_P and VS_N into logic levels O_P and O_N. When
// they differ, the NAND/NOR output stage drives FV_OUTP = O_P and
// FV_OUTN = O_N. When both are low, a pull-up transistor charges Cf and
// raises Vf; when both are high, a pull-down discharges Cf and lowers Vf.
// Because both inputs see the same Vf, the larger input always crosses the
// trip point first, so the loop settles with O_P/O_N telling which input is
// larger, whatever the common-mode level.
//
// How it is modelled: voltages are integers in microvolts. O_P is
// (V_INPUT_P + Vf) > VDD (the same as VS_P > VDD/2), likewise O_N. The
// decision logic is the synthesizable cmp_logic block. Every STEP_PS the
// feedback node moves by at most VF_SLEW_UV in the requested direction, but
// never past the point where the first input crosses (the capacitor is
// charged only until the first inverter trips), and is kept within 0..VDD.
// The resolved outputs reach the ports after a fixed propagation delay
// T_PD_PS, the comparator delay quoted for this circuit (2.96 ns). Equal
// inputs never resolve and the outputs then hold (the hold is the latch in
// cmp_logic). Offset and noise are not modelled.
//
// Interface: vinp/vinn in microvolts, rst_n clears the output hold latch,
// fv_outp/fv_outn complementary outputs, vf the feedback node (observation
// only). The slew rate and step are this model's own choices.
module diff_comparator
  import flash_adc_pkg::*;
#(
  parameter int unsigned STEP_PS    = 50,       // feedback update interval
  parameter int unsigned VF_SLEW_UV = 50_000,   // max Vf change per step (1 V/ns)
  parameter int unsigned T_PD_PS    = 2960,     // input-to-output delay
  parameter uvolt_t      VF_INIT_UV = VTH_UV    // Vf at power-up
) (
  input  logic   rst_n,
  input  uvolt_t vinp,      // V_INPUT_P
  input  uvolt_t vinn,      // V_INPUT_N
  output logic   fv_outp,
  output logic   fv_outn,
  output uvolt_t vf
);
  timeunit 1ps;
  timeprecision 1ps;

  logic o_p, o_n;
  logic dec_p, dec_n;
  logic fb_up, fb_dn;

  // Summer followed by the inverter chain: VS > VDD/2  <=>  V + Vf > VDD.
  assign o_p = (vinp + vf) > VDD_UV;
  assign o_n = (vinn + vf) > VDD_UV;

  cmp_logic u_logic (
    .rst_n  (rst_n),
    .o_p    (o_p),
    .o_n    (o_n),
    .fv_outp(dec_p),
    .fv_outn(dec_n),
    .fb_up  (fb_up),
    .fb_dn  (fb_dn)
  );

  // Feedback stage: Cf charged or discharged at a limited rate, updated on
  // every rising edge of an internal time-step clock.
  logic tick;
  initial tick = 1'b0;
  always #(STEP_PS / 2) tick = ~tick;

  initial vf = VF_INIT_UV;

  always @(posedge tick) begin
    uvolt_t hi, lo, need, nxt;
    hi  = (vinp > vinn) ? vinp : vinn;
    lo  = (vinp > vinn) ? vinn : vinp;
    nxt = vf;
    if (fb_up) begin
      need = VDD_UV + 1 - hi - vf;          // raise until the larger input trips
      if (need < 1) need = 1;
      nxt = vf + ((need < uvolt_t'(VF_SLEW_UV)) ? need : uvolt_t'(VF_SLEW_UV));
    end else if (fb_dn) begin
      need = vf - (VDD_UV - lo);            // lower until the smaller input releases
      if (need < 1) need = 1;
      nxt = vf - ((need < uvolt_t'(VF_SLEW_UV)) ? need : uvolt_t'(VF_SLEW_UV));
    end
    if (nxt > VDD_UV) nxt = VDD_UV;
    if (nxt < 0)      nxt = 0;
    vf <= nxt;
  end

  // Output stage propagation delay.
  initial begin
    fv_outp = 1'b0;
    fv_outn = 1'b1;
  end
  always @(dec_p, dec_n) begin
    fv_outp <= #(T_PD_PS) dec_p;
    fv_outn <= #(T_PD_PS) dec_n;
  end
endmodule

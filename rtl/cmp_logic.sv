// cmp_logic: the logic-gate part of the digital-gate differential comparator.
//
// The comparator's analog front end adds a common-mode feedback voltage Vf
// to both inputs and squares each sum up with a symmetric inverter chain,
// giving the digital levels o_p and o_n. This block decides, from o_p and
// o_n alone, what the output stage and the feedback stage do:
//   o_p != o_n  the inputs are resolved: fv_outp follows o_p and fv_outn
//               follows o_n (complementary, fully differential outputs);
//               feedback is idle.
//   both 0      both summed inputs lie below the trip point: fb_up asks the
//               feedback stage to raise Vf; the outputs keep their value.
//   both 1      both summed inputs lie above the trip point: fb_dn asks the
//               feedback stage to lower Vf; the outputs keep their value.
// Keeping the value while the output transistors are off is a level-sensitive
// hold, so the output pair is a latch transparent while o_p ^ o_n: this latch
// is intended and is the reason for the latch warning on this module.
// fb_up is the NOR and fb_dn the AND of o_p and o_n; the gate mapping inside
// the output stage is this design's own.
//
// rst_n (asynchronous, active low) forces the outputs to the "input below
// reference" state fv_outp = 0, fv_outn = 1; it is an addition of this design
// so that the outputs are defined before the first decision.
// Purely combinational apart from the hold latch; no clock.
module cmp_logic (
  input  logic rst_n,
  input  logic o_p,      // inverter-chain output of the positive side
  input  logic o_n,      // inverter-chain output of the negative side
  output logic fv_outp,  // comparator output, 1 when V_INPUT_P > V_INPUT_N
  output logic fv_outn,  // complementary output
  output logic fb_up,    // raise the feedback voltage Vf
  output logic fb_dn     // lower the feedback voltage Vf
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (!rst_n) begin
      fv_outp = 1'b0;
      fv_outn = 1'b1;
    end else if (o_p ^ o_n) begin
      fv_outp = o_p;
      fv_outn = o_n;
    end
  end

  assign fb_up = ~(o_p | o_n);
  assign fb_dn = o_p & o_n;
endmodule

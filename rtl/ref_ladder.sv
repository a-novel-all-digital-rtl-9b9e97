// ref_ladder: behavioural model (not synthesizable) of the resistor string
// that sets the comparator thresholds of the flash ADC.
//
// A string of N_TAP + 1 resistors between vrefh and vrefl: R/2 at each end
// and R between neighbouring taps, so the taps lie half a step above vrefl
// and half a step below vrefh, one step apart. Tap k (k = 0 .. N_TAP-1,
// counted from the bottom) is
//   vref[k] = vrefl + (vrefh - vrefl) * (R_END + k*R_MID) / (2*R_END + (N_TAP-1)*R_MID)
// with the resistances expressed in units of R/2 (R_END = 1, R_MID = 2). For
// the 4-bit converter that is 15 taps and a step of (vrefh - vrefl)/15.
// The string is ideal: unloaded by the comparators and free of mismatch.
// Voltages are integers in microvolts, rounded to the nearest microvolt.
// No clock; the outputs follow the references at once.
module ref_ladder
  import flash_adc_pkg::*;
#(
  parameter int unsigned N_TAP = N_CMP,  // number of taps = comparators
  parameter int unsigned R_END = 1,      // end resistors, units of R/2
  parameter int unsigned R_MID = 2       // inner resistors, units of R/2
) (
  input  uvolt_t               vrefh,
  input  uvolt_t               vrefl,
  output uvolt_t [N_TAP-1:0]   vref
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam longint RTOT = 2 * longint'(R_END) + (longint'(N_TAP) - 1) * longint'(R_MID);

  always_comb begin
    longint span, num;
    span = longint'(vrefh) - longint'(vrefl);
    for (int unsigned k = 0; k < N_TAP; k++) begin
      num = span * (longint'(R_END) + longint'(k) * longint'(R_MID));
      // round half away from zero
      num = (num >= 0) ? (num + RTOT / 2) / RTOT : (num - RTOT / 2) / RTOT;
      vref[k] = uvolt_t'(longint'(vrefl) + num);
    end
  end
endmodule

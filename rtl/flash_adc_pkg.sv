// flash_adc_pkg: shared types and constants of the 4-bit flash ADC.
//
// Analog node voltages are carried between the behavioural models as signed
// 32-bit integers in microvolts (uvolt_t), so that ladder taps, the input and
// the comparator feedback node can be wired with ordinary ports and packed
// arrays. The constants are the converter's operating point: 4 bits, a 1.8 V
// supply, a 1.5 V top reference, a 0.7 V bottom reference and a 200 MHz
// conversion clock. The bottom reference of 0.7 V is this design's reading of
// the operating point (it gives the quoted 50 mV LSB and matches the ramp
// range used to exercise the converter); everything else is as specified.
package flash_adc_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Voltage in microvolts.
  typedef logic signed [31:0] uvolt_t;

  localparam int unsigned ADC_BITS = 4;                 // N
  localparam int unsigned N_CMP    = (1 << ADC_BITS) - 1; // 2^N - 1 comparators

  localparam uvolt_t VDD_UV   = 32'sd1_800_000;  // supply
  localparam uvolt_t VTH_UV   = 32'sd900_000;    // symmetric inverter trip point, VDD/2
  localparam uvolt_t VREFH_UV = 32'sd1_500_000;  // top of the ladder
  localparam uvolt_t VREFL_UV = 32'sd700_000;    // bottom of the ladder

  localparam int unsigned CLK_PERIOD_PS = 5000;  // 200 MS/s
endpackage

// full_adder: one-bit full adder, the only cell of the Wallace tree encoder.
//
// s is the XOR of the three inputs, cout their majority. Purely
// combinational; in the tree the two data inputs carry equal-weight count
// bits and cin carries either a thermometer bit or the carry of the
// previous adder in a ripple.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  timeunit 1ps;
  timeprecision 1ps;

  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (b & cin) | (cin & a);
endmodule

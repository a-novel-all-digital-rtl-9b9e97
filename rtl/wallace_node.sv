// wallace_node: one node of the Wallace tree ones counter.
//
// Adds two W-bit counts a and b and a single thermometer bit cin, producing
// the (W+1)-bit count sum = a + b + cin. It is a ripple of W full adders:
// the thermometer bit enters the carry input of the least significant adder,
// each adder's carry feeds the next one, and the last carry becomes the MSB.
// With W = 1 the node is a single full adder counting three thermometer bits.
// A tree of such nodes counts 2^N - 1 bits with 2^N - N - 1 full adders.
// Combinational.
module wallace_node #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W:0]   sum
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [W:0] c;   // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign sum[W] = c[W];
endmodule

// wallace_encoder: combinational thermometer-to-binary encoder built as a
// Wallace tree ones counter.
//
// The 2^N - 1 comparator outputs are not decoded as a thermometer code but
// simply counted: the binary output is the number of ones at the input. This
// is why a bubble (a stray 0 among the 1s or a stray 1 among the 0s) of any
// order only moves the result by the number of misplaced bits instead of
// producing a wild code.
//
// Structure (N - 1 levels of full adders, 2^N - N - 1 adders in total):
//   level 1      2^(N-2) single full adders, each counting three input bits
//                into a 2-bit count;
//   level L > 1  2^(N-1-L) wallace_node instances, each adding the two
//                L-bit counts of its children in a ripple of L full adders,
//                with one further input bit entering the ripple's carry-in.
// Node j of level L counts the contiguous input range
// [j*2^(L+1), (j+1)*2^(L+1) - 2]; its middle bit j*2^(L+1) + 2^L - 1 is the
// carry-in, the bits below it belong to child 2j and those above to 2j+1.
// Which thermometer bit goes to which adder input is this design's own
// choice; the count does not depend on it.
//
// Interface: thermo[2^N-2:0] (bit k = comparator k+1), bin[N-1:0] = number of
// ones. No clock: the output settles one tree delay after the input.
module wallace_encoder #(
  parameter int unsigned N = 4   // output bits
) (
  input  logic [(1<<N)-2:0] thermo,
  output logic [N-1:0]      bin
);
  timeunit 1ps;
  timeprecision 1ps;

  // Bit offset, in the flat vector cnt, of the first node of level lvl.
  // Level k holds 2^(N-1-k) nodes of k+1 bits each.
  function automatic int unsigned lvl_off(int unsigned lvl);
    int unsigned o = 0;
    for (int unsigned k = 1; k < lvl; k++) o += (1 << (N - 1 - k)) * (k + 1);
    return o;
  endfunction

  localparam int unsigned CW = lvl_off(N);   // all node outputs together

  logic [CW-1:0] cnt;

  for (genvar L = 1; L < N; L++) begin : g_lvl
    for (genvar j = 0; j < (1 << (N - 1 - L)); j++) begin : g_node
      localparam int unsigned BASE = j << (L + 1);
      localparam int unsigned MID  = BASE + (1 << L) - 1;
      localparam int unsigned OUTO = lvl_off(L) + j * (L + 1);
      if (L == 1) begin : g_leaf
        wallace_node #(.W(1)) u_node (
          .a  (thermo[BASE]),
          .b  (thermo[BASE+2]),
          .cin(thermo[MID]),
          .sum(cnt[OUTO +: 2])
        );
      end else begin : g_inner
        localparam int unsigned CHO = lvl_off(L - 1) + 2 * j * L;
        wallace_node #(.W(L)) u_node (
          .a  (cnt[CHO +: L]),
          .b  (cnt[CHO + L +: L]),
          .cin(thermo[MID]),
          .sum(cnt[OUTO +: L + 1])
        );
      end
    end
  end

  assign bin = cnt[lvl_off(N - 1) +: N];

  initial begin
    assert (N >= 2) else $error("wallace_encoder: N must be at least 2");
  end
endmodule

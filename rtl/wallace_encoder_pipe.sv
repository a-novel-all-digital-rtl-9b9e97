// wallace_encoder_pipe: pipelined Wallace tree thermometer-to-binary encoder,
// the encoder used in the flash ADC.
//
// Same full-adder tree as wallace_encoder (N - 1 levels, 2^N - N - 1 full
// adders, output = number of ones at the input, tolerant to bubbles of any
// order), with rows of D flip-flops between the adder levels so that each
// clock period only has to cover one level of adders. The register row after
// level L holds the level-L node outputs together with every input bit that
// is only consumed by a later level, so all operands of a level belong to
// the same sample. The inputs of level 1 and the outputs of the last level
// are not registered.
//
// PIPE_MASK bit L-1 places a register row after level L (L = 1 .. N-2).
// The default, all ones, puts a row between every pair of levels. Setting
// only the top bit (2'b10 for N = 4) gives a single row in front of the last
// level.
//
// Timing: thermo is sampled at a rising clk edge; bin shows its count
// LATENCY = popcount(PIPE_MASK) rising edges after that sample (2 for the
// default N = 4), after one adder level of combinational delay. A new sample
// is accepted every cycle. rst_n is an asynchronous active-low reset that
// clears the pipeline registers (bin then reads the count of the current
// input bits that bypass the registers).
module wallace_encoder_pipe #(
  parameter int unsigned     N         = 4,
  parameter logic [N-3:0]    PIPE_MASK = '1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [(1<<N)-2:0] thermo,
  output logic [N-1:0]      bin
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TW      = (1 << N) - 1;

  function automatic int unsigned lvl_off(int unsigned lvl);
    int unsigned o = 0;
    for (int unsigned k = 1; k < lvl; k++) o += (1 << (N - 1 - k)) * (k + 1);
    return o;
  endfunction

  localparam int unsigned CW = lvl_off(N);

  logic [CW-1:0] cnt;        // node outputs, combinational
  logic [lvl_off(N-1)-1:0] cnt_r;  // node outputs below the last level, registered
  logic [lvl_off(N-1)-1:0] cnt_v;  // what the next level sees: cnt or cnt_r
  logic [TW-1:0] th_v [N];   // th_v[L]: input bits as seen by level L+1
  logic [TW-1:0] th_r [N];   // th_r[L]: register row after level L

  assign th_v[0] = thermo;
  assign th_r[0] = '0;       // no row in front of level 1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_r <= '0;
      for (int unsigned L = 1; L < N; L++) th_r[L] <= '0;
    end else begin
      cnt_r <= cnt[lvl_off(N-1)-1:0];
      for (int unsigned L = 1; L < N; L++) th_r[L] <= th_v[L-1];
    end
  end

  for (genvar L = 1; L < N; L++) begin : g_lvl
    localparam int unsigned LO = lvl_off(L);
    localparam int unsigned LW = (1 << (N - 1 - L)) * (L + 1);
    localparam bit          REG = (L <= N - 2) ? PIPE_MASK[(L <= N - 2) ? L - 1 : 0] : 1'b0;

    // View of this level's results and of the raw inputs for level L+1.
    if (L < N - 1) begin : g_view
      assign cnt_v[LO +: LW] = REG ? cnt_r[LO +: LW] : cnt[LO +: LW];
    end
    assign th_v[L] = REG ? th_r[L] : th_v[L-1];

    for (genvar j = 0; j < (1 << (N - 1 - L)); j++) begin : g_node
      localparam int unsigned BASE = j << (L + 1);
      localparam int unsigned MID  = BASE + (1 << L) - 1;
      localparam int unsigned OUTO = LO + j * (L + 1);
      if (L == 1) begin : g_leaf
        wallace_node #(.W(1)) u_node (
          .a  (th_v[0][BASE]),
          .b  (th_v[0][BASE+2]),
          .cin(th_v[0][MID]),
          .sum(cnt[OUTO +: 2])
        );
      end else begin : g_inner
        localparam int unsigned CHO = lvl_off(L - 1) + 2 * j * L;
        wallace_node #(.W(L)) u_node (
          .a  (cnt_v[CHO +: L]),
          .b  (cnt_v[CHO + L +: L]),
          .cin(th_v[L-1][MID]),
          .sum(cnt[OUTO +: L + 1])
        );
      end
    end
  end

  assign bin = cnt[lvl_off(N - 1) +: N];

  initial begin
    assert (N >= 3) else $error("wallace_encoder_pipe: N must be at least 3");
  end
endmodule

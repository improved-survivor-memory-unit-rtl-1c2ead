// acs_unit: add-compare-select recursion over all N trellis states.
//
// For every new state i the two candidate path metrics are the metrics of
// its predecessors p0 = (i<<1) mod N and p1 = p0 | 1 plus the branch metric
// of the code pair the encoder emits on that transition. The smaller
// candidate survives; the decision bit d_i is 1 when the lower branch (p1)
// wins, 0 on the upper branch or a tie. Path metrics are kept modulo
// 2^PM_W and compared through the sign of their difference, so no
// normalisation is needed as long as the metric spread stays below
// 2^(PM_W-1). The unit also finds the state with the smallest new metric
// (the best state), which the survivor memories use as the start of the
// final survivor path.
//
// One trellis stage per valid input, one stage per clock at most. The
// minimum-distance form, the tie rule, the metric width and the start in
// state 0 (state 0 at metric 0, every other state at PM_INIT) are this
// design's choices.
//
// Interface: bm_valid/bm (indexed by code pair {c0,c1}) in; dec_valid,
// dec[N] (decision vector of the stage) and best (best state after the
// stage) registered, one cycle after bm_valid.
module acs_unit #(
  parameter int V    = vit_pkg::V,
  parameter int SW   = vit_pkg::SW,
  parameter int PM_W = vit_pkg::PM_W,
  parameter logic [V:0] G0 = vit_pkg::G0,
  parameter logic [V:0] G1 = vit_pkg::G1,
  parameter logic [PM_W-1:0] PM_INIT = PM_W'(1 << (PM_W - 3))
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  bm_valid,
  input  logic [3:0][SW:0]      bm,
  output logic                  dec_valid,
  output logic [(1<<V)-1:0]     dec,
  output logic [V-1:0]          best
);

  localparam int N = 1 << V;

  logic [N-1:0][PM_W-1:0] pm, pm_next;
  logic [N-1:0]           dec_next;
  logic [V-1:0]           best_next;

  // Add, compare, select
  always_comb begin
    for (int i = 0; i < N; i++) begin
      int p0, p1;
      logic [1:0] c0, c1;
      logic [PM_W-1:0] m0, m1, diff;
      p0 = vit_pkg::pred_state(i, 1'b0, V);
      p1 = vit_pkg::pred_state(i, 1'b1, V);
      c0 = vit_pkg::code_pair(p0, 1'((i >> (V - 1)) & 1), V, 32'(G0), 32'(G1));
      c1 = vit_pkg::code_pair(p1, 1'((i >> (V - 1)) & 1), V, 32'(G0), 32'(G1));
      m0 = pm[p0] + PM_W'(bm[c0]);
      m1 = pm[p1] + PM_W'(bm[c1]);
      diff = m1 - m0;
      dec_next[i] = diff[PM_W-1];           // m1 < m0 (modulo compare)
      pm_next[i]  = dec_next[i] ? m1 : m0;
    end
  end

  // Best state: smallest new metric, lowest index on ties
  always_comb begin
    logic [PM_W-1:0] best_pm, diff;
    best_next = '0;
    best_pm   = pm_next[0];
    for (int i = 1; i < N; i++) begin
      diff = pm_next[i] - best_pm;
      if (diff[PM_W-1]) begin
        best_next = V'(i);
        best_pm   = pm_next[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) pm[i] <= (i == 0) ? '0 : PM_INIT;
      dec_valid <= 1'b0;
      dec       <= '0;
      best      <= '0;
    end else begin
      dec_valid <= bm_valid;
      if (bm_valid) begin
        pm   <= pm_next;
        dec  <= dec_next;
        best <= best_next;
      end
    end
  end

endmodule

// frea_column: elementary component of the facilitated register exchange.
//
// A column of N registers, each holding a V-bit state label, and one column
// of N two-to-one multiplexers. In an ordinary stage the register of state i
// takes the label held by its surviving predecessor,
//   reg[i] <= reg[((i<<1) mod N) | dec[i]],
// so the labels travel along the survivor paths without being rewritten,
// and the decision bits only steer the multiplexers. After BS such stages
// register i holds the state that the survivor ending in i passed through
// BS stages earlier. When set_initial is high the column instead loads
// load[i] (the identity 0..N-1 for the leftmost column, the multiplexer
// outputs of the column to its left otherwise); this restarts the BS-stage
// accumulation. The multiplexer outputs (sel) are brought out so that a
// neighbouring column or a memory can capture the exchanged labels in the
// same cycle.
//
// This follows the elementary structure of the facilitated register
// exchange: feedback from the column itself, a periodic set_initial, and
// decisions used only as multiplexer selects. Reset loads the identity,
// as in the four-state example.
//
// Timing: en marks a stage; registers update on that rising edge. sel is
// combinational from reg and dec.
module frea_column #(
  parameter int V = vit_pkg::V
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic                         set_initial,
  input  logic [(1<<V)-1:0]            dec,
  input  logic [(1<<V)-1:0][V-1:0]     load,
  output logic [(1<<V)-1:0][V-1:0]     regs,
  output logic [(1<<V)-1:0][V-1:0]     sel
);

  localparam int N = 1 << V;

  always_comb begin
    for (int i = 0; i < N; i++)
      sel[i] = regs[vit_pkg::pred_state(i, dec[i], V)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= V'(i);
    end else if (en) begin
      regs <= set_initial ? load : sel;
    end
  end

endmodule

// smu_ram: traceback memory of the hopping survivor memories.
//
// A simple dual-port memory, DEPTH words of W bits: one write port and one
// read port with a registered output, both on the rising clock edge. Each
// word holds a whole row of the survivor memory (one state label per
// trellis state, or one segment per state), so a traceback reads one row
// per clock and picks the label of the current state after the read, which
// gives one traceback hop per clock. A read of the word written on the same
// edge returns the old contents. The memory is written as an array so that
// it maps to a RAM macro or to flip-flops; it is not reset.
//
// Interface: we/waddr/wdata write; re/raddr read, rdata valid after the edge.
module smu_ram #(
  parameter int W     = 384,
  parameter int DEPTH = 11
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  logic [W-1:0]              wdata,
  input  logic                      re,
  input  logic [$clog2(DEPTH)-1:0]  raddr,
  output logic [W-1:0]              rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule

// branch_metric: soft-decision branch metric generator (BMG).
//
// Each received symbol is a pair of SW-bit soft samples, 0 meaning a sure
// '0' and 2^SW-1 a sure '1'. For each of the four possible code pairs
// c = {c0, c1} the unit outputs the distance between the samples and the
// ideal levels of c: sum over j of (c_j ? max - r_j : r_j). A smaller metric
// is a better match. The metric form and the sample width are this design's
// choices; the published method only names the unit and says the decoder is a
// soft-decision one.
//
// Interface: in_valid/rx0/rx1 sampled on a rising edge; bm[c] and bm_valid
// are registered, one cycle later. bm[c] is indexed by c = {c0, c1}.
module branch_metric #(
  parameter int SW = vit_pkg::SW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [SW-1:0]       rx0,
  input  logic [SW-1:0]       rx1,
  output logic                bm_valid,
  output logic [3:0][SW:0]    bm
);

  localparam logic [SW-1:0] MAXV = '1;

  logic [3:0][SW:0] bm_next;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [SW:0] d0, d1;
      d0 = c[1] ? (SW+1)'(MAXV - rx0) : (SW+1)'(rx0);
      d1 = c[0] ? (SW+1)'(MAXV - rx1) : (SW+1)'(rx1);
      bm_next[c] = d0 + d1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bm_valid <= 1'b0;
      bm       <= '0;
    end else begin
      bm_valid <= in_valid;
      if (in_valid) bm <= bm_next;
    end
  end

endmodule

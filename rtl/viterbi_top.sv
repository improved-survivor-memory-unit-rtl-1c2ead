// viterbi_top: rate-1/2 convolutional encoder and Viterbi decoder with the
// three state-label survivor memories side by side.
//
// Decoder path: received soft symbols -> branch_metric (BMG) -> acs_unit
// (add-compare-select, decision vector and best state per stage) -> three
// survivor memory units fed from the same decision stream:
//   * frea_smu   facilitated register exchange, BS decoded bits every BS
//                stages, latency D stages;
//   * shtbm_smu  stage-hopping traceback, H decoded bits per traceback;
//   * ihy_smu    improved hybrid (facilitated partial exchange of DP
//                stages plus hopping traceback), H bits per traceback.
// None of them has a decision unit: they store state labels, and a label is
// a run of decoded bits. The three are alternatives for the same job; they
// are instantiated together so that they can be compared on one decision
// stream. The encoder stands beside the decoder with its own ports, as the
// transmitter end of the link.
//
// Timing: a symbol on rx_valid becomes a decision vector two clocks later
// (BMG register, ACS register). At most one symbol per clock. Each SMU
// output word is labelled by its own valid; bit 0 of every word is the
// oldest decoded bit. The decision stream and the SMU event strobes are
// brought out for observation.
module viterbi_top #(
  parameter int V    = vit_pkg::V,
  parameter int SW   = vit_pkg::SW,
  parameter int PM_W = vit_pkg::PM_W,
  parameter logic [V:0] G0 = vit_pkg::G0,
  parameter logic [V:0] G1 = vit_pkg::G1,
  parameter int BS   = vit_pkg::BS,
  parameter int D    = vit_pkg::D,
  parameter int H    = vit_pkg::H,
  parameter int DP   = vit_pkg::DP
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Encoder
  input  logic                 enc_in_valid,
  input  logic                 enc_in_bit,
  output logic                 enc_out_valid,
  output logic [1:0]           enc_out_sym,
  output logic [V-1:0]         enc_state,
  // Decoder input: soft samples of c0 and c1
  input  logic                 rx_valid,
  input  logic [SW-1:0]        rx0,
  input  logic [SW-1:0]        rx1,
  // Decision stream (observation)
  output logic                 dec_valid,
  output logic [V-1:0]         best_state,
  // FREA output
  output logic                 frea_valid,
  output logic [BS-1:0]        frea_bits,
  output logic                 frea_set_initial,
  // SH-TBM output
  output logic                 shtbm_valid,
  output logic                 shtbm_set_initial,
  output logic [H-1:0]         shtbm_bits,
  output logic                 shtbm_tb_start,
  output logic                 shtbm_tb_hop,
  // IHY output
  output logic                 ihy_valid,
  output logic [H-1:0]         ihy_bits,
  output logic                 ihy_seg_write,
  output logic                 ihy_tb_start,
  output logic                 ihy_tb_hop
);

  localparam int N = 1 << V;

  conv_encoder #(.V(V), .G0(G0), .G1(G1)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (enc_in_valid),
    .in_bit   (enc_in_bit),
    .out_valid(enc_out_valid),
    .out_sym  (enc_out_sym),
    .state    (enc_state)
  );

  logic              bm_valid;
  logic [3:0][SW:0]  bm;
  logic [N-1:0]      dec;

  branch_metric #(.SW(SW)) u_bmg (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(rx_valid),
    .rx0     (rx0),
    .rx1     (rx1),
    .bm_valid(bm_valid),
    .bm      (bm)
  );

  acs_unit #(.V(V), .SW(SW), .PM_W(PM_W), .G0(G0), .G1(G1)) u_acs (
    .clk      (clk),
    .rst_n    (rst_n),
    .bm_valid (bm_valid),
    .bm       (bm),
    .dec_valid(dec_valid),
    .dec      (dec),
    .best     (best_state)
  );

  frea_smu #(.V(V), .BS(BS), .D(D)) u_frea (
    .clk        (clk),
    .rst_n      (rst_n),
    .dec_valid  (dec_valid),
    .dec        (dec),
    .best       (best_state),
    .out_valid  (frea_valid),
    .out_bits   (frea_bits),
    .set_initial(frea_set_initial)
  );

  shtbm_smu #(.V(V), .BS(BS), .D(D), .H(H)) u_shtbm (
    .clk        (clk),
    .rst_n      (rst_n),
    .dec_valid  (dec_valid),
    .dec        (dec),
    .best       (best_state),
    .out_valid  (shtbm_valid),
    .out_bits   (shtbm_bits),
    .set_initial(shtbm_set_initial),
    .tb_start   (shtbm_tb_start),
    .tb_hop     (shtbm_tb_hop)
  );

  ihy_smu #(.V(V), .BS(BS), .DP(DP), .D(D), .H(H)) u_ihy (
    .clk      (clk),
    .rst_n    (rst_n),
    .dec_valid(dec_valid),
    .dec      (dec),
    .best     (best_state),
    .out_valid(ihy_valid),
    .out_bits (ihy_bits),
    .seg_write(ihy_seg_write),
    .tb_start (ihy_tb_start),
    .tb_hop   (ihy_tb_hop)
  );

endmodule

// frea_smu: facilitated register-exchange survivor memory unit (FREA).
//
// A conventional register exchange keeps, for every state, a shift register
// of D decoded bits and needs N*D multiplexers. Here the survivor of each
// state is kept as C = D/BS state labels, one per block of BS stages, in C
// frea_column instances. Every stage all columns exchange their labels
// along the survivor paths with one column of multiplexers each (N*D/BS
// multiplexers in all). Every BS stages set_initial is raised: the leftmost
// column reloads the identity (each state names itself), and each other
// column takes the exchanged labels of the column to its left, so the
// labels move one column to the right. Column c therefore holds, for the
// survivor ending in state i, the state passed BS*c stages before the last
// block boundary.
//
// At each block boundary the label leaving the rightmost column on the path
// of the best state is the state the decoder believes was passed D stages
// earlier; its top BS bits are BS decoded bits, so no decision unit is
// needed. The leftmost-column identity load, the column shift on
// set_initial and the N*D/BS multiplexer count follow the FREA structure;
// reading the output on the best state's row is this design's choice.
//
// Interface: dec_valid/dec/best, one trellis stage per valid (from the ACS).
// out_valid pulses every BS stages once the columns hold real data (first
// at stage D+BS); out_bits[j] is the decoded input of stage t-D-BS+1+j where
// t is the current stage (oldest bit in bit 0). Latency: D stages plus one
// register.
module frea_smu #(
  parameter int V  = vit_pkg::V,
  parameter int BS = vit_pkg::BS,
  parameter int D  = vit_pkg::D
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 dec_valid,
  input  logic [(1<<V)-1:0]    dec,
  input  logic [V-1:0]         best,
  output logic                 out_valid,
  output logic [BS-1:0]        out_bits,
  output logic                 set_initial
);

  localparam int N = 1 << V;
  localparam int C = D / BS;

  initial begin
    assert (BS >= 1 && BS <= V) else $error("BS must lie in 1..V");
    assert (D % BS == 0 && C >= 1) else $error("D must be a positive multiple of BS");
  end

  logic [$clog2(BS+1)-1:0]   phase;      // stages since the last block boundary
  logic [$clog2(C+2)-1:0]    nblk;       // block boundaries seen, saturating at C+1
  logic [C-1:0][N-1:0][V-1:0] regs, sel, load;
  logic [N-1:0][V-1:0]       ident;

  assign set_initial = dec_valid && (int'(phase) == BS - 1);

  always_comb begin
    for (int i = 0; i < N; i++) ident[i] = V'(i);
  end

  for (genvar c = 0; c < C; c++) begin : g_col
    if (c == 0) begin : g_first
      assign load[c] = ident;
    end else begin : g_rest
      assign load[c] = sel[c-1];
    end
    frea_column #(.V(V)) u_col (
      .clk        (clk),
      .rst_n      (rst_n),
      .en         (dec_valid),
      .set_initial(set_initial),
      .dec        (dec),
      .load       (load[c]),
      .regs       (regs[c]),
      .sel        (sel[c])
    );
  end

  logic [V-1:0] oldest_label;
  assign oldest_label = sel[C-1][best];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= '0;
      nblk      <= '0;
      out_valid <= 1'b0;
      out_bits  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (dec_valid) begin
        if (set_initial) begin
          phase <= '0;
          if (int'(nblk) < C + 1) nblk <= nblk + 1'b1;
          if (int'(nblk) >= C) begin
            out_valid <= 1'b1;
            out_bits  <= oldest_label[V-1 -: BS];
          end
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule

// ihy_smu: improved hybrid survivor memory unit (IHY).
//
// The hybrid survivor memory runs a short register exchange of DP stages
// and stores its result every DP stages, so that a traceback only needs
// one step per DP stages. Here that partial register exchange is a
// facilitated one: CP = DP/BS frea_column instances, each a single column
// of multiplexers, hold for every state the states its survivor passed
// BS, 2*BS, ... stages back, shifting one column to the right every BS
// stages exactly as in frea_smu. Every DP stages (at a segment boundary T)
// the exchanged labels of all columns are written as one memory row: for
// state i the segment {state at T-BS, ..., state at T-DP}. The last label
// of a segment is the pointer to the previous segment, and the state itself
// plus the other labels are the DP decoded bits of the segment, so tracing
// back and decoding are the same multiplexer operation and no state table
// or decision unit is needed.
//
// Every H stages (H a multiple of DP), once D+H stages have arrived, a
// traceback starts from the best state at T. It reads one row per clock:
// D/DP hops reach the state at T-D, then H/DP more segments are read and
// their DP bits are placed into the H-bit output word, released when the
// traceback ends. A traceback takes (D+H)/DP + 1 clocks.
//
// What follows the improved hybrid method: a partial register exchange in
// facilitated form with DP a multiple of BS, storage of its state-label
// output, and use of the last label as the previous-state pointer. This
// design's choices: row-wide RAM words, traceback from the best state, and
// release of the H bits as one word.
//
// Interface: dec_valid/dec/best in, one stage per valid. out_valid pulses
// once per traceback; out_bits[j] is the decoded input of stage T-D-H+1+j.
// Status: seg_write (a segment row is stored), tb_start, tb_hop.
module ihy_smu #(
  parameter int V  = vit_pkg::V,
  parameter int BS = vit_pkg::BS,
  parameter int DP = vit_pkg::DP,
  parameter int D  = vit_pkg::D,
  parameter int H  = vit_pkg::H
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 dec_valid,
  input  logic [(1<<V)-1:0]    dec,
  input  logic [V-1:0]         best,
  output logic                 out_valid,
  output logic [H-1:0]         out_bits,
  output logic                 seg_write,
  output logic                 tb_start,
  output logic                 tb_hop
);

  localparam int N     = 1 << V;
  localparam int CP    = DP / BS;        // columns of the partial exchange
  localparam int HOPS  = (D + H) / DP;   // segments read per traceback
  localparam int ACQ   = D / DP;         // acquisition hops
  // Rows kept: the HOPS rows one traceback spans, the rows written while it
  // runs (one per DP clocks at full rate) and one spare.
  localparam int ROWS  = HOPS + HOPS / DP + 2;
  localparam int RW    = $clog2(ROWS);
  localparam int SEGS  = H / DP;         // segments between traceback starts

  initial begin
    assert (BS >= 1 && BS <= V) else $error("BS must lie in 1..V");
    assert (DP % BS == 0 && DP > 0) else $error("DP must be a multiple of BS");
    assert (D % DP == 0 && H % DP == 0 && H > 0) else $error("D and H must be multiples of DP");
    assert (HOPS + 1 <= H) else $error("traceback of (D+H)/DP+1 clocks must fit into H stages");
  end

  typedef enum logic [1:0] {TB_IDLE, TB_PRIME, TB_HOP} tb_state_e;

  // Partial register exchange in facilitated form
  logic [$clog2(BS+1)-1:0]      phase;
  logic [$clog2(CP+1)-1:0]      blk;     // blocks within the current segment
  logic                         set_initial;
  logic [N-1:0][V-1:0]          ident;
  logic [CP-1:0][N-1:0][V-1:0]  regs, sel, load;

  always_comb begin
    for (int i = 0; i < N; i++) ident[i] = V'(i);
  end

  assign set_initial = dec_valid && (int'(phase) == BS - 1);
  assign seg_write   = set_initial && (int'(blk) == CP - 1);

  for (genvar c = 0; c < CP; c++) begin : g_col
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

  // Segment row: for state i, labels at T-BS (c = 0) ... T-DP (c = CP-1)
  logic [N-1:0][CP-1:0][V-1:0]  wrow, rrow;

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int c = 0; c < CP; c++)
        wrow[i][c] = sel[c][i];
  end

  logic [RW-1:0] wptr, rptr;
  logic          ram_re;

  smu_ram #(.W(N*CP*V), .DEPTH(ROWS)) u_ram (
    .clk  (clk),
    .we   (seg_write),
    .waddr(wptr),
    .wdata(wrow),
    .re   (ram_re),
    .raddr(rptr),
    .rdata(rrow)
  );

  logic [$clog2(HOPS+1)-1:0] nseg;       // segments written, saturating at HOPS
  logic [$clog2(SEGS+1)-1:0] sc;         // segments since the last traceback start
  logic                      start_now;

  assign start_now = seg_write && (int'(nseg) + 1 >= HOPS) && (int'(sc) == SEGS - 1);

  tb_state_e                 tb_state;
  logic [V-1:0]              tb_s;
  logic [$clog2(HOPS+1)-1:0] tb_h;
  logic [H-1:0]              acc, acc_next;
  logic [CP-1:0][V-1:0]      seg;

  assign seg      = rrow[tb_s];
  assign ram_re   = (tb_state == TB_PRIME) ||
                    (tb_state == TB_HOP && int'(tb_h) < HOPS - 1);
  assign tb_start = start_now;
  assign tb_hop   = (tb_state == TB_HOP);

  // Decoded bits of the segment at the current hop merged into the word
  always_comb begin
    int k;
    logic [V-1:0] lab;
    acc_next = acc;
    lab = '0;
    k = int'(tb_h) - ACQ;
    if (k >= 0) begin
      for (int c = 0; c < CP; c++) begin
        lab = (c == 0) ? tb_s : seg[c-1];
        acc_next[H - k * DP - (c + 1) * BS +: BS] = lab[V-1 -: BS];
      end
    end
  end

  function automatic logic [RW-1:0] row_dec(logic [RW-1:0] r);
    return (int'(r) == 0) ? RW'(ROWS - 1) : r - 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= '0;
      blk       <= '0;
      wptr      <= '0;
      nseg      <= '0;
      sc        <= '0;
      tb_state  <= TB_IDLE;
      tb_s      <= '0;
      tb_h      <= '0;
      rptr      <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_bits  <= '0;
    end else begin
      out_valid <= 1'b0;

      if (dec_valid) begin
        if (set_initial) begin
          phase <= '0;
          blk   <= (int'(blk) == CP - 1) ? '0 : blk + 1'b1;
        end else begin
          phase <= phase + 1'b1;
        end
      end
      if (seg_write) begin
        wptr <= (int'(wptr) == ROWS - 1) ? '0 : wptr + 1'b1;
        if (int'(nseg) < HOPS) nseg <= nseg + 1'b1;
        sc   <= (int'(sc) == SEGS - 1) ? '0 : sc + 1'b1;
      end

      unique case (tb_state)
        TB_IDLE: begin
          if (start_now) begin
            tb_state <= TB_PRIME;
            tb_s     <= best;
            tb_h     <= '0;
            rptr     <= wptr;
          end
        end
        TB_PRIME: begin
          rptr     <= row_dec(rptr);
          tb_state <= TB_HOP;
        end
        TB_HOP: begin
          acc  <= acc_next;
          tb_s <= seg[CP-1];
          rptr <= row_dec(rptr);
          if (int'(tb_h) == HOPS - 1) begin
            out_valid <= 1'b1;
            out_bits  <= acc_next;
            tb_state  <= TB_IDLE;
          end else begin
            tb_h <= tb_h + 1'b1;
          end
        end
        default: tb_state <= TB_IDLE;
      endcase
    end
  end

endmodule

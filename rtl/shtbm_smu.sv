// shtbm_smu: stage-hopping traceback survivor memory unit (SH-TBM).
//
// A state label carries the last V decoded inputs, so a traceback does not
// need every stage: it can hop BS stages at a time if the memory keeps,
// for every state at a block boundary, the state its survivor passed BS
// stages earlier. One frea_column builds that row while the block is being
// processed: at a block boundary it restarts from the identity and during
// the next BS stages it forwards the labels along the survivor paths. At the
// end of the block its exchanged labels are written into the traceback
// memory as one row. The memory thus holds one row per BS stages instead of
// one decision vector per stage, and there is no state table and no
// decision unit: the labels met along the traceback are the decoded bits.
//
// Every H stages (at a block boundary T, once D+H stages have arrived) a
// traceback starts from the best state at T. It reads one row per clock,
// each read moving BS stages back: D/BS hops of acquisition reach the state
// at T-D, then H/BS further states are visited and the top BS bits of each
// are placed into the H-bit output word, which is released when the
// traceback ends. A traceback takes (D+H)/BS + 1 clocks, of which
// (D+H)/BS - 1 read a row, and must end before the next one starts
// (asserted at elaboration). The memory keeps (D+H)/BS + (D+H)/BS^2 + 2
// rows: the rows one traceback spans plus those written while it runs.
//
// What follows the stage-hopping method: storing only the survivor state
// every BS stages, updating it in a working row between boundaries, hopping
// BS stages per traceback step, and reading the decoded bits directly from
// the labels. This design's choices: a register column in place of the two
// alternating memory rows, a row-wide RAM word, traceback from the best
// state, and release of the H bits as one word.
//
// Interface: dec_valid/dec/best in, one stage per valid. out_valid pulses
// once per traceback; out_bits[j] is the decoded input of stage T-D-H+1+j.
// Status: set_initial (block boundary), tb_start, tb_hop (one per row read
// while tracing back).
module shtbm_smu #(
  parameter int V  = vit_pkg::V,
  parameter int BS = vit_pkg::BS,
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
  output logic                 set_initial,
  output logic                 tb_start,
  output logic                 tb_hop
);

  localparam int N     = 1 << V;
  localparam int HOPS  = (D + H) / BS;   // states visited per traceback
  localparam int ACQ   = D / BS;         // acquisition hops
  // Rows kept: the HOPS rows one traceback spans, the rows written while it
  // runs (one per BS clocks at full rate) and one spare.
  localparam int ROWS  = HOPS + HOPS / BS + 2;
  localparam int RW    = $clog2(ROWS);
  localparam int SEGS  = H / BS;         // blocks between traceback starts

  initial begin
    assert (BS >= 1 && BS <= V) else $error("BS must lie in 1..V");
    assert (D % BS == 0 && H % BS == 0 && H > 0) else $error("D and H must be multiples of BS");
    assert (HOPS + 1 <= H) else $error("traceback of (D+H)/BS+1 clocks must fit into H stages");
  end

  typedef enum logic [1:0] {TB_IDLE, TB_PRIME, TB_HOP} tb_state_e;

  // Working row: labels BS stages back, built during the block
  logic [$clog2(BS+1)-1:0]  phase;
  logic [N-1:0][V-1:0]      ident, col_regs, col_sel;

  always_comb begin
    for (int i = 0; i < N; i++) ident[i] = V'(i);
  end

  assign set_initial = dec_valid && (int'(phase) == BS - 1);

  frea_column #(.V(V)) u_row (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (dec_valid),
    .set_initial(set_initial),
    .dec        (dec),
    .load       (ident),
    .regs       (col_regs),
    .sel        (col_sel)
  );

  // Traceback memory
  logic [RW-1:0]           wptr, rptr;
  logic                    ram_re;
  logic [N-1:0][V-1:0]     rrow;

  smu_ram #(.W(N*V), .DEPTH(ROWS)) u_ram (
    .clk  (clk),
    .we   (set_initial),
    .waddr(wptr),
    .wdata(col_sel),
    .re   (ram_re),
    .raddr(rptr),
    .rdata(rrow)
  );

  // Block bookkeeping
  logic [$clog2(HOPS+1)-1:0] nblk;       // rows written, saturating at HOPS
  logic [$clog2(SEGS+1)-1:0] seg;        // blocks since the last traceback start
  logic                      start_now;

  assign start_now = set_initial && (int'(nblk) + 1 >= HOPS) && (int'(seg) == SEGS - 1);

  // Traceback
  tb_state_e                 tb_state;
  logic [V-1:0]              tb_s;
  logic [$clog2(HOPS+1)-1:0] tb_h;
  logic [H-1:0]              acc;

  // The row read at hop h serves hop h+1; the last state needs no read.
  assign ram_re   = (tb_state == TB_PRIME && HOPS > 1) ||
                    (tb_state == TB_HOP && int'(tb_h) + 2 < HOPS);
  assign tb_start = start_now;
  assign tb_hop   = ram_re;

  function automatic logic [RW-1:0] row_dec(logic [RW-1:0] r);
    return (int'(r) == 0) ? RW'(ROWS - 1) : r - 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= '0;
      wptr      <= '0;
      nblk      <= '0;
      seg       <= '0;
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
          wptr  <= (int'(wptr) == ROWS - 1) ? '0 : wptr + 1'b1;
          if (int'(nblk) < HOPS) nblk <= nblk + 1'b1;
          seg   <= (int'(seg) == SEGS - 1) ? '0 : seg + 1'b1;
        end else begin
          phase <= phase + 1'b1;
        end
      end

      unique case (tb_state)
        TB_IDLE: begin
          if (start_now) begin
            tb_state <= TB_PRIME;
            tb_s     <= best;
            tb_h     <= '0;
            rptr     <= wptr;             // row being written on this edge
          end
        end
        TB_PRIME: begin
          rptr     <= row_dec(rptr);
          tb_state <= TB_HOP;
        end
        TB_HOP: begin
          if (int'(tb_h) >= ACQ)
            acc[H - (int'(tb_h) - ACQ + 1) * BS +: BS] <= tb_s[V-1 -: BS];
          if (int'(tb_h) == HOPS - 1) begin
            out_valid <= 1'b1;
            out_bits  <= acc;
            out_bits[0 +: BS] <= tb_s[V-1 -: BS];
            tb_state  <= TB_IDLE;
          end else begin
            tb_s <= rrow[tb_s];
            tb_h <= tb_h + 1'b1;
            rptr <= row_dec(rptr);
          end
        end
        default: tb_state <= TB_IDLE;
      endcase
    end
  end

endmodule

// ber_awgn_run: bit error rate experiment for one decoder configuration,
// shared by the BER testbenches. A random message is convolutionally
// encoded, sent as BPSK over an additive white Gaussian noise channel,
// quantised to 3-bit soft samples and decoded by viterbi_top; the output
// words of all three survivor memories are compared with the message.
//
// Noise is drawn with the Box-Muller method from $urandom; the received
// value y = (2b-1) + n, n of variance 1/(2*R*Eb/N0), R = 1/2, is quantised
// to 3 bits over [-1, +1]. For each Eb/N0 point the design is reset and
// NB[p] message bits are sent. A point passes when each survivor memory
// stays below LIMIT times the reference BER REF_BER[p] and below the
// uncoded BPSK error rate measured on the same channel samples.
//
// When all points are done, done rises and checks / failures hold the
// totals; the instantiating testbench prints them and stops.
module ber_awgn_run #(
  parameter int  D     = 36,
  parameter int  H     = 12,
  parameter int  DP    = 12,
  parameter int  NPTS  = 4,
  parameter real EBN0_DB [NPTS] = '{1.0, 2.0, 3.0, 4.0},
  parameter real REF_BER [NPTS] = '{0.0481, 0.00691, 4.54e-4, 1.85e-5},
  parameter int  NB      [NPTS] = '{40000, 100000, 300000, 1200000},
  parameter real LIMIT  = 3.0
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int V = 6, SW = 3, BS = 6;
  localparam logic [V:0] G0 = 7'o171, G1 = 7'o133;

  function automatic int max_nb();
    int m;
    m = 0;
    for (int p = 0; p < NPTS; p++) if (NB[p] > m) m = NB[p];
    return m;
  endfunction
  localparam int NMAX = max_nb();

  logic clk = 1'b0, rst_n = 1'b0;
  logic enc_in_valid = 1'b0, enc_in_bit = 1'b0;
  logic enc_out_valid;
  logic [1:0] enc_out_sym;
  logic [V-1:0] enc_state;
  logic rx_valid = 1'b0;
  logic [SW-1:0] rx0 = '0, rx1 = '0;
  logic dec_valid;
  logic [V-1:0] best_state;
  logic frea_valid, frea_set_initial;
  logic [BS-1:0] frea_bits;
  logic shtbm_valid, shtbm_set_initial, shtbm_tb_start, shtbm_tb_hop;
  logic [H-1:0] shtbm_bits;
  logic ihy_valid, ihy_seg_write, ihy_tb_start, ihy_tb_hop;
  logic [H-1:0] ihy_bits;

  viterbi_top #(.D(D), .H(H), .DP(DP)) dut (.*);


  always #5 clk = ~clk;

  bit src [];
  int stage = 0;
  int sh_T [$], ihy_T [$];
  longint e_frea = 0, n_frea = 0, e_sh = 0, n_sh = 0, e_ihy = 0, n_ihy = 0;

  always @(posedge clk) begin
    int st_now;
    if (!rst_n) begin
      stage = 0; sh_T.delete(); ihy_T.delete();
    end else begin
      if (frea_valid) begin
        int first;
        first = stage - D - BS + 1;
        for (int j = 0; j < BS; j++) if (first + j >= 1) begin
          n_frea++; if (frea_bits[j] != src[first + j]) e_frea++;
        end
      end
      if (shtbm_valid) begin
        int first;
        first = sh_T.pop_front() - D - H + 1;
        for (int j = 0; j < H; j++) begin n_sh++; if (shtbm_bits[j] != src[first + j]) e_sh++; end
      end
      if (ihy_valid) begin
        int first;
        first = ihy_T.pop_front() - D - H + 1;
        for (int j = 0; j < H; j++) begin n_ihy++; if (ihy_bits[j] != src[first + j]) e_ihy++; end
      end
      st_now = dec_valid ? stage + 1 : stage;
      if (shtbm_tb_start) sh_T.push_back(st_now);
      if (ihy_tb_start) ihy_T.push_back(st_now);
      if (dec_valid) stage = stage + 1;
    end
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic logic [SW-1:0] quant(real y);
    int q;
    q = int'($floor((y + 1.0) * 3.5 + 0.5));
    if (q < 0) q = 0;
    if (q > 7) q = 7;
    return SW'(q);
  endfunction

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    src = new[NMAX + 1];
    for (int p = 0; p < NPTS; p++) begin
      real sigma, bf, bs, bi, bu, limit;
      logic [V-1:0] st;
      longint unc;
      unc = 0;
      sigma = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** (EBN0_DB[p] / 10.0))));
      e_frea = 0; n_frea = 0; e_sh = 0; n_sh = 0; e_ihy = 0; n_ihy = 0;
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      #1 rst_n = 1'b1;
      st = '0;
      for (int t = 1; t <= NB[p]; t++) begin
        logic b, c0, c1;
        logic [V:0] r;
        real y0, y1;
        b = 1'($urandom);
        src[t] = b;
        r = {b, st};
        c0 = ^(r & G0);
        c1 = ^(r & G1);
        st = {b, st[V-1:1]};
        y0 = (c0 ? 1.0 : -1.0) + sigma * gauss();
        y1 = (c1 ? 1.0 : -1.0) + sigma * gauss();
        if ((y0 > 0.0) != c0) unc++;
        if ((y1 > 0.0) != c1) unc++;
        rx_valid = 1'b1; rx0 = quant(y0); rx1 = quant(y1);
        @(posedge clk); #1;
      end
      rx_valid = 1'b0;
      repeat (40) @(posedge clk);
      #1;
      bf = real'(e_frea) / real'(n_frea);
      bs = real'(e_sh) / real'(n_sh);
      bi = real'(e_ihy) / real'(n_ihy);
      bu = real'(unc) / real'(2 * NB[p]);
      limit = LIMIT * REF_BER[p];
      $display("Eb/N0 %3.1f dB: bits %0d  BER FREA %e  SH-TBM %e  IHY %e  uncoded %e  (limit %e)",
               EBN0_DB[p], NB[p], bf, bs, bi, bu, limit);
      checks += 4;
      if (n_frea < (longint'(NB[p]) / 2) || n_sh < (longint'(NB[p]) / 2) || n_ihy < (longint'(NB[p]) / 2)) begin failures++; $display("too few decoded bits"); end
      if (bf > limit || bf >= bu) begin failures++; $display("FREA BER too high"); end
      if (bs > limit || bs >= bu) begin failures++; $display("SH-TBM BER too high"); end
      if (bi > limit || bi >= bu) begin failures++; $display("IHY BER too high"); end
    end
    done = 1'b1;
  end
endmodule

// tb_viterbi_k3: the end-to-end test of tb_viterbi_top on the small
// configuration of the worked examples: the four-state (2,1,2) code with
// generators 7 and 5 (octal), BS = 2, a partial exchange of DP = 4 stages
// (two columns) in the hybrid unit, D = 8 and H = 12. Channel errors are
// kept at least 24 symbols apart, within what a free distance of 5 corrects.
//
// A random message is encoded by a reference convolution in the testbench
// (the encoder in the design is checked against it symbol by symbol), sent
// through a channel that adds small soft noise and, now and then, a full
// bit error (errors at least 8 symbols apart), and fed to the decoder with
// random idle cycles. Every word from every survivor memory is compared
// with the message bits it stands for. The FREA blocks must come one clock
// after their block-boundary stage; each traceback word must come
// (D+H)/hop + 2 clocks after its start. The run counts each mechanism
// (column shift, row writes, tracebacks, hop reads, segment writes,
// corrected channel errors, input stalls) and fails if one never happened,
// or if a survivor memory skipped part of the message.
module tb_viterbi_k3;
  localparam int V = 2, N = 4, SW = 3, BS = 2, D = 8, H = 12, DP = 4;
  localparam logic [V:0] G0 = 3'o7, G1 = 3'o5;
  localparam int NBITS = 4000;

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

  viterbi_top #(.V(V), .G0(G0), .G1(G1), .BS(BS), .D(D), .H(H), .DP(DP)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit src [NBITS + 1];          // src[t] = message bit of stage t (1-based)
  logic [1:0] code [NBITS + 1]; // reference code pair of stage t

  // Reference encoder: c_j(t) = sum_m g_j[m] u(t-m), g_j[m] the D^m tap
  function automatic logic [1:0] ref_pair(int t);
    logic a = 0, b = 0;
    for (int m = 0; m <= V; m++) begin
      logic u;
      u = (t - m >= 1) ? src[t - m] : 1'b0;
      a ^= G0[V-m] & u;
      b ^= G1[V-m] & u;
    end
    return {a, b};
  endfunction

  // Mechanism counters
  int n_shift = 0, n_rows = 0, n_tb_sh = 0, n_hop_sh = 0, n_seg = 0;
  int n_tb_ihy = 0, n_hop_ihy = 0, n_flips = 0, n_stall = 0;
  int n_frea = 0, n_sh = 0, n_ihy = 0;
  int stage = 0;
  int sh_T [$], sh_due [$], ihy_T [$], ihy_due [$];
  // first stage not yet covered (tracebacks start at the first multiple of H
  // that is at least D+H)
  int frea_next = 1;
  int sh_next = ((D + 2 * H - 1) / H) * H - D - H + 1;
  int ihy_next = ((D + 2 * H - 1) / H) * H - D - H + 1;

  // Output monitor
  always @(posedge clk) begin
    int st_now;
    cycle <= cycle + 1;
    if (rst_n) begin
      // FREA: block of stages stage-D-BS+1 .. stage-D, one clock after the boundary
      if (frea_valid) begin
        int first;
        first = stage - D - BS + 1;
        n_frea++;
        checks++;
        if (stage % BS != 0 || first != frea_next) begin
          failures++; $display("FREA block at stage %0d out of place (expected start %0d)", stage, frea_next);
        end
        for (int j = 0; j < BS; j++) begin
          checks++;
          if (first + j >= 1 && frea_bits[j] !== src[first + j]) begin
            failures++; $display("FREA bit of stage %0d wrong", first + j);
          end
        end
        frea_next = first + BS;
      end
      if (shtbm_valid) begin
        int T, due, first;
        T = sh_T.pop_front(); due = sh_due.pop_front();
        first = T - D - H + 1;
        n_sh++;
        checks += 2;
        if (cycle != due) begin failures++; $display("SH-TBM word at cycle %0d, expected %0d", cycle, due); end
        if (first != sh_next) begin failures++; $display("SH-TBM word skips stages"); end
        for (int j = 0; j < H; j++) begin
          checks++;
          if (shtbm_bits[j] !== src[first + j]) begin failures++; $display("SH-TBM bit of stage %0d wrong", first + j); end
        end
        sh_next = first + H;
      end
      if (ihy_valid) begin
        int T, due, first;
        T = ihy_T.pop_front(); due = ihy_due.pop_front();
        first = T - D - H + 1;
        n_ihy++;
        checks += 2;
        if (cycle != due) begin failures++; $display("IHY word at cycle %0d, expected %0d", cycle, due); end
        if (first != ihy_next) begin failures++; $display("IHY word skips stages"); end
        for (int j = 0; j < H; j++) begin
          checks++;
          if (ihy_bits[j] !== src[first + j]) begin failures++; $display("IHY bit of stage %0d wrong", first + j); end
        end
        ihy_next = first + H;
      end
      st_now = dec_valid ? stage + 1 : stage;
      if (frea_set_initial) n_shift++;
      if (shtbm_set_initial) n_rows++;
      if (shtbm_tb_hop) n_hop_sh++;
      if (ihy_seg_write) n_seg++;
      if (ihy_tb_hop) n_hop_ihy++;
      if (shtbm_tb_start) begin
        n_tb_sh++; sh_T.push_back(st_now); sh_due.push_back(cycle + (D + H) / BS + 2);
      end
      if (ihy_tb_start) begin
        n_tb_ihy++; ihy_T.push_back(st_now); ihy_due.push_back(cycle + (D + H) / DP + 2);
      end
      if (dec_valid) stage = stage + 1;
    end
  end

  // Encoder check
  int enc_t = 0;
  always @(posedge clk) begin
    if (rst_n && enc_out_valid) begin
      enc_t++;
      checks++;
      if (enc_out_sym !== code[enc_t]) begin failures++; $display("encoder pair %0d wrong", enc_t); end
    end
  end

  function automatic logic [SW-1:0] channel(logic b, logic flip);
    int lvl;
    lvl = b ? 7 : 0;
    if (flip) lvl = b ? $urandom_range(0, 2) : $urandom_range(5, 7);
    else if ($urandom_range(0, 2) == 0) lvl = b ? lvl - $urandom_range(0, 3) : lvl + $urandom_range(0, 3);
    return SW'(lvl);
  endfunction

  initial begin
    int last_flip;
    last_flip = -100;
    for (int t = 1; t <= NBITS; t++) src[t] = 1'($urandom);
    for (int t = 1; t <= NBITS; t++) code[t] = ref_pair(t);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 1; t <= NBITS; t++) begin
      logic f0, f1;
      if ($urandom_range(0, 9) == 0) begin
        rx_valid = 1'b0; enc_in_valid = 1'b0;
        n_stall++;
        @(posedge clk); #1;
      end
      f0 = 0; f1 = 0;
      if (t - last_flip >= 24 && $urandom_range(0, 5) == 0) begin
        if ($urandom_range(0, 1) == 0) f0 = 1; else f1 = 1;
        last_flip = t;
        n_flips++;
      end
      enc_in_valid = 1'b1; enc_in_bit = src[t];
      rx_valid = 1'b1;
      rx0 = channel(code[t][1], f0);
      rx1 = channel(code[t][0], f1);
      @(posedge clk); #1;
    end
    rx_valid = 1'b0; enc_in_valid = 1'b0;
    repeat (60) @(posedge clk);
    #1;
    $display("stages %0d, channel bit errors %0d, input stalls %0d", stage, n_flips, n_stall);
    $display("FREA: column shifts %0d, blocks %0d", n_shift, n_frea);
    $display("SH-TBM: rows %0d, tracebacks %0d, hop reads %0d, words %0d", n_rows, n_tb_sh, n_hop_sh, n_sh);
    $display("IHY: segments %0d, tracebacks %0d, hop reads %0d, words %0d", n_seg, n_tb_ihy, n_hop_ihy, n_ihy);
    checks += 9;
    if (stage != NBITS) begin failures++; $display("stage count wrong"); end
    if (enc_t != NBITS) begin failures++; $display("encoder count wrong"); end
    if (n_flips == 0 || n_stall == 0) failures++;
    if (n_shift == 0 || n_frea == 0) failures++;
    if (n_rows == 0 || n_tb_sh == 0 || n_hop_sh == 0 || n_sh != n_tb_sh) failures++;
    if (n_seg == 0 || n_tb_ihy == 0 || n_hop_ihy == 0 || n_ihy != n_tb_ihy) failures++;
    // every survivor memory covered the message up to its own latency
    if (frea_next != (NBITS / BS) * BS - D + 1) begin failures++; $display("FREA stopped at %0d", frea_next); end
    if (sh_next != (NBITS / H) * H - D + 1) begin failures++; $display("SH-TBM stopped at %0d", sh_next); end
    if (ihy_next != (NBITS / H) * H - D + 1) begin failures++; $display("IHY stopped at %0d", ihy_next); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

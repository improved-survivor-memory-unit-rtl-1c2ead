// tb_shtbm_smu: drives the survivor memory with random decision vectors and
// random best states, with random idle cycles, and checks every released
// word against a reference that keeps all decision vectors and traces back
// one stage at a time: from the best state at stage T (T a multiple of H,
// T >= D+H) it follows the survivor D stages back and takes the H inputs
// below that point (the MSB of each state passed is one decoded input).
// Also checks the latency of each traceback in clocks, that a word comes
// for every traceback and no other, and the set_initial strobe.
module tb_shtbm_smu;
  localparam int V = 6, N = 64, BS = 6, D = 36, H = 12;
  localparam int DP = BS;
  localparam int HOPS = (D + H) / BS;
  logic clk = 1'b0, rst_n = 1'b0;
  logic dec_valid = 1'b0;
  logic [N-1:0] dec = '0;
  logic [V-1:0] best = '0;
  logic out_valid, set_initial, tb_start, tb_hop;
  logic [H-1:0] out_bits;
  int checks = 0, failures = 0;
  int cycle = 0;

  shtbm_smu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] hist [$];
  logic [H-1:0] exp_q [$];
  int           due_q [$];
  int starts = 0, hops = 0, words = 0, evs = 0;

  // Decoded input of stage t on the path ending in state s at stage t
  function automatic logic [H-1:0] ref_word(int t, int s);
    logic [H-1:0] w;
    for (int k = 0; k < D; k++) s = (2 * s) % N + int'(hist[t - 1 - k][s]);
    // s is now the state at stage t-D; its MSB is the input of stage t-D
    for (int j = H - 1; j >= 0; j--) begin
      w[j] = 1'(s >> (V - 1));
      s = (2 * s) % N + int'(hist[t - D - (H - 1 - j) - 1][s]);
    end
    return w;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (tb_start) starts++;
      if (tb_hop) hops++;
      if (set_initial) evs++;
      if (out_valid) begin
        words++;
        checks += 2;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected word");
        end else begin
          logic [H-1:0] e;
          int due;
          e = exp_q.pop_front();
          due = due_q.pop_front();
          if (out_bits !== e) begin failures++; $display("word %0d: got %b exp %b", words, out_bits, e); end
          if (cycle != due) begin failures++; $display("word %0d at cycle %0d, expected %0d", words, cycle, due); end
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 1; t <= 1500; t++) begin
      logic [N-1:0] d;
      int b;
      if ($urandom_range(0, 5) == 0) begin
        dec_valid <= 1'b0;
        @(posedge clk); #1;
      end
      d = {$urandom, $urandom};
      b = $urandom_range(0, N - 1);
      dec_valid <= 1'b1; dec <= d; best <= V'(b);
      hist.push_back(d);
      #1;
      checks += 2;
      if (set_initial !== (t % DP == 0)) begin failures++; $display("set_initial wrong at stage %0d: %b", t, set_initial); end
      if (tb_start !== (t % H == 0 && t >= D + H)) begin failures++; $display("tb_start wrong at stage %0d", t); end
      if (t % H == 0 && t >= D + H) begin
        exp_q.push_back(ref_word(t, b));
        due_q.push_back(cycle + HOPS + 2);   // traceback: 1 priming clock + HOPS hop clocks
      end
      @(posedge clk); #1;
    end
    dec_valid <= 1'b0;
    repeat (HOPS + 5) @(posedge clk);
    checks += 3;
    if (exp_q.size() != 0) begin failures++; $display("%0d words missing", exp_q.size()); end
    if (starts == 0 || words != starts) begin failures++; $display("starts %0d words %0d", starts, words); end
    if (hops == 0) failures++;
    $display("tracebacks %0d, hop reads %0d, set_initial %0d", starts, hops, evs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

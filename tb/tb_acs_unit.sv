// tb_acs_unit: checks the add-compare-select recursion of all 64 states
// against a model with unbounded integer path metrics. The model derives
// the trellis itself: predecessor p of state i under decision d is
// 2*(i mod 32) + d, and the branch label is the code pair the generators
// give for the register contents {input i[5], p}. Branch metrics are
// random (0..14), with idle cycles in between; every stage the decision
// vector and the best state are compared.
module tb_acs_unit;
  localparam int V = 6, N = 64, SW = 3, PM_W = 10;
  localparam logic [V:0] G0 = 7'o171, G1 = 7'o133;
  localparam int PM_INIT = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bm_valid = 1'b0;
  logic [3:0][SW:0] bm = '0;
  logic dec_valid;
  logic [N-1:0] dec;
  logic [V-1:0] best;
  int checks = 0, failures = 0;

  acs_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pm [N];

  function automatic int label(int p, int u);
    int r, a, b;
    r = (u << V) | p;
    a = 0; b = 0;
    for (int j = 0; j <= V; j++) begin
      a ^= ((r >> j) & 1) & int'(G0[j]);
      b ^= ((r >> j) & 1) & int'(G1[j]);
    end
    return (a << 1) | b;
  endfunction

  initial begin
    int m [4];
    int npm [N];
    logic [N-1:0] edec;
    int ebest;
    for (int i = 0; i < N; i++) pm[i] = (i == 0) ? 0 : PM_INIT;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 600; n++) begin
      if ($urandom_range(0, 5) == 0) begin
        bm_valid <= 1'b0;
        @(posedge clk);
        #1;
        checks++;
        if (dec_valid) begin failures++; $display("spurious dec_valid"); end
      end
      for (int c = 0; c < 4; c++) m[c] = $urandom_range(0, 14);
      bm_valid <= 1'b1;
      for (int c = 0; c < 4; c++) bm[c] <= 4'(m[c]);
      @(posedge clk);
      bm_valid <= 1'b0;
      for (int i = 0; i < N; i++) begin
        int p0, p1, u, a0, a1;
        u  = i >> (V - 1);
        p0 = 2 * (i % (N / 2));
        p1 = p0 + 1;
        a0 = pm[p0] + m[label(p0, u)];
        a1 = pm[p1] + m[label(p1, u)];
        edec[i] = (a1 < a0);
        npm[i]  = (a1 < a0) ? a1 : a0;
      end
      ebest = 0;
      for (int i = 1; i < N; i++) if (npm[i] < npm[ebest]) ebest = i;
      pm = npm;
      #1;
      checks += 3;
      if (!dec_valid) begin failures++; $display("missing dec_valid"); end
      if (dec !== edec) begin failures++; $display("stage %0d decisions %h exp %h", n, dec, edec); end
      if (int'(best) != ebest) begin failures++; $display("stage %0d best %0d exp %0d", n, best, ebest); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

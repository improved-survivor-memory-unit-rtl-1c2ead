// tb_frea_smu: drives the facilitated register-exchange survivor memory
// with random decision vectors and random best states (random idle cycles
// between stages) and checks every output block against a reference that
// keeps all decision vectors and traces the survivor back one stage at a
// time from the best state, D stages deep. Also checks that an output comes
// exactly at every BS-th stage from stage D+BS on, one clock after that
// stage's decisions, and never elsewhere.
module tb_frea_smu;
  localparam int V = 6, N = 64, BS = 6, D = 36;
  logic clk = 1'b0, rst_n = 1'b0;
  logic dec_valid = 1'b0;
  logic [N-1:0] dec = '0;
  logic [V-1:0] best = '0;
  logic out_valid, set_initial;
  logic [BS-1:0] out_bits;
  int checks = 0, failures = 0;

  frea_smu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] hist [$];     // hist[t-1] = decision vector of stage t

  function automatic int trace(int t, int s, int back);
    for (int k = 0; k < back; k++) begin
      s = (2 * s) % N + int'(hist[t - 1 - k][s]);
    end
    return s;
  endfunction

  initial begin
    int outs, sinit;
    outs = 0; sinit = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 1; t <= 1200; t++) begin
      logic [N-1:0] d;
      int b;
      if ($urandom_range(0, 4) == 0) begin
        dec_valid <= 1'b0;
        @(posedge clk); #1;
        checks++;
        if (out_valid) begin failures++; $display("output after idle cycle"); end
      end
      d = {$urandom, $urandom};
      b = $urandom_range(0, N - 1);
      dec_valid <= 1'b1; dec <= d; best <= V'(b);
      hist.push_back(d);
      #1;
      checks++;
      if (set_initial !== (t % BS == 0)) begin failures++; $display("set_initial wrong at %0d", t); end
      if (set_initial) sinit++;
      @(posedge clk);
      dec_valid <= 1'b0;
      #1;
      checks++;
      if (out_valid !== (t % BS == 0 && t >= D + BS)) begin
        failures++; $display("out_valid %b at stage %0d", out_valid, t);
      end else if (out_valid) begin
        int s;
        s = trace(t, b, D);
        outs++;
        checks++;
        if (out_bits !== BS'(s >> (V - BS))) begin
          failures++; $display("stage %0d: got %b exp %b", t, out_bits, BS'(s >> (V - BS)));
        end
      end
    end
    checks++;
    if (outs == 0 || sinit == 0) failures++;
    $display("outputs %0d, set_initial %0d", outs, sinit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

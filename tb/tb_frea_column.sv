// tb_frea_column: two instances of the elementary facilitated register
// exchange component.
//  * Four states: after reset the labels are (0,1,2,3); the decision vector
//    (0,0,0,1) must give (0,2,0,3) and then (0,1,1,0) must give (0,3,2,0),
//    the worked two-step example of the method.
//  * 64 states: random decisions, random set_initial with random load
//    values and random idle cycles, checked every cycle against a model.
module tb_frea_column;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Four-state instance
  logic          en4 = 1'b0, si4 = 1'b0;
  logic [3:0]    dec4 = '0;
  logic [3:0][1:0] load4 = '0, regs4, sel4;
  frea_column #(.V(2)) u4 (.clk, .rst_n, .en(en4), .set_initial(si4), .dec(dec4),
                           .load(load4), .regs(regs4), .sel(sel4));

  // 64-state instance
  localparam int V = 6, N = 64;
  logic          en = 1'b0, si = 1'b0;
  logic [N-1:0]  dec = '0;
  logic [N-1:0][V-1:0] load = '0, regs, sel;
  frea_column #(.V(V)) u64 (.clk, .rst_n, .en, .set_initial(si), .dec,
                            .load, .regs, .sel);

  task automatic expect4(input int a, b, c, d, input string what);
    checks++;
    if (!(int'(regs4[0]) == a && int'(regs4[1]) == b && int'(regs4[2]) == c && int'(regs4[3]) == d)) begin
      failures++;
      $display("%s: got (%0d,%0d,%0d,%0d) exp (%0d,%0d,%0d,%0d)", what,
               regs4[0], regs4[1], regs4[2], regs4[3], a, b, c, d);
    end
  endtask

  initial begin
    int model [N];
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    #1;
    expect4(0, 1, 2, 3, "reset");
    @(posedge clk);
    en4 <= 1'b1; dec4 <= 4'b1000;          // decisions of states 0..3 = 0,0,0,1
    @(posedge clk); #1;
    expect4(0, 2, 0, 3, "first step");
    dec4 <= 4'b0110;                        // decisions 0,1,1,0
    @(posedge clk); #1;
    expect4(0, 3, 2, 0, "second step");
    en4 <= 1'b0;
    @(posedge clk); #1;
    expect4(0, 3, 2, 0, "hold");
    si4 <= 1'b1; en4 <= 1'b1; load4 <= {2'd0, 2'd1, 2'd2, 2'd3};
    @(posedge clk); #1;
    expect4(3, 2, 1, 0, "load");
    en4 <= 1'b0; si4 <= 1'b0;

    for (int i = 0; i < N; i++) model[i] = i;
    for (int n = 0; n < 2000; n++) begin
      logic [N-1:0] d;
      logic e, s;
      int nm [N];
      int ld [N];
      d = {$urandom, $urandom};
      e = ($urandom_range(0, 4) != 0);
      s = ($urandom_range(0, 5) == 0);
      for (int i = 0; i < N; i++) ld[i] = $urandom_range(0, N - 1);
      en <= e; si <= s; dec <= d;
      for (int i = 0; i < N; i++) load[i] <= V'(ld[i]);
      #1;
      // combinational exchange outputs against the model before the edge
      for (int i = 0; i < N; i++) begin
        int p;
        p = (2 * i) % N + int'(d[i]);
        checks++;
        if (int'(sel[i]) != model[p]) begin failures++; $display("sel[%0d] mismatch", i); end
        nm[i] = s ? ld[i] : model[p];
      end
      @(posedge clk);
      if (e) model = nm;
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(regs[i]) != model[i]) begin failures++; $display("cycle %0d reg %0d mismatch", n, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

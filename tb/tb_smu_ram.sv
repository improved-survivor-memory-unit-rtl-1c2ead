// tb_smu_ram: random writes and registered reads against an array model,
// including reads of the word written on the same edge (old data expected)
// and read-enable low (output held).
module tb_smu_ram;
  localparam int W = 384, DEPTH = 11, AW = 4;
  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  smu_ram dut (.*);

  function automatic logic [W-1:0] rnd_word();
    logic [W-1:0] w;
    for (int k = 0; k < W / 32; k++) w[32*k +: 32] = $urandom;
    return w;
  endfunction

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model [DEPTH];
  bit written [DEPTH];

  initial begin
    logic [W-1:0] exp_r;
    bit exp_known;
    exp_known = 0;
    // fill every word first
    for (int a = 0; a < DEPTH; a++) begin
      we <= 1'b1; waddr <= AW'(a); wdata <= rnd_word();
      @(posedge clk);
      model[a] = wdata;
    end
    we <= 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int wa, ra;
      logic [W-1:0] wd;
      logic w, r;
      wa = $urandom_range(0, DEPTH - 1);
      ra = $urandom_range(0, DEPTH - 1);
      wd = rnd_word();
      w = 1'($urandom);
      r = ($urandom_range(0, 3) != 0);
      we <= w; waddr <= AW'(wa); wdata <= wd; re <= r; raddr <= AW'(ra);
      @(posedge clk);
      if (r) begin exp_r = model[ra]; exp_known = 1; end
      if (w) model[wa] = wd;
      #1;
      if (exp_known) begin
        checks++;
        if (rdata !== exp_r) begin failures++; $display("read mismatch at %0d", n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_branch_metric: drives random soft-sample pairs and checks the four
// branch metrics (distance of the samples to the ideal levels of each code
// pair) one cycle later, plus the valid pipeline.
module tb_branch_metric;
  localparam int SW = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [SW-1:0] rx0 = '0, rx1 = '0;
  logic bm_valid;
  logic [3:0][SW:0] bm;
  int checks = 0, failures = 0;

  branch_metric dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 1000; n++) begin
      int a, b;
      logic v;
      a = $urandom_range(0, 7);
      b = $urandom_range(0, 7);
      v = ($urandom_range(0, 4) != 0);
      in_valid <= v; rx0 <= 3'(a); rx1 <= 3'(b);
      @(posedge clk);
      #1;
      checks++;
      if (bm_valid !== v) begin failures++; $display("valid mismatch"); end
      if (v) begin
        // code pair {c0,c1}: ideal level 0 for a 0 bit, 7 for a 1 bit
        int e [4];
        e[0] = a + b;
        e[1] = a + (7 - b);
        e[2] = (7 - a) + b;
        e[3] = (7 - a) + (7 - b);
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (int'(bm[c]) != e[c]) begin
            failures++;
            $display("bm[%0d] = %0d, expected %0d (rx %0d %0d)", c, bm[c], e[c], a, b);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

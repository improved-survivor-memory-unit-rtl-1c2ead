// tb_conv_encoder: checks the rate-1/2 encoder against a model that keeps
// the raw input history and forms each output as the modulo-2 convolution
// of the inputs with the generator taps, g(D) = g0 + g1 D + ... + gV D^V.
// Random input bits with random idle cycles; the output pair is checked one
// cycle after each accepted bit, and the register contents after each bit.
module tb_conv_encoder;
  localparam int V = 6;
  localparam logic [V:0] G0 = 7'o171;
  localparam logic [V:0] G1 = 7'o133;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_bit = 1'b0;
  logic out_valid;
  logic [1:0] out_sym;
  logic [V-1:0] state;
  int checks = 0, failures = 0;
  int cycles = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hist [$];   // hist[0] = newest input

  function automatic logic [1:0] model_pair();
    logic a = 0, b = 0;
    for (int m = 0; m <= V; m++) begin
      logic u;
      u = (m < hist.size()) ? hist[m] : 1'b0;
      a ^= G0[V-m] & u;
      b ^= G1[V-m] & u;
    end
    return {a, b};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      logic b;
      b = 1'($urandom);
      if ($urandom_range(0, 3) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
        #1;
        if (out_valid) begin failures++; $display("valid without input"); end
        checks++;
      end
      in_valid <= 1'b1;
      in_bit   <= b;
      @(posedge clk);
      in_valid <= 1'b0;
      hist.push_front(b);
      #1;
      checks++;
      if (!out_valid || out_sym !== model_pair()) begin
        failures++;
        $display("pair mismatch at %0d: got %b exp %b", n, out_sym, model_pair());
      end
      begin
        logic [V-1:0] exp_state;
        for (int m = 0; m < V; m++) exp_state[V-1-m] = (m < hist.size()) ? hist[m] : 1'b0;
        checks++;
        if (state !== exp_state) begin failures++; $display("state mismatch"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

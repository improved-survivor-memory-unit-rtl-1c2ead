// conv_encoder: rate-1/2 feedforward convolutional encoder.
//
// A V-bit shift register holds the last V input bits (newest in the MSB, the
// state numbering used throughout the decoder). Each accepted input bit u
// produces the pair {c0, c1}, c_j = XOR of the taps of generator G_j over
// {u, state}, and then shifts u into the register. This is the shift
// register plus modulo-2 adder structure of the textbook encoder; the
// generators default to the DVB-T pair (171, 133 octal), which is this
// design's choice.
//
// Interface: in_valid/in_bit accepted on a rising clock edge; the code pair
// appears one cycle later on out_valid/out_sym (out_sym[1] = c0,
// out_sym[0] = c1). Synchronous active-low reset clears the register to the
// all-zero state.
module conv_encoder #(
  parameter int V = vit_pkg::V,
  parameter logic [V:0] G0 = vit_pkg::G0,
  parameter logic [V:0] G1 = vit_pkg::G1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       out_valid,
  output logic [1:0] out_sym,
  output logic [V-1:0] state
);

  logic [V:0] taps;
  assign taps = {in_bit, state};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym <= {^(taps & G0), ^(taps & G1)};
        state   <= {in_bit, state[V-1:1]};
      end
    end
  end

endmodule

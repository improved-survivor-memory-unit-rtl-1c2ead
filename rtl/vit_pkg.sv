// vit_pkg: constants and trellis helpers shared by the encoder, the Viterbi
// decoder front end (branch metrics, add-compare-select) and the three
// survivor memory units (stage-hopping traceback, facilitated register
// exchange, improved hybrid).
//
// The code is the rate-1/2, constraint length 7 feedforward code named as the
// main evaluation case (the inner code of DVB-T). Its generators, 171 and 133
// octal, are the standard DVB-T pair; the method does not fix them, so they
// are this design's choice.
//
// State convention: a state is the V most recent input bits held by the
// encoder, newest bit in the MSB. Entering state i the input was i[V-1]; the
// two predecessors of i are ((i<<1) mod N) | d, where the decision bit d = 0
// names the upper and d = 1 the lower branch. This is the numbering of the
// four-state example of the elementary FREA component (register 1 selects
// register 2 or 3, register 2 selects register 0 or 1).
//
// Because a state *is* a run of decoded bits, a survivor memory that stores
// state labels every BS stages needs no decision unit: the top BS bits of a
// label are BS decoded bits, oldest in the LSB of the slice.
package vit_pkg;

  // Code (rate 1/2, K = V + 1)
  localparam int K  = 7;                 // constraint length
  localparam int V  = K - 1;             // encoder memory, log2 of the state count
  localparam int N  = 1 << V;            // number of trellis states
  localparam logic [K-1:0] G0 = 7'o171;  // generator 0, MSB = tap on the current input
  localparam logic [K-1:0] G1 = 7'o133;  // generator 1

  // Decoder front end
  localparam int SW   = 3;               // soft-decision sample width (0 = sure 0, max = sure 1)
  localparam int PM_W = 10;              // path metric width (modulo arithmetic)

  // Survivor memory
  localparam int BS = V;                 // block size: stages per hop, bits per state label
  localparam int D  = 36;                // survivor (acquisition) depth
  localparam int H  = 12;                // decoding depth: bits released per traceback
  localparam int DP = 12;                // partial register-exchange length of the hybrid SMU

  // Predecessor of state i for decision bit d.
  function automatic int pred_state(int i, logic d, int v);
    return ((i << 1) & ((1 << v) - 1)) | int'(d);
  endfunction

  // Encoder output pair for the transition from state p under input u,
  // for generators g0/g1 of length v+1 (MSB = tap on the current input).
  function automatic logic [1:0] code_pair(int p, logic u, int v,
                                           logic [31:0] g0, logic [31:0] g1);
    logic [31:0] reg_bits;
    reg_bits = (32'(u) << v) | 32'(p);
    return {^(reg_bits & g0), ^(reg_bits & g1)};
  endfunction

endpackage

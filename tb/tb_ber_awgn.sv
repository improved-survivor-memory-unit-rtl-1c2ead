// tb_ber_awgn: bit error rate of the full-size decoder (D = 36, H = 12,
// DP = 12) over an additive white Gaussian noise channel, the experiment of
// the decoding-performance comparison: rate-1/2, v = 6 code, random
// message, BPSK, soft-decision decoding, Eb/N0 from 1 to 4 dB. The run
// itself is ber_awgn_run.
//
// The reference values are the published BERs of the conventional
// traceback with a 5 K survivor (35 stages, the nearest to D = 36):
//     Eb/N0  1 dB 0.0481, 2 dB 0.00691, 3 dB 4.54e-4, 4 dB 1.85e-5.
// A point passes below 3 times the reference (3-bit quantisation costs a
// fraction of a dB) and below the uncoded error rate.
module tb_ber_awgn;
  logic done;
  int   checks, failures;

  ber_awgn_run #(
    .D(36), .H(12), .DP(12),
    .REF_BER('{0.0481, 0.00691, 4.54e-4, 1.85e-5}),
    .NB('{40000, 100000, 300000, 1200000}),
    .LIMIT(3.0)
  ) run (.*);

  initial begin
    fork
      wait (done);
      #30000000 begin
        failures++;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

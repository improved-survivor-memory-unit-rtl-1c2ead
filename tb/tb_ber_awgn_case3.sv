// tb_ber_awgn_case3: the same AWGN experiment as tb_ber_awgn, at the
// survivor length of the published stage-hopping case: 10 K = 70 stages,
// here D = 54 and H = 18 (72 stages, 12 hops of BS = 6) with DP = 18 for
// the hybrid unit. The run itself is ber_awgn_run.
//
// The reference values are the published BERs of that stage-hopping case:
//     Eb/N0  1 dB 0.04044, 2 dB 0.005268, 3 dB 3.611e-4, 4 dB 1.611e-5.
// A point passes below 3 times the reference (3-bit quantisation costs a
// fraction of a dB; a few error events decide the 4 dB point) and below
// the uncoded error rate.
module tb_ber_awgn_case3;
  logic done;
  int   checks, failures;

  ber_awgn_run #(
    .D(54), .H(18), .DP(18),
    .REF_BER('{0.04044, 0.005268, 3.611e-4, 1.611e-5}),
    .NB('{40000, 100000, 300000, 2000000}),
    .LIMIT(3.0)
  ) run (.*);

  initial begin
    fork
      wait (done);
      #60000000 begin
        failures++;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

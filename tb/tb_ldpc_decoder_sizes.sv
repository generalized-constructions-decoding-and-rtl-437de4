// Test of the decoder at other code lengths of the same 802.16e rate-2/3
// base matrix: P = 28 (N = 672, the smallest expansion factor with a
// conflict-free two-replica tap placement) and P = 96 (N = 2304, the largest
// 802.16e length), both with two replica sub-decoders and 10 iterations.
// Each size runs in its own ldpc_frame_tester (noise-free and moderate-noise
// frames, bit-exact model comparison, latency and decoding checks).
module tb_ldpc_decoder_sizes;
  logic fin_a, fin_b;
  int chk_a, chk_b, fail_a, fail_b;
  int checks, failures;

  ldpc_frame_tester #(.P(28), .R(2), .ITER(10)) u_p28 (.finished(fin_a), .checks(chk_a), .failures(fail_a));
  ldpc_frame_tester #(.P(96), .R(2), .ITER(10)) u_p96 (.finished(fin_b), .checks(chk_b), .failures(fail_b));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b, fail_a + fail_b + 1);
    $finish;
  end

  initial begin
    wait (fin_a === 1'b1 && fin_b === 1'b1);
    checks   = chk_a + chk_b;
    failures = fail_a + fail_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

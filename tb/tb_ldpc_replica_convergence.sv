// Convergence comparison of the plain (one sub-decoder) and the replica
// (two sub-decoder) configurations, N = 1056, at a small iteration count.
// Both decoders get the same noisy frames of random codewords (encoded by
// the dual-diagonal parity rule and checked against all parity checks) and
// run ITER = 2 iterations of P cycles each. The replica decoder updates
// every check row twice per iteration, so over all frames it must leave
// fewer residual bit errors than the plain one, with the same latency. The
// frames with little noise must decode correctly in both.
module tb_ldpc_replica_convergence;
  import ldpc_pkg::*;
  localparam int P = 44, ITER = 2, N = NB_COL * P, FRAMES = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  bel_t llr_in [N];
  logic busy1, done1, busy2, done2;  // busy outputs are not checked here
  logic [N-1:0] cw1, cw2;
  bel_t bel1 [N], bel2 [N];
  int checks = 0, failures = 0;
  bit cw [N];

  ldpc_decoder #(.P(P), .REPLICAS(1), .ITER(ITER)) u_plain (
    .clk, .rst_n, .start, .llr_in, .busy(busy1), .done(done1), .codeword(cw1), .belief(bel1));
  ldpc_decoder #(.P(P), .REPLICAS(2), .ITER(ITER)) u_rep (
    .clk, .rst_n, .start, .llr_in, .busy(busy2), .done(done2), .codeword(cw2), .belief(bel2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sh(int i, int j);
    return shift_of(i, j, P);
  endfunction

  task automatic encode();
    bit lam [NB_ROW][P];
    bit par [NB_ROW][P];
    int t;
    for (int n = 0; n < 16 * P; n++) cw[n] = bit'($urandom_range(0, 1));
    for (int i = 0; i < NB_ROW; i++)
      for (int x = 0; x < P; x++) begin
        lam[i][x] = 1'b0;
        for (int j = 0; j < 16; j++) begin
          t = sh(i, j);
          if (t >= 0) lam[i][x] ^= cw[j*P + (x + t) % P];
        end
      end
    for (int x = 0; x < P; x++) begin
      par[0][x] = 1'b0;
      for (int i = 0; i < NB_ROW; i++) par[0][x] ^= lam[i][x];
    end
    for (int i = 0; i < NB_ROW - 1; i++)
      for (int x = 0; x < P; x++) begin
        t = sh(i, 16);
        par[i+1][x] = lam[i][x] ^ ((t >= 0) ? par[0][(x + t) % P] : 1'b0) ^ ((i > 0) ? par[i][x] : 1'b0);
      end
    for (int b = 0; b < NB_ROW; b++)
      for (int x = 0; x < P; x++) cw[(16 + b)*P + x] = par[b][x];
  endtask

  function automatic bit parity_ok();
    bit s;
    for (int i = 0; i < NB_ROW; i++)
      for (int x = 0; x < P; x++) begin
        s = 1'b0;
        for (int j = 0; j < NB_COL; j++)
          if (sh(i, j) >= 0) s ^= cw[j*P + (x + sh(i, j)) % P];
        if (s) return 1'b0;
      end
    return 1'b1;
  endfunction

  initial begin
    int noise, llr, lat, e1, e2, tot1, tot2, sigma;
    tot1 = 0; tot2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      sigma = (f < 2) ? 0 : 11;
      encode();
      checks++;
      if (!parity_ok()) begin failures++; $display("encoder produced a non-codeword"); end
      for (int n = 0; n < N; n++) begin
        noise = 0;
        for (int q = 0; q < 4; q++) noise += int'($urandom_range(0, 1000));
        noise = ((noise - 2000) * sigma) / 578;
        llr = (cw[n] ? -16 : 16) + noise;
        llr = (llr > 255) ? 255 : ((llr < -255) ? -255 : llr);
        llr_in[n] = {llr < 0, 8'((llr < 0) ? -llr : llr)};
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 0;
      while (!done2) begin
        @(negedge clk);
        lat++;
        checks++;
        if (done1 != done2) begin failures++; $display("plain and replica finish apart"); end
      end
      checks++;
      if (lat != 1 + P * ITER) begin failures++; $display("latency %0d", lat); end
      e1 = 0; e2 = 0;
      for (int n = 0; n < N; n++) begin
        e1 += int'(cw1[n] != cw[n]);
        e2 += int'(cw2[n] != cw[n]);
      end
      if (sigma == 0) begin
        checks++;
        if (e1 != 0 || e2 != 0) begin failures++; $display("noise-free frame not decoded"); end
      end
      tot1 += e1;
      tot2 += e2;
      $display("frame %0d: residual errors plain %0d, replica %0d", f, e1, e2);
    end
    checks++;
    if (!(tot2 < tot1)) begin
      failures++;
      $display("replica decoder did not converge faster: %0d vs %0d", tot2, tot1);
    end
    $display("after %0d iterations: plain %0d residual bit errors, replica %0d", ITER, tot1, tot2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Frame-level test harness for one size of the LDPC decoder, used by
// tb_ldpc_decoder_sizes. It instantiates the decoder with the given P,
// REPLICAS and ITER, and runs the same frames and checks as tb_ldpc_decoder:
// encoding with a parity check of the codeword, noisy LLRs, a bit-exact
// fixed-point model of the schedule, the latency of 1 + ITER*P cycles, and
// correct decoding of the frames with little noise. It raises finished when
// its frames are done and reports its counts on checks and failures.
module ldpc_frame_tester
  import ldpc_pkg::*;
#(
  parameter int P    = 28,
  parameter int R    = 2,
  parameter int ITER = 10
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int N    = NB_COL * P;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  bel_t llr_in [N];
  logic busy, done;
  logic [N-1:0] codeword;
  bel_t belief [N];

  ldpc_decoder #(.P(P), .REPLICAS(R), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  int cnt_msg_sat = 0, cnt_bel_clamp = 0, cnt_tie = 0, cnt_corrected = 0, cnt_rep1 = 0;

  // ---------------- encoder --------------------------------------------
  bit cw [N];

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
    // Summing all block-rows leaves p0 = sum of lambda (column 16 is a-0-a).
    for (int x = 0; x < P; x++) begin
      par[0][x] = 1'b0;
      for (int i = 0; i < NB_ROW; i++) par[0][x] ^= lam[i][x];
    end
    // Block-row i then gives parity block i+1 (column 17+i).
    for (int i = 0; i < NB_ROW - 1; i++)
      for (int x = 0; x < P; x++) begin
        t = sh(i, 16);
        par[i+1][x] = lam[i][x] ^ ((t >= 0) ? par[0][(x + t) % P] : 1'b0) ^ ((i > 0) ? par[i][x] : 1'b0);
      end
    for (int b = 0; b < NB_ROW; b++)
      for (int x = 0; x < P; x++) cw[(16 + b)*P + x] = par[b][x];
  endtask

  function automatic int syndrome_weight();
    int w = 0;
    bit s;
    for (int i = 0; i < NB_ROW; i++)
      for (int x = 0; x < P; x++) begin
        s = 1'b0;
        for (int j = 0; j < NB_COL; j++)
          if (sh(i, j) >= 0) s ^= cw[j*P + (x + sh(i, j)) % P];
        w += int'(s);
      end
    return w;
  endfunction

  // ---------------- reference model -------------------------------------
  int T [N];
  int U [NB_ROW][MAX_DEG][P];   // [row][edge][check row in the block]
  offs_t offs;

  function automatic int clampi(int x, int lim);
    return (x > lim) ? lim : ((x < -lim) ? -lim : x);
  endfunction

  function automatic int sm_bel(bel_t b);
    return b[BEL_W-1] ? -int'(b[BEL_W-2:0]) : int'(b[BEL_W-2:0]);
  endfunction

  task automatic ref_cycle(int c, bit count);
    int newT [N];
    bit wr [N];
    int row, deg, j, n, m1, m2, sgn, sel, mag;
    int V [MAX_DEG];
    int VS [MAX_DEG];
    int ntie;
    for (int q = 0; q < N; q++) wr[q] = 1'b0;
    for (int i = 0; i < NB_ROW; i++)
      for (int r = 0; r < R; r++) begin
        row = ((int'(offs[i]) + r * (P / 2) - c) % P + P) % P;
        deg = row_deg(i);
        m1 = 99; m2 = 99; sgn = 0; ntie = 0;
        for (int k = 0; k < deg; k++) begin
          j = col_of(i, k);
          n = j * P + (row + sh(i, j)) % P;
          V[k]  = clampi(T[n] - U[i][k][row], 255);
          VS[k] = clampi(V[k], 31);
          if (count && (V[k] > 31 || V[k] < -31)) cnt_msg_sat++;
          if (VS[k] < 0) sgn ^= 1;
          mag = (VS[k] < 0) ? -VS[k] : VS[k];
          if (mag < m1) begin m2 = m1; m1 = mag; end
          else if (mag < m2) m2 = mag;
        end
        for (int k = 0; k < deg; k++) begin
          mag = (VS[k] < 0) ? -VS[k] : VS[k];
          if (mag == m1) ntie++;
        end
        if (count && ntie > 1) cnt_tie++;
        if (count && r == 1) cnt_rep1++;
        for (int k = 0; k < deg; k++) begin
          j = col_of(i, k);
          n = j * P + (row + sh(i, j)) % P;
          mag = (VS[k] < 0) ? -VS[k] : VS[k];
          sel = (mag == m1) ? m2 : m1;
          sel = (sel >> 1) + (sel >> 2);
          U[i][k][row] = ((sgn ^ int'(VS[k] < 0)) != 0) ? -sel : sel;
          if (count && (V[k] + U[i][k][row] > 255 || V[k] + U[i][k][row] < -255)) cnt_bel_clamp++;
          if (wr[n]) begin
            failures++;
            $display("model: two updates of bit %0d in cycle %0d", n, c);
          end
          wr[n] = 1'b1;
          newT[n] = clampi(V[k] + U[i][k][row], 255);
        end
      end
    for (int q = 0; q < N; q++) if (wr[q]) T[q] = newT[q];
  endtask

  // ---------------- one frame ------------------------------------------
  task automatic run_frame(int amp, int sigma, bit expect_ok);
    int llr, noise, lat, errs_in, errs_out;
    encode();
    checks++;
    if (syndrome_weight() != 0) begin
      failures++;
      $display("encoder produced a non-codeword");
    end
    errs_in = 0;
    for (int n = 0; n < N; n++) begin
      noise = 0;
      for (int q = 0; q < 4; q++) noise += int'($urandom_range(0, 1000));
      noise = ((noise - 2000) * sigma) / 578;
      llr = clampi((cw[n] ? -amp : amp) + noise, 255);
      if ((llr < 0) != cw[n]) errs_in++;
      llr_in[n] = {llr < 0, 8'((llr < 0) ? -llr : llr)};
      T[n] = sm_bel(llr_in[n]);
    end
    for (int i = 0; i < NB_ROW; i++)
      for (int k = 0; k < MAX_DEG; k++)
        for (int x = 0; x < P; x++) U[i][k][x] = 0;
    for (int c = 0; c < P * ITER; c++) ref_cycle(c, 1'b1);

    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(posedge clk);
      lat++;
      #1;
    end
    checks++;
    if (lat != 1 + P * ITER) begin
      failures++;
      $display("latency %0d, expected %0d", lat, 1 + P * ITER);
    end
    @(negedge clk);
    errs_out = 0;
    for (int n = 0; n < N; n++) begin
      checks++;
      if (sm_bel(belief[n]) != T[n] || codeword[n] != (T[n] < 0)) begin
        failures++;
        if (failures < 10)
          $display("bit %0d: belief %0d, model %0d", n, sm_bel(belief[n]), T[n]);
      end
      if (codeword[n] != cw[n]) errs_out++;
    end
    if (expect_ok) begin
      checks++;
      if (errs_out != 0) begin
        failures++;
        $display("frame with sigma %0d: %0d residual errors", sigma, errs_out);
      end
    end
    if (errs_out == 0) cnt_corrected += errs_in;
    $display("P=%0d frame amp=%0d sigma=%0d: channel errors %0d, after decoding %0d",
             P, amp, sigma, errs_in, errs_out);
  endtask

  initial begin
    finished = 1'b0;
    checks = 0;
    failures = 0;
    offs = tap_offsets(P, R);
    for (int n = 0; n < N; n++) llr_in[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    checks++;
    if (busy || done) begin failures++; $display("not idle after reset"); end
    run_frame(20,  0, 1'b1);
    run_frame(16,  8, 1'b1);
    checks += 2;
    if (cnt_msg_sat   == 0) begin failures++; $display("P=%0d: no message saturation seen", P); end
    if (cnt_corrected == 0) begin failures++; $display("P=%0d: no channel error corrected", P); end
    $display("P=%0d N=%0d replicas=%0d: checks %0d failures %0d", P, N, R, checks, failures);
    finished = 1'b1;
  end
endmodule

// Test of a replica super processor for base row 6 (check degree 11), with
// P = 44, two replicas and tap offset K = 3. Random beliefs are applied
// every cycle. The testbench keeps its own table of check-to-bit messages
// per check row: in enabled cycle c replica r works on check row
// (K + r*P/2 - c) mod P, reading the stored messages of that row, and the
// expected new beliefs follow from V = clamp(T - U, 255), scaled min-sum on
// clamp(V, 31), T' = clamp(V + U', 255). Cycles with the enable low must
// leave the stored messages unchanged; INIT clears them.
module tb_super_processor;
  import ldpc_pkg::*;
  localparam int P = 44, R = 2, ROW = 6, K = 3;
  localparam int DEG = 11;

  logic clk = 1'b0, init = 1'b0, en = 1'b0;
  bel_t bel_in [R][MAX_DEG], bel_out [R][MAX_DEG];
  int checks = 0, failures = 0;
  int U [DEG][P];

  super_processor #(.P(P), .REPLICAS(R), .ROW(ROW), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int x, int lim);
    return (x > lim) ? lim : ((x < -lim) ? -lim : x);
  endfunction
  function automatic int bval(bel_t b);
    return b[8] ? -int'(b[7:0]) : int'(b[7:0]);
  endfunction

  initial begin
    int c, row, m1, m2, mag, sel, sgn, t;
    int V [DEG];
    int VS [DEG];
    int Unew [R][DEG];
    int rows [R];
    bel_in = '{default: '0};
    @(negedge clk);
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    for (int k = 0; k < DEG; k++) for (int x = 0; x < P; x++) U[k][x] = 0;
    c = 0;
    for (int step = 0; step < 4 * P; step++) begin
      en = (step % 9 != 4);
      for (int r = 0; r < R; r++)
        for (int k = 0; k < DEG; k++) begin
          // mostly moderate beliefs, some near the clamp
          t = (step % 11 == 0) ? $urandom_range(0, 510) - 255 : $urandom_range(0, 80) - 40;
          bel_in[r][k] = {t < 0, 8'((t < 0) ? -t : t)};
        end
      #1;
      for (int r = 0; r < R; r++) begin
        row = ((K + r * (P / 2) - c) % P + P) % P;
        rows[r] = row;
        m1 = 99; m2 = 99; sgn = 0;
        for (int k = 0; k < DEG; k++) begin
          V[k]  = clampi(bval(bel_in[r][k]) - U[k][row], 255);
          VS[k] = clampi(V[k], 31);
          if (VS[k] < 0) sgn ^= 1;
          mag = (VS[k] < 0) ? -VS[k] : VS[k];
          if (mag < m1) begin m2 = m1; m1 = mag; end
          else if (mag < m2) m2 = mag;
        end
        for (int k = 0; k < DEG; k++) begin
          mag = (VS[k] < 0) ? -VS[k] : VS[k];
          sel = (mag == m1) ? m2 : m1;
          sel = (sel >> 1) + (sel >> 2);
          Unew[r][k] = ((sgn ^ int'(VS[k] < 0)) != 0) ? -sel : sel;
          checks++;
          if (bval(bel_out[r][k]) != clampi(V[k] + Unew[r][k], 255)) begin
            failures++;
            if (failures < 10)
              $display("step %0d replica %0d edge %0d: %0d expected %0d", step, r, k,
                       bval(bel_out[r][k]), clampi(V[k] + Unew[r][k], 255));
          end
        end
      end
      if (en) begin
        for (int r = 0; r < R; r++)
          for (int k = 0; k < DEG; k++) U[k][rows[r]] = Unew[r][k];
        c++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

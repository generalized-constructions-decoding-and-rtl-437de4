// Test of the decoder sequencer with P = 5 and ITER = 3: a start pulse must
// give exactly one INIT cycle, then P*ITER enabled cycles with the row and
// iteration counters stepping as expected, then a one-cycle done pulse; a
// start while busy is ignored and a second block runs the same way.
module tb_decoder_ctrl;
  localparam int P = 5, ITER = 3;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic init, en, busy, done;
  logic [$clog2(P)-1:0] cycle;
  logic [$clog2(ITER+1)-1:0] iter;
  int checks = 0, failures = 0;

  decoder_ctrl #(.P(P), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_block(bit poke_start);
    int n_init, n_en;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    expect_eq(int'(init), 1, "init after start");
    expect_eq(int'(busy), 1, "busy during init");
    n_init = 0;
    n_en = 0;
    @(negedge clk);
    for (int c = 0; c < P * ITER; c++) begin
      if (poke_start && c == 4) start = 1'b1;
      expect_eq(int'(en), 1, "enable");
      expect_eq(int'(init), 0, "init only once");
      expect_eq(int'(cycle), c % P, "row step");
      expect_eq(int'(iter), c / P, "iteration");
      expect_eq(int'(done), 0, "done early");
      @(negedge clk);
      start = 1'b0;
    end
    expect_eq(int'(done), 1, "done pulse");
    expect_eq(int'(en), 0, "enable after the last iteration");
    expect_eq(int'(busy), 0, "idle after the last iteration");
    @(negedge clk);
    expect_eq(int'(done), 0, "done is one cycle");
    expect_eq(int'(init), 0, "stays idle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    expect_eq(int'(busy), 0, "idle in reset");
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    expect_eq(int'(busy), 0, "idle after reset");
    run_block(1'b0);
    repeat (3) @(negedge clk);
    run_block(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

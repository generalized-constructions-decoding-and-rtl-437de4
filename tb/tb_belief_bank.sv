// Test of a belief register bank with P = 44 stages and four taps. A
// behavioural rotating array predicts the tap outputs and all stage
// outputs: INIT loads the channel values, each enabled cycle moves every
// belief one stage on, and the value written at a tap appears at the
// following stage. After P cycles without updates every stage holds its
// loaded value again.
module tb_belief_bank;
  import ldpc_pkg::*;
  localparam int P = 44;
  localparam int MAXT = 8;
  localparam logic [MAXT-1:0][15:0] TAPS = {16'd0, 16'd0, 16'd0, 16'd0, 16'd43, 16'd22, 16'd21, 16'd5};

  logic clk = 1'b0, init = 1'b0, en = 1'b0;
  bel_t load [P], stage_q [P];
  bel_t to_link [MAXT], from_link [MAXT];
  int checks = 0, failures = 0;
  bel_t model [P];

  belief_bank #(.P(P), .MAXT(MAXT), .NTAP(4), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (to_link[n] !== model[int'(TAPS[n])]) begin
        failures++;
        if (failures < 10) $display("%s tap %0d: %h expected %h", what, n, to_link[n], model[int'(TAPS[n])]);
      end
    end
    for (int s = 0; s < P; s++) begin
      checks++;
      if (stage_q[s] !== model[s]) begin
        failures++;
        if (failures < 10) $display("%s stage %0d: %h expected %h", what, s, stage_q[s], model[s]);
      end
    end
  endtask

  initial begin
    bel_t nxt [P];
    from_link = '{default: '0};
    for (int s = 0; s < P; s++) load[s] = bel_t'($urandom);
    @(negedge clk);
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    model = load;
    compare("after load");
    // P cycles of write-back of unchanged values: back to the start.
    en = 1'b1;
    for (int c = 0; c < P; c++) begin
      for (int n = 0; n < 4; n++) from_link[n] = to_link[n];
      @(negedge clk);
    end
    compare("after one rotation");
    for (int c = 0; c < 3 * P; c++) begin
      en = (c % 5 != 2);
      for (int n = 0; n < MAXT; n++) from_link[n] = bel_t'($urandom);
      #1;
      compare("cycle");
      if (en) begin
        for (int s = 0; s < P; s++) nxt[(s + 1) % P] = model[s];
        for (int n = 0; n < 4; n++) nxt[(int'(TAPS[n]) + 1) % P] = from_link[n];
        model = nxt;
      end
      @(negedge clk);
    end
    compare("end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

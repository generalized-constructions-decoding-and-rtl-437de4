// Test of a message register bank with P = 44 stages and two taps (the
// replica configuration). A behavioural rotating array predicts the tap
// outputs: each enabled cycle the contents move one stage, and the value
// written at a tap appears at the following stage. Checks the INIT clear,
// the hold when the enable is low, and a complete rotation in P cycles.
module tb_message_bank;
  import ldpc_pkg::*;
  localparam int P = 44;
  localparam logic [MAX_REP-1:0][15:0] TAPS = {16'd30, 16'd7};

  logic clk = 1'b0, init = 1'b0, en = 1'b0;
  msg_t to_link [2], from_link [2];
  int checks = 0, failures = 0;
  msg_t model [P];

  message_bank #(.P(P), .NTAP(2), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int n = 0; n < 2; n++) begin
      checks++;
      if (to_link[n] !== model[int'(TAPS[n])]) begin
        failures++;
        if (failures < 10) $display("%s tap %0d: %h expected %h", what, n, to_link[n], model[int'(TAPS[n])]);
      end
    end
  endtask

  initial begin
    msg_t nxt [P];
    from_link = '{default: '0};
    @(negedge clk);
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    for (int s = 0; s < P; s++) model[s] = '0;
    compare("after init");
    for (int c = 0; c < 3 * P; c++) begin
      en = (c % 7 != 3);
      for (int n = 0; n < 2; n++) from_link[n] = msg_t'($urandom);
      #1;
      compare("cycle");
      if (en) begin
        for (int s = 0; s < P; s++) nxt[(s + 1) % P] = model[s];
        for (int n = 0; n < 2; n++) nxt[(int'(TAPS[n]) + 1) % P] = from_link[n];
        model = nxt;
      end
      @(negedge clk);
    end
    // Full rotation without writes: the taps see each value again after P cycles.
    en = 1'b1;
    for (int c = 0; c < P; c++) begin
      for (int n = 0; n < 2; n++) from_link[n] = to_link[n];   // write back unchanged
      #1;
      compare("rotate");
      for (int s = 0; s < P; s++) nxt[(s + 1) % P] = model[s];
      model = nxt;
      @(negedge clk);
    end
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    en = 1'b0;
    for (int s = 0; s < P; s++) model[s] = '0;
    for (int c = 0; c < P; c++) begin
      en = 1'b1;
      from_link[0] = to_link[0];
      from_link[1] = to_link[1];
      #1;
      compare("cleared");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Test of Comparator 4:2 (1): all 4-bit input quadruples plus random 5-bit
// ones; min1/min2 must be the two smallest of the four inputs.
module tb_comparator_4_2_full;
  logic [4:0] a, b, c, d, min1, min2;
  int checks = 0, failures = 0;

  comparator_4_2_full #(.W(5)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int w, int x, int y, int z);
    int v [4];
    int t;
    a = 5'(w); b = 5'(x); c = 5'(y); d = 5'(z);
    #1;
    v = '{w, x, y, z};
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 3 - i; j++)
        if (v[j] > v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
    checks++;
    if (int'(min1) != v[0] || int'(min2) != v[1]) begin
      failures++;
      if (failures < 10) $display("%0d %0d %0d %0d -> %0d %0d", w, x, y, z, min1, min2);
    end
  endtask

  initial begin
    for (int w = 0; w < 16; w++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++)
          for (int z = 0; z < 16; z++) check(w, x, y, z);
    repeat (20000)
      check($urandom_range(0, 31), $urandom_range(0, 31), $urandom_range(0, 31), $urandom_range(0, 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

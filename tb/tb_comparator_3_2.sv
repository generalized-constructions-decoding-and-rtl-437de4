// Exhaustive test of Comparator 3:2 over all 5-bit input triples: min1 must
// be the smallest input and min2 the second smallest (a value equal to the
// minimum counts when it occurs twice).
module tb_comparator_3_2;
  logic [4:0] a, b, c, min1, min2;
  int checks = 0, failures = 0;

  comparator_3_2 #(.W(5)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [3];
    int e1, e2, t;
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int z = 0; z < 32; z++) begin
          a = 5'(x); b = 5'(y); c = 5'(z);
          #1;
          v = '{x, y, z};
          // sort the three values
          if (v[0] > v[1]) begin t = v[0]; v[0] = v[1]; v[1] = t; end
          if (v[1] > v[2]) begin t = v[1]; v[1] = v[2]; v[2] = t; end
          if (v[0] > v[1]) begin t = v[0]; v[0] = v[1]; v[1] = t; end
          e1 = v[0]; e2 = v[1];
          checks++;
          if (int'(min1) != e1 || int'(min2) != e2) begin
            failures++;
            if (failures < 10) $display("a=%0d b=%0d c=%0d -> %0d %0d, expected %0d %0d", x, y, z, min1, min2, e1, e2);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

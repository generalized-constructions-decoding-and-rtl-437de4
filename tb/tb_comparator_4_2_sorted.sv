// Exhaustive test of Comparator 4:2 (2) over all ordered 5-bit pairs
// (a0 <= a1, b0 <= b1): min1/min2 must be the two smallest of the four.
module tb_comparator_4_2_sorted;
  logic [4:0] a0, a1, b0, b1, min1, min2;
  int checks = 0, failures = 0;

  comparator_4_2_sorted #(.W(5)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [4];
    int t;
    for (int w = 0; w < 32; w++)
      for (int x = w; x < 32; x++)
        for (int y = 0; y < 32; y++)
          for (int z = y; z < 32; z++) begin
            a0 = 5'(w); a1 = 5'(x); b0 = 5'(y); b1 = 5'(z);
            #1;
            v = '{w, x, y, z};
            for (int i = 0; i < 4; i++)
              for (int j = 0; j < 3 - i; j++)
                if (v[j] > v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
            checks++;
            if (int'(min1) != v[0] || int'(min2) != v[1]) begin
              failures++;
              if (failures < 10) $display("%0d %0d | %0d %0d -> %0d %0d", w, x, y, z, min1, min2);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

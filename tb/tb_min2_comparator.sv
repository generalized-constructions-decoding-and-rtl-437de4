// Test of the 10-input and 11-input 2-output comparators with random
// magnitude vectors, including vectors drawn from a narrow range so that
// equal values are frequent. The expected minimum and second minimum come
// from a full sort of the inputs.
module tb_min2_comparator;
  logic [4:0] m10 [10];
  logic [4:0] m11 [11];
  logic [4:0] a1, a2, b1, b2;
  int checks = 0, failures = 0;

  min2_comparator #(.DEG(10), .W(5)) dut10 (.mag(m10), .min1(a1), .min2(a2));
  min2_comparator #(.DEG(11), .W(5)) dut11 (.mag(m11), .min1(b1), .min2(b2));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void two_smallest(int v [], output int s1, output int s2);
    int q [$];
    foreach (v[i]) q.push_back(v[i]);
    q.sort();
    s1 = q[0];
    s2 = q[1];
  endfunction

  initial begin
    int v10 [], v11 [];
    int e1, e2, hi;
    v10 = new[10];
    v11 = new[11];
    for (int it = 0; it < 40000; it++) begin
      hi = (it % 2 == 0) ? 31 : 3;
      foreach (v10[i]) begin v10[i] = $urandom_range(0, hi); m10[i] = 5'(v10[i]); end
      foreach (v11[i]) begin v11[i] = $urandom_range(0, hi); m11[i] = 5'(v11[i]); end
      #1;
      two_smallest(v10, e1, e2);
      checks++;
      if (int'(a1) != e1 || int'(a2) != e2) begin
        failures++;
        if (failures < 10) $display("deg10: got %0d %0d, expected %0d %0d", a1, a2, e1, e2);
      end
      two_smallest(v11, e1, e2);
      checks++;
      if (int'(b1) != e1 || int'(b2) != e2) begin
        failures++;
        if (failures < 10) $display("deg11: got %0d %0d, expected %0d %0d", b1, b2, e1, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

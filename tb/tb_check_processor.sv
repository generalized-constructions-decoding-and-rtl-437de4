// Test of the check processor for check degrees 10 and 11 with random
// sign-magnitude bit-to-check messages. For each output n the expected value
// is computed directly from its definition: the product of the signs of the
// other inputs times floor(0.75 * min of the other magnitudes), where
// floor(0.75 x) is formed as (x >> 1) + (x >> 2).
module tb_check_processor;
  import ldpc_pkg::*;
  msg_t v10 [10], u10 [10];
  msg_t v11 [11], u11 [11];
  int checks = 0, failures = 0;

  check_processor #(.DEG(10)) dut10 (.v(v10), .u(u10));
  check_processor #(.DEG(11)) dut11 (.v(v11), .u(u11));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic msg_t expect_out(msg_t v [], int n);
    int mn = 1000;
    bit s = 1'b0;
    int m;
    foreach (v[q]) if (q != n) begin
      s ^= v[q][MSG_W-1];
      if (int'(v[q][MAG_W-1:0]) < mn) mn = int'(v[q][MAG_W-1:0]);
    end
    m = (mn >> 1) + (mn >> 2);
    return {s, 5'(m)};
  endfunction

  initial begin
    msg_t d10 [], d11 [];
    int hi;
    d10 = new[10];
    d11 = new[11];
    for (int it = 0; it < 20000; it++) begin
      hi = (it % 3 == 0) ? 4 : 31;
      foreach (d10[i]) begin d10[i] = {1'($urandom), 5'($urandom_range(0, hi))}; v10[i] = d10[i]; end
      foreach (d11[i]) begin d11[i] = {1'($urandom), 5'($urandom_range(0, hi))}; v11[i] = d11[i]; end
      #1;
      for (int n = 0; n < 10; n++) begin
        checks++;
        if (u10[n] !== expect_out(d10, n)) begin
          failures++;
          if (failures < 10) $display("deg10 out %0d: %h expected %h", n, u10[n], expect_out(d10, n));
        end
      end
      for (int n = 0; n < 11; n++) begin
        checks++;
        if (u11[n] !== expect_out(d11, n)) begin
          failures++;
          if (failures < 10) $display("deg11 out %0d: %h expected %h", n, u11[n], expect_out(d11, n));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

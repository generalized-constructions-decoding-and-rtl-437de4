// Test of the link processor over random and corner-case sign-magnitude
// inputs. Expected values, computed with integers: V = clamp(T - U_old, 255),
// v2c = clamp(V, 31), belief_out = clamp(V + U_new, 255), msg_new = U_new.
module tb_link_processor;
  import ldpc_pkg::*;
  bel_t belief_in, belief_out;
  msg_t msg_old, v2c, c2v, msg_new;
  int checks = 0, failures = 0;

  link_processor dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int x, int lim);
    return (x > lim) ? lim : ((x < -lim) ? -lim : x);
  endfunction
  function automatic int val(logic [15:0] x, int w);
    int m = int'(x[14:0]) & ((1 << (w - 1)) - 1);
    return x[w-1] ? -m : m;
  endfunction

  task automatic check(bel_t t, msg_t uo, msg_t un);
    int v, vs, tn;
    belief_in = t; msg_old = uo; c2v = un;
    #1;
    v  = clampi(val(16'(t), 9) - val(16'(uo), 6), 255);
    vs = clampi(v, 31);
    tn = clampi(v + val(16'(un), 6), 255);
    checks += 3;
    if (val(16'(v2c), 6) != vs || (vs == 0 && v2c[5])) begin
      failures++;
      if (failures < 10) $display("v2c %0d expected %0d (T=%0d U=%0d)", val(16'(v2c), 6), vs, val(16'(t), 9), val(16'(uo), 6));
    end
    if (val(16'(belief_out), 9) != tn || (tn == 0 && belief_out[8])) begin
      failures++;
      if (failures < 10) $display("belief %0d expected %0d", val(16'(belief_out), 9), tn);
    end
    if (msg_new !== un) failures++;
  endtask

  initial begin
    // corners: largest beliefs against largest messages of both signs
    check(9'h0FF, 6'h3F, 6'h3F);
    check(9'h1FF, 6'h1F, 6'h1F);
    check(9'h0FF, 6'h1F, 6'h1F);
    check(9'h100, 6'h20, 6'h00);
    check(9'h000, 6'h3F, 6'h21);
    repeat (50000) check(9'($urandom), 6'($urandom), 6'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

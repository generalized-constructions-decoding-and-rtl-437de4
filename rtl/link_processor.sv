// Link processor: the bit-side arithmetic of one edge of the Tanner graph.
//
// Forward direction: V = T - U_old, the belief T (9-bit) minus the stored
// check-to-bit message U_old (6-bit, sign-extended to 9 bits). The 9-bit V
// is limited to a 5-bit magnitude (saturation) and sent to the check
// processor as the 6-bit bit-to-check message.
// Return direction: the new check-to-bit message U_new from the check
// processor is extended to 9 bits and added to the unsaturated V, giving the
// new belief T' = V + U_new ("total sum first" update). U_new is also
// forwarded to the message register bank.
// All words are sign-magnitude (bit 0 of the sign = positive LLR), as in the
// source design. The arithmetic is done by converting to two's complement and
// back. Clamping V and T' to the 9-bit range (magnitude 255) is this design's
// choice. Combinational: everything settles within the decoding cycle.
module link_processor
  import ldpc_pkg::*;
(
  input  bel_t belief_in,   // T from the belief register bank
  input  msg_t msg_old,     // U_old from the message register bank
  output msg_t v2c,         // saturated V to the check processor
  input  msg_t c2v,         // U_new from the check processor
  output msg_t msg_new,     // U_new to the message register bank
  output bel_t belief_out   // T' back to the belief register bank
);

  typedef logic signed [BEL_W+1:0] acc_t;          // room for 255 + 255
  localparam acc_t BMAX = acc_t'((1 << (BEL_W - 1)) - 1);   // 255
  localparam acc_t MMAX = acc_t'((1 << (MSG_W - 1)) - 1);   // 31

  function automatic acc_t from_bel(bel_t x);
    acc_t m = acc_t'(x[BEL_W-2:0]);
    return x[BEL_W-1] ? -m : m;
  endfunction

  function automatic acc_t from_msg(msg_t x);
    acc_t m = acc_t'(x[MSG_W-2:0]);
    return x[MSG_W-1] ? -m : m;
  endfunction

  function automatic acc_t clamp(acc_t x, acc_t lim);
    if (x >  lim) return lim;
    if (x < -lim) return -lim;
    return x;
  endfunction

  acc_t v, v_sat, t_new, v_mag, t_mag;

  // Forward path: belief minus old message, saturated toward the check.
  always_comb begin
    v     = clamp(from_bel(belief_in) - from_msg(msg_old), BMAX);
    v_sat = clamp(v, MMAX);
    v_mag = (v_sat < 0) ? -v_sat : v_sat;
    v2c   = {v_sat < 0, v_mag[MSG_W-2:0]};
  end

  // Return path: new belief from the unsaturated V and the new message.
  always_comb begin
    t_new      = clamp(v + from_msg(c2v), BMAX);
    t_mag      = (t_new < 0) ? -t_new : t_new;
    belief_out = {t_new < 0, t_mag[BEL_W-2:0]};
  end

  assign msg_new = c2v;
endmodule

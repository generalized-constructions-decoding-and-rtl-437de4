// Check processor: normalized BP-based (scaled min-sum) check-node update.
//
// For every edge n of a check of degree DEG it produces
//   U_n = gamma * prod_{n' != n} sgn(V_n') * min_{n' != n} |V_n'|,  gamma = 0.75.
// Signs and magnitudes of the sign-magnitude inputs are split. The
// magnitudes feed a min2_comparator; each output then takes the second
// minimum if its own input magnitude equals the minimum, otherwise the
// minimum (the multiplexer of the source design). The selected value x is
// scaled as (x >> 1) + (x >> 2), which is 0.75 * x rounded down. Signs (1 =
// negative) are XORed together, and XORing the total with an input's own
// sign removes it from the product. Everything follows the source design.
// Combinational: outputs are valid in the same cycle as the inputs.
module check_processor
  import ldpc_pkg::*;
#(
  parameter int DEG = 10
) (
  input  msg_t v [DEG],   // bit-to-check messages
  output msg_t u [DEG]    // check-to-bit messages
);
  mag_t mag [DEG];
  mag_t min1, min2;
  logic sign_all;

  always_comb begin
    sign_all = 1'b0;
    for (int n = 0; n < DEG; n++) begin
      mag[n]   = v[n][MAG_W-1:0];
      sign_all = sign_all ^ v[n][MSG_W-1];
    end
  end

  min2_comparator #(.DEG(DEG), .W(MAG_W)) u_min (.mag(mag), .min1(min1), .min2(min2));

  always_comb begin
    mag_t sel;
    for (int n = 0; n < DEG; n++) begin
      sel  = (mag[n] == min1) ? min2 : min1;
      u[n] = {sign_all ^ v[n][MSG_W-1], (sel >> 1) + (sel >> 2)};
    end
  end
endmodule

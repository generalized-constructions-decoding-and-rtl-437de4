// Multi-input 2-output comparator: smallest and second-smallest of the DEG
// message magnitudes entering a check processor (DEG = 10 or 11).
//
// Three-stage cascade, as in the source design:
//   stage 1  the inputs split into three groups, 3/3/4 for DEG = 10 and
//            3/4/4 for DEG = 11; a group of three goes to a Comparator 3:2,
//            a group of four to a Comparator 4:2 (1);
//   stage 2  two Comparator 3:2 units, one on the two results of the first
//            group plus the minimum of the second, one on the second
//            minimum of the second group plus the two results of the third;
//   stage 3  a Comparator 4:2 (2) merges the two ordered pairs.
// Each stage-2 unit sees a subset that holds the two smallest of its half,
// so the final pair is the overall minimum and second minimum. The exact
// routing between stages is read from the block diagrams of the source
// design. Combinational.
module min2_comparator #(
  parameter int DEG = 10,
  parameter int W   = 5
) (
  input  logic [W-1:0] mag [DEG],
  output logic [W-1:0] min1,
  output logic [W-1:0] min2
);
  logic [W-1:0] g0_m1, g0_m2, g1_m1, g1_m2, g2_m1, g2_m2;
  logic [W-1:0] s_m1, s_m2, t_m1, t_m2;

  // Stage 1, group 0: always three inputs.
  comparator_3_2 #(.W(W)) u_g0 (.a(mag[0]), .b(mag[1]), .c(mag[2]), .min1(g0_m1), .min2(g0_m2));

  if (DEG == 10) begin : g_deg10
    comparator_3_2 #(.W(W)) u_g1 (
      .a(mag[3]), .b(mag[4]), .c(mag[5]), .min1(g1_m1), .min2(g1_m2));
    comparator_4_2_full #(.W(W)) u_g2 (
      .a(mag[6]), .b(mag[7]), .c(mag[8]), .d(mag[9]), .min1(g2_m1), .min2(g2_m2));
  end else if (DEG == 11) begin : g_deg11
    comparator_4_2_full #(.W(W)) u_g1 (
      .a(mag[3]), .b(mag[4]), .c(mag[5]), .d(mag[6]), .min1(g1_m1), .min2(g1_m2));
    comparator_4_2_full #(.W(W)) u_g2 (
      .a(mag[7]), .b(mag[8]), .c(mag[9]), .d(mag[10]), .min1(g2_m1), .min2(g2_m2));
  end else begin : g_bad_deg
    $error("min2_comparator supports DEG = 10 or 11 only");
  end

  // Stage 2.
  comparator_3_2 #(.W(W)) u_s (.a(g0_m1), .b(g0_m2), .c(g1_m1), .min1(s_m1), .min2(s_m2));
  comparator_3_2 #(.W(W)) u_t (.a(g1_m2), .b(g2_m1), .c(g2_m2), .min1(t_m1), .min2(t_m2));

  // Stage 3.
  comparator_4_2_sorted #(.W(W)) u_f (
    .a0(s_m1), .a1(s_m2), .b0(t_m1), .b1(t_m2), .min1(min1), .min2(min2));
endmodule

// Comparator 4:2 (2): smallest and second-smallest of two pairs whose order
// inside each pair is already known (a0 <= a1, b0 <= b1).
//
// Because each pair arrives sorted from the previous comparator stage, only
// the four cross comparisons are needed (two fewer than Comparator 4:2 (1)),
// as in the source design. The four result bits rank the inputs (pair a wins
// ties) and a multiplexer forwards the two smallest. Combinational.
module comparator_4_2_sorted #(
  parameter int W = 5
) (
  input  logic [W-1:0] a0,   // smaller of pair a
  input  logic [W-1:0] a1,   // larger of pair a
  input  logic [W-1:0] b0,   // smaller of pair b
  input  logic [W-1:0] b1,   // larger of pair b
  output logic [W-1:0] min1,
  output logic [W-1:0] min2
);
  logic b0_a0, b0_a1, b1_a0, b1_a1;   // bX_aY: bX < aY
  logic [1:0] r_a0, r_a1, r_b0;

  always_comb begin
    b0_a0 = b0 < a0;
    b0_a1 = b0 < a1;
    b1_a0 = b1 < a0;
    b1_a1 = b1 < a1;
    r_a0 = 2'(b0_a0) + 2'(b1_a0);
    r_a1 = 2'd1 + 2'(b0_a1) + 2'(b1_a1);
    r_b0 = 2'(!b0_a0) + 2'(!b0_a1);
    min1 = (r_a0 == 2'd0) ? a0 : b0;
    if      (r_a0 == 2'd1) min2 = a0;
    else if (r_a1 == 2'd1) min2 = a1;
    else if (r_b0 == 2'd1) min2 = b0;
    else                   min2 = b1;
  end
endmodule

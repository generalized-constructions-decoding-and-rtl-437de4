// Comparator 3:2: smallest and second-smallest of three magnitudes.
//
// Three "<" comparisons (a<b, a<c, b<c) run in parallel and their three
// result bits steer a multiplexer that picks the minimum and the second
// minimum from the three data inputs, as in the source design. Ties are
// resolved toward the earlier input, which does not change either output
// value. Purely combinational; the outputs follow the inputs in the same
// cycle.
module comparator_3_2 #(
  parameter int W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] min1,
  output logic [W-1:0] min2
);
  logic ab, ac, bc;

  always_comb begin
    ab = a < b;
    ac = a < c;
    bc = b < c;
    // Full decision from the three comparison bits.
    if (ab) begin
      if (ac) begin min1 = a; min2 = bc ? b : c; end
      else    begin min1 = c; min2 = a;          end
    end else begin
      if (bc) begin min1 = b; min2 = ac ? a : c; end
      else    begin min1 = c; min2 = b;          end
    end
  end
endmodule

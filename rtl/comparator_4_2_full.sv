// Comparator 4:2 (1): smallest and second-smallest of four unordered
// magnitudes.
//
// All six pairs are compared in parallel with "<" comparators, as in the
// source design. From the six result bits each input gets a rank (how many
// inputs precede it, ties going to the lower input index), and a
// multiplexer forwards the inputs of rank 0 and rank 1. The rank encoding of
// the multiplexer select is this design's choice. Combinational.
module comparator_4_2_full #(
  parameter int W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] min1,
  output logic [W-1:0] min2
);
  logic [W-1:0] x [4];
  logic [1:0]   rank [4];
  logic         lt [4][4];   // lt[i][j]: x[j] < x[i], for j < i the six comparators

  always_comb begin
    x[0] = a; x[1] = b; x[2] = c; x[3] = d;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        lt[i][j] = 1'b0;
    for (int i = 1; i < 4; i++)
      for (int j = 0; j < i; j++)
        lt[i][j] = x[i] < x[j];     // later input strictly smaller
    for (int i = 0; i < 4; i++) begin
      rank[i] = '0;
      for (int j = 0; j < 4; j++) begin
        if (j < i && !lt[i][j]) rank[i] = rank[i] + 2'd1;  // earlier input, not larger
        if (j > i &&  lt[j][i]) rank[i] = rank[i] + 2'd1;  // later input, strictly smaller
      end
    end
    min1 = '0;
    min2 = '0;
    for (int i = 0; i < 4; i++) begin
      if (rank[i] == 2'd0) min1 = x[i];
      if (rank[i] == 2'd1) min2 = x[i];
    end
  end
endmodule

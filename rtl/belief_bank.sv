// Bank of belief registers: the P a-posteriori LLRs (beliefs) of the bits of
// one base-matrix column, kept in a circular shift register.
//
// Every enabled cycle each stage s passes its belief to stage s+1 (stage
// P-1 wraps to stage 0). A link processor of a (replica) super processor is
// tied to stage TAPS[n]: it reads that stage on to_link[n] and its updated
// belief from_link[n] enters stage TAPS[n]+1 in place of the shifted value.
// Taps must be distinct, so no two link processors touch the same belief in
// a cycle. INIT loads the channel LLRs of a new block into all stages, as in
// the source design; the enable input is this design's addition. After a
// multiple of P enabled cycles stage s again holds bit s of the column,
// which is what the stage outputs expose.
module belief_bank
  import ldpc_pkg::*;
#(
  parameter int P     = 44,
  parameter int MAXT  = 8,   // width of the tap list
  parameter int NTAP  = 1,   // taps in use (<= MAXT)
  parameter logic [MAXT-1:0][15:0] TAPS = '0
) (
  input  logic clk,
  input  logic init,
  input  logic en,
  input  bel_t load      [P],      // channel LLRs, taken when init = 1
  output bel_t stage_q   [P],      // all stages
  output bel_t to_link   [MAXT],
  input  bel_t from_link [MAXT]
);
  bel_t stage [P];

  always_comb begin
    stage_q = stage;
    for (int n = 0; n < MAXT; n++)
      to_link[n] = (n < NTAP) ? stage[int'(TAPS[n])] : '0;
  end

  always_ff @(posedge clk) begin
    if (init) begin
      stage <= load;
    end else if (en) begin
      for (int s = 0; s < P; s++) stage[(s + 1) % P] <= stage[s];
      for (int n = 0; n < NTAP; n++) stage[(int'(TAPS[n]) + 1) % P] <= from_link[n];
    end
  end

  initial begin
    assert (NTAP >= 1 && NTAP <= MAXT) else $error("belief_bank: bad NTAP");
    for (int n = 0; n < NTAP; n++) begin
      assert (int'(TAPS[n]) < P) else $error("belief_bank: tap outside the bank");
      for (int m = 0; m < n; m++)
        assert (TAPS[n] != TAPS[m]) else $error("belief_bank: two links on one stage");
    end
  end
endmodule

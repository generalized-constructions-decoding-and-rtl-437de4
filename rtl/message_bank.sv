// Bank of message registers: the P check-to-bit messages of one circulant
// block of the parity-check matrix, kept in a circular shift register.
//
// Every enabled cycle each stage s passes its message to stage s+1 (stage
// P-1 wraps to stage 0), so the messages circulate past fixed taps. At a tap
// placed at stage TAPS[n] the stage's content leaves on to_link[n] and the
// link processor's updated message from_link[n] enters stage TAPS[n]+1 in
// place of the shifted value. With one sub-decoder there is one tap, with
// two replica sub-decoders there are two. INIT is a synchronous clear of all
// stages (all messages zero), as in the source design; the enable input that
// freezes the bank between blocks is this design's addition.
module message_bank
  import ldpc_pkg::*;
#(
  parameter int P    = 44,
  parameter int NTAP = 1,
  parameter logic [MAX_REP-1:0][15:0] TAPS = '0   // stage of tap n in TAPS[n]
) (
  input  logic clk,
  input  logic init,
  input  logic en,
  output msg_t to_link   [NTAP],
  input  msg_t from_link [NTAP]
);
  msg_t stage [P];

  always_comb
    for (int n = 0; n < NTAP; n++) to_link[n] = stage[int'(TAPS[n])];

  always_ff @(posedge clk) begin
    if (init) begin
      for (int s = 0; s < P; s++) stage[s] <= '0;
    end else if (en) begin
      for (int s = 0; s < P; s++) stage[(s + 1) % P] <= stage[s];
      for (int n = 0; n < NTAP; n++) stage[(int'(TAPS[n]) + 1) % P] <= from_link[n];
    end
  end

  initial begin
    assert (NTAP >= 1 && NTAP <= MAX_REP) else $error("message_bank: bad NTAP");
    for (int n = 0; n < NTAP; n++)
      assert (int'(TAPS[n]) < P) else $error("message_bank: tap outside the bank");
  end
endmodule

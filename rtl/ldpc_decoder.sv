// Horizontal group replica-shuffled normalized BP-based (scaled min-sum)
// LDPC decoder for the rate-2/3 IEEE 802.16e code, length N = 24*P
// (N = 1056 for the default P = 44).
//
// Structure (as in the source design): 24 belief register banks, one per
// base-matrix column, each a circular shift register of P 9-bit beliefs, and
// 8 super processors, one per base-matrix row. Super processor i is wired to
// bank j whenever base entry (i, j) is not -1. Each cycle every replica of
// every super processor updates one check row: its link processors compute
// V = T - U, its check processor computes the new messages, and the link
// processors write T' = V + U' back into the belief banks. Since the banks
// rotate one stage per cycle, a fixed tap on stage (shift + k) walks through
// the P rows of the circulant in P cycles, so one iteration takes P cycles.
// The tap offsets k come from ldpc_pkg::tap_offsets, a conflict-free choice
// of this design. REPLICAS = 2 gives the two-sub-decoder replica decoder
// (every check row is updated twice per iteration, by two replicas working
// half a circulant apart); REPLICAS = 1 gives the plain group-shuffled one.
//
// Interface: pulse start with the block's channel LLRs on llr_in (bit n at
// llr_in[n], sign-magnitude, sign 1 = bit more likely 1). One cycle later
// decoding starts; done pulses after ITER*P more cycles, and codeword /
// belief then hold the hard decisions and beliefs until the next start.
// Latency 1 + ITER*P cycles, throughput N*R*f/(P*ITER) as in the source
// design (no overlap of input loading with decoding).
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int P        = 44,
  parameter int REPLICAS = 2,
  parameter int ITER     = 10,
  localparam int N       = NB_COL * P
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  bel_t         llr_in   [N],
  output logic         busy,
  output logic         done,
  output logic [N-1:0] codeword,
  output bel_t         belief   [N]
);
  localparam offs_t OFFS = tap_offsets(P, REPLICAS);

  logic init, en;

  decoder_ctrl #(.P(P), .ITER(ITER)) u_ctrl (
    .clk, .rst_n, .start, .init, .en, .busy, .done, .cycle(), .iter());

  // Belief bank side of every connection.
  bel_t bk_out [NB_COL][MAX_TAPS];
  bel_t bk_in  [NB_COL][MAX_TAPS];
  // Super processor side.
  bel_t sp_in  [NB_ROW][REPLICAS][MAX_DEG];
  bel_t sp_out [NB_ROW][REPLICAS][MAX_DEG];

  for (genvar j = 0; j < NB_COL; j++) begin : g_col
    bel_t ld [P];
    bel_t st [P];
    for (genvar s = 0; s < P; s++) begin : g_bit
      assign ld[s]          = llr_in[j*P + s];
      assign belief[j*P + s] = st[s];
      assign codeword[j*P + s] = hard_bit(st[s]);
    end
    belief_bank #(
      .P(P), .MAXT(MAX_TAPS), .NTAP(col_deg(j) * REPLICAS),
      .TAPS(bank_taps(j, P, REPLICAS, OFFS))
    ) u_bank (
      .clk, .init, .en, .load(ld), .stage_q(st), .to_link(bk_out[j]), .from_link(bk_in[j]));
    for (genvar n = col_deg(j) * REPLICAS; n < MAX_TAPS; n++) begin : g_idle
      assign bk_in[j][n] = '0;
    end
  end

  for (genvar i = 0; i < NB_ROW; i++) begin : g_row
    super_processor #(.P(P), .REPLICAS(REPLICAS), .ROW(i), .K(int'(OFFS[i]))) u_sp (
      .clk, .init, .en, .bel_in(sp_in[i]), .bel_out(sp_out[i]));
    for (genvar r = 0; r < REPLICAS; r++) begin : g_rep
      for (genvar k = 0; k < MAX_DEG; k++) begin : g_edge
        if (k < row_deg(i)) begin : g_used
          localparam int J  = col_of(i, k);
          localparam int TI = tap_index(J, i, r, REPLICAS);
          assign sp_in[i][r][k] = bk_out[J][TI];
          assign bk_in[J][TI]   = sp_out[i][r][k];
        end else begin : g_unused
          assign sp_in[i][r][k] = '0;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < NB_ROW; i++)
      assert (OFFS[i] != 16'hFFFF)
        else $error("ldpc_decoder: no conflict-free tap placement for this P");
  end
endmodule

// (Replica) super processor: processes one check row of base-matrix row ROW
// per cycle for each replica sub-decoder.
//
// It holds REPLICAS check processors, one link processor per edge and
// replica, and one message register bank per non-zero block of the row
// (DEG banks). With REPLICAS = 1 this is the super processor of the plain
// group-shuffled decoder; with REPLICAS = 2 it is the replica super processor
// of the source design: the check and link processors are doubled while the
// message banks stay the same and gain a second tap. Replica r reads its
// message banks at stage (K + r*P/2) mod P, so the two replicas work on check
// rows half a circulant apart in the same cycle (the half-circulant spacing is
// this design's choice).
//
// Timing: one check row per replica per enabled cycle. Beliefs arrive on
// bel_in from the belief banks, and the updated beliefs on bel_out and the
// new messages are taken by the banks at the next clock edge, so a row
// update completes in one cycle. Slots DEG..MAX_DEG-1 of the ports are
// unused and bel_out drives zero there.
module super_processor
  import ldpc_pkg::*;
#(
  parameter int P        = 44,
  parameter int REPLICAS = 2,
  parameter int ROW      = 0,
  parameter int K        = 0,   // tap offset of replica 0, see ldpc_pkg::tap_offsets
  parameter int DEG      = row_deg(ROW)
) (
  input  logic clk,
  input  logic init,
  input  logic en,
  input  bel_t bel_in  [REPLICAS][MAX_DEG],
  output bel_t bel_out [REPLICAS][MAX_DEG]
);
  localparam logic [MAX_REP-1:0][15:0] MSG_TAPS = {16'(msg_stage(K, 1, P)), 16'(msg_stage(K, 0, P))};

  msg_t m_old [DEG][REPLICAS];   // message bank k, tap r
  msg_t m_new [DEG][REPLICAS];
  msg_t v2c   [REPLICAS][DEG];
  msg_t c2v   [REPLICAS][DEG];

  for (genvar k = 0; k < DEG; k++) begin : g_bank
    message_bank #(.P(P), .NTAP(REPLICAS), .TAPS(MSG_TAPS)) u_bank (
      .clk, .init, .en, .to_link(m_old[k]), .from_link(m_new[k]));
  end

  for (genvar r = 0; r < REPLICAS; r++) begin : g_rep
    check_processor #(.DEG(DEG)) u_cp (.v(v2c[r]), .u(c2v[r]));
    for (genvar k = 0; k < MAX_DEG; k++) begin : g_link
      if (k < DEG) begin : g_used
        link_processor u_lp (
          .belief_in (bel_in[r][k]),
          .msg_old   (m_old[k][r]),
          .v2c       (v2c[r][k]),
          .c2v       (c2v[r][k]),
          .msg_new   (m_new[k][r]),
          .belief_out(bel_out[r][k]));
      end else begin : g_unused
        assign bel_out[r][k] = '0;
      end
    end
  end

  initial assert (REPLICAS >= 1 && REPLICAS <= MAX_REP)
    else $error("super_processor: REPLICAS must be 1 or 2");
endmodule

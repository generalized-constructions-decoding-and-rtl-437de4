// Shared types, constants and elaboration-time helpers of the quasi-cyclic
// LDPC decoder.
//
// The code is the rate-2/3 ("B") code of IEEE 802.16e: a 8 x 24 base matrix
// whose entries are -1 (a p x p zero block) or a shift value t (the p x p
// identity rotated right by t). The base matrix and the word widths (6-bit
// messages, 9-bit beliefs, sign-magnitude, gamma = 0.75) follow the source
// design. The rule that scales the printed shifts (defined for p = 96) down to
// another expansion factor, floor(t * p / 96), is taken from the 802.16e
// standard. The placement of the link-processor taps on the shift registers
// (function tap_offsets) is a conflict-free greedy choice made by this
// design; any placement without collisions decodes correctly.
//
// Everything here is evaluated at elaboration time; nothing is clocked.
package ldpc_pkg;

  localparam int NB_ROW  = 8;   // base-matrix rows (check block-rows)
  localparam int NB_COL  = 24;  // base-matrix columns (belief banks)
  localparam int Z0      = 96;  // expansion factor the printed shifts are given for
  localparam int MAX_DEG = 11;  // largest row weight of the base matrix
  localparam int MSG_W   = 6;   // check-to-bit / bit-to-check message width
  localparam int BEL_W   = 9;   // belief (a-posteriori LLR) width
  localparam int MAG_W   = MSG_W - 1;
  localparam int MAX_REP = 2;   // replica sub-decoders supported by tap_offsets
  localparam int MAX_P   = 256; // largest expansion factor tap_offsets handles

  // Sign-magnitude words: bit [W-1] is the sign (1 = negative LLR).
  typedef logic [MSG_W-1:0] msg_t;
  typedef logic [BEL_W-1:0] bel_t;
  typedef logic [MAG_W-1:0] mag_t;

  // Base matrix of the rate-2/3 B code (shifts for p = 96, -1 = zero block).
  typedef int base_row_t [NB_COL];
  typedef base_row_t base_t [NB_ROW];
  localparam base_t BASE = '{
    '{ 2, -1, 19, -1, 47, -1, 48, -1, 36, -1, 82, -1, 47, -1, 15, -1, 95,  0, -1, -1, -1, -1, -1, -1},
    '{-1, 69, -1, 88, -1, 33, -1,  3, -1, 16, -1, 37, -1, 40, -1, 48, -1,  0,  0, -1, -1, -1, -1, -1},
    '{10, -1, 86, -1, 62, -1, 28, -1, 85, -1, 16, -1, 34, -1, 73, -1, -1, -1,  0,  0, -1, -1, -1, -1},
    '{-1, 28, -1, 32, -1, 81, -1, 27, -1, 88, -1,  5, -1, 56, -1, 37, -1, -1, -1,  0,  0, -1, -1, -1},
    '{23, -1, 29, -1, 15, -1, 30, -1, 66, -1, 24, -1, 50, -1, 62, -1, -1, -1, -1, -1,  0,  0, -1, -1},
    '{-1, 30, -1, 65, -1, 54, -1, 14, -1,  0, -1, 30, -1, 74, -1,  0, -1, -1, -1, -1, -1,  0,  0, -1},
    '{32, -1,  0, -1, 15, -1, 56, -1, 85, -1,  5, -1,  6, -1, 52, -1,  0, -1, -1, -1, -1, -1,  0,  0},
    '{-1,  0, -1, 47, -1, 13, -1, 61, -1, 84, -1, 55, -1, 78, -1, 41, 95, -1, -1, -1, -1, -1, -1,  0}
  };

  // Shift of block (i, j) for expansion factor p, or -1 for a zero block.
  function automatic int shift_of(int i, int j, int p);
    if (BASE[i][j] < 0) return -1;
    return (BASE[i][j] * p) / Z0;
  endfunction

  // Number of non-zero blocks in base row i (the check degree).
  function automatic int row_deg(int i);
    int d = 0;
    for (int j = 0; j < NB_COL; j++) if (BASE[i][j] >= 0) d++;
    return d;
  endfunction

  // Base column of the k-th non-zero block of row i.
  function automatic int col_of(int i, int k);
    int d = 0;
    for (int j = 0; j < NB_COL; j++)
      if (BASE[i][j] >= 0) begin
        if (d == k) return j;
        d++;
      end
    return -1;
  endfunction

  // Position of column j among the non-zero blocks of row i (-1 if none).
  function automatic int slot_of(int i, int j);
    int d = 0;
    for (int jj = 0; jj < j; jj++) if (BASE[i][jj] >= 0) d++;
    return (BASE[i][j] >= 0) ? d : -1;
  endfunction

  // Replica r of super processor i is tied to stage (shift + k_i + r*p/2) mod p
  // of every belief bank it uses and to stage (k_i + r*p/2) mod p of its
  // message banks. k_i is the smallest value for which no two link processors
  // meet on the same stage of any belief bank. Result: 16 bits per super
  // processor, 16'hFFFF when no placement exists for this p.
  typedef logic [NB_ROW-1:0][15:0] offs_t;

  function automatic offs_t tap_offsets(int p, int reps);
    offs_t   res;
    logic [NB_COL*MAX_P-1:0] used;   // flattened [column][stage]
    int      st   [NB_COL*MAX_REP];   // flattened [column][replica]
    bit      ok;
    int      t;
    used = '0;
    for (int i = 0; i < NB_ROW; i++) begin
      res[i] = 16'hFFFF;
      for (int k = 0; k < p; k++) begin
        ok = 1'b1;
        for (int j = 0; j < NB_COL; j++) begin
          t = shift_of(i, j, p);
          if (t >= 0) begin
            for (int r = 0; r < reps; r++) begin
              st[j*MAX_REP+r] = (t + k + r * (p / 2)) % p;
              if (used[j*MAX_P + st[j*MAX_REP+r]]) ok = 1'b0;
              for (int rr = 0; rr < r; rr++) if (st[j*MAX_REP+rr] == st[j*MAX_REP+r]) ok = 1'b0;
            end
          end
        end
        if (ok) begin
          res[i] = 16'(k);
          for (int j = 0; j < NB_COL; j++)
            if (BASE[i][j] >= 0)
              for (int r = 0; r < reps; r++) used[j*MAX_P + st[j*MAX_REP+r]] = 1'b1;
          break;
        end
      end
    end
    return res;
  endfunction

  // Stage of the message bank that replica r of a super processor with
  // offset k reads (it writes the following stage).
  function automatic int msg_stage(int k, int r, int p);
    return (k + r * (p / 2)) % p;
  endfunction

  // Stage of belief bank j that replica r of super processor i reads.
  function automatic int bel_stage(int i, int j, int k, int r, int p);
    return (shift_of(i, j, p) + k + r * (p / 2)) % p;
  endfunction

  // Number of non-zero blocks in base column j (the bit degree).
  function automatic int col_deg(int j);
    int d = 0;
    for (int i = 0; i < NB_ROW; i++) if (BASE[i][j] >= 0) d++;
    return d;
  endfunction

  // Belief bank j has col_deg(j) * reps taps, listed by super processor
  // (rows in increasing order) and, inside one super processor, by replica.
  localparam int MAX_TAPS = 8;   // 4 (largest column degree) * MAX_REP
  typedef logic [MAX_TAPS-1:0][15:0] taps_t;

  function automatic int tap_index(int j, int i, int r, int reps);
    int d = 0;
    for (int ii = 0; ii < i; ii++) if (BASE[ii][j] >= 0) d++;
    return d * reps + r;
  endfunction

  function automatic taps_t bank_taps(int j, int p, int reps, offs_t offs);
    taps_t res = '0;
    for (int i = 0; i < NB_ROW; i++)
      if (BASE[i][j] >= 0)
        for (int r = 0; r < reps; r++)
          res[tap_index(j, i, r, reps)] = 16'(bel_stage(i, j, int'(offs[i]), r, p));
    return res;
  endfunction

  // Hard decision of a sign-magnitude belief: 1 for a negative LLR.
  function automatic logic hard_bit(bel_t b);
    return b[BEL_W-1] && (b[BEL_W-2:0] != '0);
  endfunction

endpackage

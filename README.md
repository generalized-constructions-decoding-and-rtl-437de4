# Shift-register LDPC decoder for the IEEE 802.16e rate-2/3 code

This is a partly parallel decoder for the quasi-cyclic rate-2/3 LDPC code of
IEEE 802.16e (the "B" base matrix, 8 x 24 blocks). By default it decodes the
length-1056 code with 44 x 44 circulants. It runs scaled min-sum ("normalized
BP-based") decoding with a *horizontal group replica-shuffled* schedule: check
rows are processed a few at a time, and every check update feeds its new
beliefs straight back into the next one (layered decoding). Two replica
sub-decoders walk through the check rows at two different positions at the
same time, which speeds up convergence further.

The architecture has no addressed memories and no address generators. Every
stored value sits in a circular shift register that rotates one position per
clock. The processors are wired to fixed positions of those rings. Because the
code is quasi-cyclic, the value a processor needs is always the one that
rotates past its tap in that cycle.

## The code

The parity-check matrix H is built from the base matrix `BASE` in
`rtl/ldpc_pkg.sv`. An entry of -1 is a P x P zero block. An entry t is the P x P
identity rotated right by t', so row r of the block has its single 1 in column
(r + t') mod P. The printed shifts are defined for P = 96. For another P they
are scaled as t' = floor(t * P / 96), the rule of the 802.16e standard. The row
weights are 10, except row 6, which has 11. The column weights are 2 to 4. The
code has N = 24P bits, of which 16P are information bits.

## How one clock cycle works

The design has two kinds of storage and three kinds of processor:

| unit | count (P = 44, 2 replicas) | what it holds or does |
|---|---|---|
| belief bank (`belief_bank`) | 24, one per base column | ring of P 9-bit beliefs T_n |
| message bank (`message_bank`) | 81, one per non-zero block | ring of P 6-bit check-to-bit messages U_mn |
| super processor (`super_processor`) | 8, one per base row | one check processor per replica, one link processor per edge and replica, and the row's message banks |
| check processor (`check_processor`) | 16 | scaled min-sum over 10 or 11 edges |
| link processor (`link_processor`) | 162 | V = T - U, then T' = V + U' |

In every enabled cycle, each replica of each super processor updates one check
row of its block row, and it does so in a single combinational pass:

1. Each link processor reads the belief T at its tap on a belief bank and the
   old message U at its tap on a message bank. It forms V = T - U at 9 bits and
   saturates it to a 5-bit magnitude for the check processor.
2. The check processor finds the minimum and second minimum of the |V|.
   Output n gets the second minimum if |V_n| equals the minimum, and the
   minimum otherwise. That value is scaled by 0.75 as (x >> 1) + (x >> 2). Its
   sign is the XOR of all input signs with V_n's own sign removed.
3. Each link processor forms the new belief T' = V + U', using the
   unsaturated V. It writes T' into the stage *after* its belief tap, and U'
   into the stage after its message tap. Both writes replace the value that
   would otherwise have shifted in.

Because the tap's output and the next stage's input see the same element one
clock apart, the rotation carries the updated element on as if nothing had
happened. After P cycles every ring is back in its starting position. Every
check row has then been processed once per replica, and that makes one
iteration.

### Why a fixed tap visits the right bit

Belief bank j shifts toward higher stages, so after c cycles stage s holds bit
(s - c) mod P of column j. Give super processor i's connection to bank j the
tap s = t'_ij + k_i, where k_i is the same for all connections of that super
processor. The bit under that tap is then (t'_ij + k_i - c) mod P. That is
exactly the bit that check row r = (k_i - c) mod P of block (i, j) touches. Row
r is the same for every bank of the super processor, so in each cycle one
whole check row is gathered. Its messages sit at stage k_i of all of the
super processor's message banks. Replica 1 uses k_i + P/2, so in each cycle it
works on the check row half a circulant away.

### Tap placement and access conflicts

Two link processors must never tap the same stage of a belief bank, or they
would both update the same bit in one cycle. With the raw shifts this would
happen. For example, base rows 0 and 1 both have shift 0 in column 17, and rows
0 and 7 both have 95 in column 16. The offsets k_i remove such collisions.
`ldpc_pkg::tap_offsets(P, REPLICAS)` picks them at elaboration time with a
greedy search: for each super processor in turn it takes the smallest k_i whose
taps, for all replicas, land on free stages. For P = 44 the offsets are
0,1,2,0,3,0,4,3 with two replicas and 0,1,0,1,0,1,2,1 with one. Each belief bank
also checks at elaboration that its taps are distinct. Any conflict-free
choice decodes correctly, but a different choice changes the processing order,
so bit-exact results depend on it.

## Replica sub-decoders

With `REPLICAS = 2`, each super processor has two check processors and two sets
of link processors. The banks stay the same, but each bank has twice as many
taps. The two replicas update different check rows of the same block row in
the same cycle, half a circulant apart. They share the beliefs (the synchronous
replica scheme) and the stored messages. Each check row is therefore updated
twice per P-cycle iteration, once by each replica. This costs the logic of a
second set of processors, while the register count stays unchanged (30 888
storage bits for the banks). `REPLICAS = 1` gives the plain group-shuffled
decoder.

## Number formats

- Messages: 6-bit sign-magnitude. Beliefs: 9-bit sign-magnitude. Sign bit 1
  means a negative LLR, that is, bit value 1 is more likely.
- Channel LLRs are loaded as 9-bit beliefs. The scale is up to the user. The
  message saturation at +/-31 and the belief limit at +/-255 set the useful
  range. The tests use amplitudes of about 16 to 24 per bit.
- The 9-bit subtraction and addition in the link processor clamp at +/-255.
  This is this design's choice.
- A check processor can output a message of magnitude 0 with sign 1. It reads
  as zero everywhere.
- The hard decision of bit n is 1 when T_n < 0. Negative zero counts as 0.

## Interface and timing (`ldpc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset of the sequencer (the banks need none) |
| `start` | in | 1 | one-cycle pulse while idle: take `llr_in` and decode |
| `llr_in` | in | N x 9 | channel LLR of bit n in `llr_in[n]`, bit n = column-block n / P, row n mod P |
| `busy` | out | 1 | loading or decoding |
| `done` | out | 1 | one-cycle pulse after the last iteration |
| `codeword` | out | N | hard decisions, valid from `done` until the next `start` |
| `belief` | out | N x 9 | final beliefs, valid over the same interval |

Timing:

- A `start` pulse moves the sequencer (`decoder_ctrl`) into the INIT cycle.
  There the belief banks load `llr_in` and the message banks clear.
- The banks then rotate for ITER x P cycles. `done` rises 1 + ITER x P clock
  edges after the edge that sampled `start`. That is 441 cycles with the
  defaults.
- The decoder does not check the syndrome and always runs ITER iterations.
- Loading is not overlapped with decoding.
- At 40 MHz, with 10 iterations, this gives 704 information bits per 441
  cycles, or 63.9 Mbit/s.

Parameters of the top: `P` (default 44), `REPLICAS` (2; 1 or 2), and `ITER`
(10). The base matrix and word widths are constants in `ldpc_pkg`. The tap
search finds a placement for every 802.16e size from P = 28 to 96 with two
replicas, and for P = 24 with one replica only. Elaboration stops with an error
if no placement exists.

## Module hierarchy

```
ldpc_decoder
├── decoder_ctrl                 INIT / enable / done sequencing
├── belief_bank x 24
└── super_processor x 8
    ├── message_bank x 10 or 11
    ├── check_processor x REPLICAS
    │   └── min2_comparator      3-stage min / second-min tree
    │       ├── comparator_3_2         (3 comparisons)
    │       ├── comparator_4_2_full    (6 comparisons, unordered inputs)
    │       └── comparator_4_2_sorted  (4 comparisons, two sorted pairs)
    └── link_processor x DEG x REPLICAS
```

The minimum finder splits its 10 inputs as 3/3/4, or its 11 inputs as 3/4/4.
It reduces each group to a sorted (min, second-min) pair, then merges the pairs
in two more stages. Comparator 4:2 (2) can skip two of the six comparisons
because both of its input pairs are already sorted.

## Where this design departs from, or adds to, the source architecture

These points are not fixed by the architecture this RTL implements, and were
decided here:

- The shift scaling t' = floor(t * P / 96) comes from the 802.16e standard.
- The tap offsets come from the greedy search. The half-circulant spacing of
  the second replica is also this design's choice.
- The sequencer, the shift-enable input of the banks, the parallel LLR load
  port, and the held outputs are additions.
- The link processor clamps its 9-bit results at +/-255.
- The update is combinational within one cycle, with no pipelining. The
  critical path runs belief bank, subtract, minimum tree, select, add, and back
  to the belief bank.
- The processors, comparators and banks otherwise follow the source
  architecture as described.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

- The comparators and the check processor are compared with sorting-based and
  definition-based models. The comparators are tested exhaustively where
  possible.
- The link processor is compared with integer arithmetic.
- The banks are compared with a rotating-array model.
- The super processor is compared with a per-check-row message table.
- The sequencer is checked cycle by cycle.

`tb_ldpc_decoder` runs the default decoder (N = 1056, 2 replicas, 10
iterations) on five frames:

1. It encodes random information bits through the dual-diagonal parity part
   and checks all parity checks.
2. It adds approximately Gaussian noise.
3. It compares every final belief, bit-exactly, with an independent
   fixed-point model of the schedule.
4. It checks the latency.
5. It checks that frames with little noise decode to the transmitted word.

It also counts, and requires, message saturation, belief clamping, tied
minima, corrected channel errors, and work by the second replica.
`tb_ldpc_decoder_plain` does the same for `REPLICAS = 1`.
`tb_ldpc_decoder_sizes` repeats the method, with two frames each, for P = 28
(N = 672) and P = 96 (N = 2304). Its per-size harness is `tb/ldpc_frame_tester.sv`,
so this test needs `-y tb` on the Verilator command line as well.
`tb_ldpc_replica_convergence` feeds the same 16 frames to a plain and a
replica decoder, each running only 2 iterations. With moderate noise, the
replica decoder typically leaves 140 to 240 residual bit errors in total,
against 390 to 515 for the plain one (over three seeds). The test requires the
replica total to be the smaller of the two.

To run one test with Verilator (5.x):

```
verilator --binary --timing --assert -y rtl +libext+.sv -Irtl \
    rtl/ldpc_pkg.sv tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder
./obj_dir/Vtb_ldpc_decoder
```

The full-size end-to-end test builds in about 20 s and runs in well under a
second.

## Limits

- Only the rate-2/3 B base matrix is built in. Other 802.16e rates would need
  their own base matrix and, for degrees other than 10 and 11, another
  minimum-finder arrangement.
- Error-rate performance has not been measured beyond the few frames of the
  tests.
- The replica schedule's convergence advantage has been measured only at one
  noise level and one iteration count, as above.

# Low-area NB-LDPC decoder for space telecommand

This is the RTL of a decoder for short non-binary LDPC codes over GF(16),
sized for a space telecommand uplink. The codes are (128,64) in bits,
which is 32 GF(16) symbols of 4 bits. The parity-check matrix H is 16 x 32
and (2,4)-regular: every symbol is in 2 checks and every check holds 4
symbols. The decoder uses the min-max algorithm with 5-bit messages and
runs at most 18 iterations. It stops early as soon as the tentative
codeword satisfies every check.

The architecture trades speed for area. The target is only a few Mbit/s,
so it uses:

* one check node unit (CNU) per row of H: 16 CNUs in all;
* each CNU has a single elementary min-max unit, used six times per check;
* one variable node unit (VNU) for all 32 symbols.

Every message is a vector of 16 LLRs, one for each GF(16) value. It
travels as one 80-bit word (16 x 5 bits). All memories are small LUT RAMs
with asynchronous read.

```
 bit LLRs ──► symbol_llr_gen ──► llr_mem (32x80) ──► vnu ──► Q ──┬──► msg_mem[0..15] (8x80) ──► cnu[0..15]
                                                      ▲  │       │          │    ▲                  │
                                                      │  └► hard decision   │    └──── R ───────────┘
                                                      │        ▼            │
                                                      │   parity_check ──► codeword
                                                      └── 16:1 mux of R ◄───┘
                     control_unit (schedule, H ROM) drives all of the above
```

## Message representation

An LLR vector has 16 five-bit entries. Each entry is the unsigned
"distance" of one field value from the most likely value. The most likely
value therefore has LLR 0, and a larger number means a less likely value.

Entries are stored in **power representation**:

* entry 0 is the zero element;
* entry k (k = 1..15) is alpha^(k-1).

The field is built on x^4 + x + 1.

Power representation has a useful property. Multiplying every field value
by alpha is the same as rotating entries 1..15 of the vector by one place,
while entry 0 stays where it is. Two parts of the design rely on it:

* Multiplying a message by an H entry h = alpha^e (and dividing by it
  afterwards) is a rotation by e. H is a constant parameter, so each CNU
  needs only a 4-way choice between four fixed wirings, one per edge. No
  general GF(16) permuter or barrel shifter is needed.
* The min-max unit can keep its operands in rotating registers and use one
  fixed comparison network, as described next.

The hard decisions and the output codeword are in ordinary polynomial form
(4 bits per symbol).

## The elementary min-max unit (`minmax_unit`)

The check node update is built from one elementary step:

    Lo(c) = min over c1 + c2 = c of max(L1(c1), L2(c2))

Done directly, this is 256 max/min pairs per output vector. The unit
instead spreads the work over 16 cycles with 16 max cells and 16 min cells.
The trick is that alpha*x + alpha*y = alpha*(x + y).

1. **Start cycle.** L1 and L2 are loaded, or kept from the previous step.
   Lo is set to max(L1(0), L2(c)) for every c. This covers every pair with
   c1 = 0.
2. **Compute cycles 1..15.** The current entry 1 of L1 is paired with each
   of the 16 entries of L2. The max of each pair is min-ed into the entry of
   Lo that stands for 1 + y. This mapping j → index(1 + elem(j)) is a
   constant wiring (`one_plus`). Then L1, L2 and Lo all rotate by one place.
   After t rotations, entry 1 of L1 is L1(alpha^t). So over the 15 cycles
   every pair with c1 ≠ 0 is visited exactly once, and always lands in the
   right (rotated) output entry.
3. **End.** After 15 rotations all three registers are back in natural
   order. Lo is complete, and `done` rises 16 cycles after `start`.

L1 and L2 are back in natural order at the end of every step. A following
step can therefore keep an operand, or take Lo as its new L1, without
reordering anything.

## The check node unit (`cnu`, `cnu_sched`)

A degree-4 check with inputs Q1..Q4 needs six elementary steps (forward,
backward and merge). The order below means no intermediate vector is ever
stored outside the min-max unit:

| step   | L1          | L2           | Lo      |
|--------|-------------|--------------|---------|
| FW1    | Q2          | Q1 (reg 1)   | F2      |
| FW2    | F2 (from Lo)| Q3           | R4      |
| MERGE2 | F2 (kept)   | Q4 (reg 4)   | R3      |
| BW1    | Q3          | Q4 (reg 4)   | B3      |
| BW2    | B3 (from Lo)| Q2           | R1      |
| MERGE1 | B3 (kept)   | Q1 (reg 1)   | R2      |

How the operands are supplied:

* Q1 and Q4 are read once into two vector registers.
* Q2 and Q3 come straight from the message memory each time they are
  needed.
* Multiplexer 1 (into L1) chooses between Lo and the memory word.
* Multiplexer 2 (into L2) chooses between the memory word, register 1 and
  register 4.

`cnu_sched` is a 98-cycle sequencer shared by all 16 CNUs. It preloads Q1,
starts the six steps 16 cycles apart, and writes each R back as soon as the
step after it starts. The R vector is rotated back (divided by h) on its way
to memory.

## The variable node unit (`vnu`, `min_tree`)

A symbol n has two check neighbours, m1 and m2. The VNU has:

* one row of 16 saturating adders;
* a comparator tree that returns both the minimum value and its index;
* a row of subtractors that normalises the minimum to 0;
* 16 registers.

It spends three cycles on each symbol:

| cycle | adder inputs          | result                                                      |
|-------|-----------------------|-------------------------------------------------------------|
| 1     | R(m2,n) + L_n         | Q(m1,n). The sum is also kept in the registers.             |
| 2     | R(m1,n) + L_n         | Q(m2,n)                                                     |
| 3     | R(m1,n) + registers   | a-posteriori vector; the tree's index is the hard decision. |

In the first iteration the R input is forced to zero, so the VNU sends the
channel LLRs out as the first messages.

## Memories and schedule (`msg_mem`, `llr_mem`, `control_unit`)

Each row's message memory has 8 words:

* words 0..3 hold the Q vectors of the row's four edges, in the order the
  row lists them in H;
* words 4..7 hold the R vectors.

Each memory has one read port and one write port. The read port is shared
between the row's CNU and the VNU's 16-to-1 R multiplexer. A 2-to-1
multiplexer in front of the write port takes either the VNU's Q or the
CNU's R.

The control unit holds H as a ROM of (column, exponent) pairs, four per row
(parameter `H`). From it, it derives, for each symbol, its two rows and the
slots of its edges in those rows.

Decoding one codeword:

1. **LOAD.** 32 symbols are accepted, one per cycle. Their LLR vectors go
   into `llr_mem`.
2. **VN phase, 96 cycles.** The VNU reads R and writes Q for every edge,
   and stores all 32 hard decisions in `parity_check`.
3. **CN phase, 98 cycles.** All 16 CNUs read their Q vectors and write
   their R vectors in lockstep. At the same time, `parity_check` checks the
   hard decisions from step 2, one row per cycle with four table
   multipliers and XORs (17 cycles).
   * If every check passes, decoding ends at once with success, and the
     rest of the CN phase is abandoned.
   * If it fails after 18 CN phases, decoding ends with failure.
   * Otherwise decoding returns to step 2.

From the last accepted symbol to `dec_done`, decoding takes 115 + 194·k
cycles, where k is the number of CN phases run (0..18). At the 18-iteration
limit that is 3607 cycles, or 3639 cycles per codeword including the input.

## Interface of `nbldpc_decoder`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `ch_valid`, `ch_llr[4]`, `ch_ready` | in/in/out | One symbol per cycle as four signed 6-bit bit LLRs, log(P(0)/P(1)). `ch_llr[i]` is bit i of the symbol's polynomial form. `ch_ready` falls after 32 symbols. |
| `dec_busy` | out | decoding in progress |
| `dec_done` | out | one-cycle pulse at the end of decoding |
| `dec_success` | out | every parity check is satisfied |
| `dec_iter` | out | CN phases run (0 means the channel decisions were already a codeword) |
| `codeword[32]` | out | decoded symbols, polynomial form; held until the next codeword has been loaded |

Parameters:

* `H`: the parity-check matrix, as an `h_rom_t`;
* `ITER_MAX`: the iteration limit (18);
* `CH_W`: the width of a bit LLR (6).

The default H (`nbldpc_pkg::default_h`) is a structured (2,4) matrix of
full rank defined by a formula. Row m holds columns m, m+13 (mod 16),
16+m and 16+(m+9 mod 16), with coefficients alpha^((7m+4s+2) mod 15).
Any other (2,4) 16 x 32 matrix can be passed in without other changes; the
decoder assumes only that each column appears in exactly two rows.

## How far it follows the original design, and where it departs

These parts follow the source design:

* block structure: 16 CNUs, 1 VNU, 16 message RAMs of 8x80, one 32x80 LLR
  RAM, a 16-to-1 R multiplexer, a parity-check module and a control unit
  with an H ROM;
* 5-bit messages and the 18-iteration limit;
* the CNU step order, its two vector registers and its multiplexers;
* the VNU with a zero input, 16 registers and one extra cycle for the hard
  decision;
* the parity check with four table multipliers and XOR.

These are this implementation's own choices:

* **H-entry multiplication.** The source folds it into a shift of one
  operand during the first elementary step. Here it is a fixed rotation at
  the CNU's memory port, selected by edge.
* **Min-max pairing.** The source describes shift registers and a fixed
  network, but not the cycle-by-cycle pairing. The pairing and the 16-cycle
  step are this implementation's.
* **Not specified by the source**, and chosen here:
  * the field polynomial;
  * bit order and sign of the channel LLRs;
  * the input LLR width;
  * saturation of the sums;
  * tie-breaking (lowest index wins);
  * the message-memory word map;
  * the phase timing and the overlap of the parity check with the CN
    phase;
  * the input handshake.
* **Parity-check matrix.** The source's code is not given, so the default H
  is a stand-in. Decoding performance depends on H, so error rates from
  this RTL describe the stand-in code only.
* **Throughput.** The source reports about 2 Mbit/s but gives no clock
  frequency. With 3639 cycles per codeword at the iteration limit, 2 Mbit/s
  needs roughly 114 MHz if the rate counts the 64 information bits, or
  57 MHz if it counts the 128 coded bits.

## Verification

Every module has a self-checking testbench in `tb/`. The reference models
are in `tb/tb_gf_pkg.sv`: bitwise GF(16) arithmetic, brute-force min-max
over all symbol pairs, and Gaussian elimination of H to generate
codewords.

* `tb_minmax_unit` checks each step against the brute-force model, and
  checks the 16-cycle step time.
* `tb_cnu` checks the four R vectors against brute force over all symbol
  triples, and checks the 98-cycle phase.
* `tb_vnu`, `tb_min_tree`, `tb_symbol_llr_gen`, `tb_parity_check`,
  `tb_msg_mem` and `tb_llr_mem` compare against their own models.
* `tb_control_unit` checks every VN-phase cycle against a schedule derived
  from the dense H matrix, and checks the stop conditions.
* `tb_nbldpc_decoder` is the end-to-end test, at default parameters. It
  decodes error-free, lightly corrupted, heavily corrupted and random
  frames. It checks:
  * the decoded words;
  * the success flag against an independent syndrome;
  * the 194-cycle iteration time;
  * that early stop, multi-iteration decoding and the iteration limit each
    occur at least once.

`tb_decoder_other_h` builds the decoder with a different H, made from a
socket permutation. With it the decoder must decode clean, corrupted and
random frames correctly, which shows that changing `H` is enough to change
the code.

`tb_awgn_cer` sends random codewords over BPSK with Gaussian noise, 400
frames at each Eb/N0 from 1 to 5 dB. The channel LLRs are scaled by 2 and
clipped to 6 bits. It checks that the latency is right for every frame,
that every decoded word satisfies H, and that the error rate falls with
Eb/N0. With the default H it measures:

| Eb/N0 (dB)         | 1    | 2    | 3      | 4   | 5   |
|--------------------|------|------|--------|-----|-----|
| codeword error rate| 0.49 | 0.17 | 0.0075 | 0/400 | 0/400 |
| mean CN phases     | 11.4 | 6.0  | 2.7    | 1.6 | 1.2 |

At 3 dB a codeword therefore takes about 670 cycles on average, against
3639 at the iteration limit.

To run one testbench with plain Verilator, from the folder that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl --top-module tb_nbldpc_decoder \
  rtl/nbldpc_pkg.sv tb/tb_gf_pkg.sv tb/tb_nbldpc_decoder.sv -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in the file of the same name.
Only the two packages need to be named explicitly. Each testbench ends
with a line `TB_RESULT checks=N failures=F`.

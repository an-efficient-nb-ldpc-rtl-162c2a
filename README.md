# Min-Max NB-LDPC decoder for space telecommand links

This is synthesizable SystemVerilog for a decoder of short non-binary LDPC codes: the (128,64)
code over GF(16) with a regular 16 x 32 parity-check matrix, two non-zero entries per column and
four per row. Such codes correct more errors than the binary (128,64) LDPC code used today on
space telecommand uplinks. Their drawback has been decoder cost. The decoder aims to be small
while still reaching the 2 Mbit/s maximum telecommand rate. It runs at most 18 iterations of
the Min-Max algorithm with 5-bit messages, and stops early once the hard decision satisfies
every parity check.

The architecture follows a published FPGA design: 16 check node units (one per row of H), one
variable node unit, distributed-RAM message memories and a parity-check unit. The parity-check
matrix, the cycle-level schedule and several widths are this implementation's own. They are
listed under "Where this RTL makes its own choices" below.

## Data flow

```
 bit LLRs ─► symbol_llr_gen ─► a priori memory (32 x 80) ─┐
                                                          ▼
   ┌──────────── 16:1 mux ◄── R messages ──────────┐     VNU ──► hard decisions ─► parity_check ─► out_cw, out_ok
   │                                               │      │
   └─► VNU ── Q messages ──► message memory m ─────┤      │  (Q written to the memory of the destination row)
                             (16 of them, 8 x 80)  │
                                  ▲   │            │
                          R msgs  │   ▼ Q msgs     │
                                 CNU m (16 of them, all in parallel)
 control_unit + cnu_sched + h_rom sequence everything
```

A message is a vector of 16 LLRs of 5 bits (80 bits), one LLR per field element. LLRs are
relative to the most likely symbol: 0 means most likely, and larger values mean less likely.

One iteration is a variable node (VN) pass followed by a check node (CN) pass:

* **VN pass (96 cycles).** The single VNU visits the 32 variable nodes in order, three cycles
  each. Variable node n is connected to check nodes m0 and m1.
  * Cycle 1 computes `Q(m0,n) = norm(L(n) + R(m1,n))`.
  * Cycle 2 computes `Q(m1,n) = norm(L(n) + R(m0,n))`.
  * Cycle 3 computes the a posteriori vector `L(n) + R(m0,n) + R(m1,n)` and its argmin, which
    is the hard decision.
  * `norm` subtracts the minimum of the vector. Sums saturate at 31.
  * Each R is read from the message memory of its check node through the 16:1 multiplexer.
  * Each Q is written into the message memory of the check node it is sent to.
  * The first pass uses R = 0, so Q = L.
* **Parity check (17 cycles).** It overlaps the next CN pass. The 32 hard decisions are held in
  a shift register. One parity equation is evaluated per cycle with four GF(16) multiplier
  look-up tables and XOR.
* **CN pass (104 cycles).** All 16 CNUs run in lock step under one sequencer. Each CNU reads the
  four Q messages of its row from its own memory and writes back four R messages. No two CNUs
  touch the same memory, so any regular (2,4) matrix of this size works without access
  conflicts.

Decoding ends when the parity check succeeds, which also cancels the CN pass already under way.
It also ends after 18 CN passes.

## Power representation and the H coefficients

Inside every vector, element 0 is the LLR of the field element 0. Element 1+k is the LLR of
alpha^k, k = 0..14 (alpha is a root of x^4 + x + 1). Multiplying every symbol by a constant
alpha^e then just rotates elements 1..15 by e positions. This is why the check node needs no
field multipliers:

* A message Q about symbol `a` becomes a message about `h*a` by rotating it by the exponent of
  `h` (`rot_mul` in `nbldpc_pkg`).
* The check equation `h1 a1 + h2 a2 + h3 a3 + h4 a4 = 0` then becomes a plain sum of four
  symbols.
* Each result is rotated back (`rot_div`).

Each CNU serves one fixed row, so its four rotations are pure wiring. The slot field of the
memory address picks one of them.

## The min-max unit: a fixed comparator network

The core operation of the check node is the elementary step

    Lo(a) = min over a1 + a2 = a of max(L1(a1), L2(a2))

It has 256 (a1, a2) pairs. `minmax_unit` computes one output element per cycle with 16 max
comparators and one 16-input min tree. The trick is that the comparator wiring never changes:

* L1 and L2 are split into the zero-element LLR and a 15-entry array of the non-zero
  elements. Both arrays rotate by one position per cycle.
* In cycle c, position i of each array holds the LLR of alpha^(c+i).
* The Zech logarithm z(i) is defined by alpha^z(i) = 1 + alpha^i. It gives
  alpha^(c+i) + alpha^(c+z(i)) = alpha^c, so the pairs whose sum is alpha^c always sit at the
  same array positions, whatever c is:
  * (L1 position i, L2 position z(i)) for i = 1..14;
  * (L1 zero element, L2 position 0);
  * (L1 position 0, L2 zero element).
* The 16 maxima feed the min tree, and the result is shifted into the output register.
* A 16th cycle (`zero`) computes the output for the field element 0. Its pairs are
  (L1(a), L2(a)) for every a.

After 15 rotations both input arrays are back where they started. The next step can therefore
reuse an input without reloading it. A step takes 16 cycles plus one cycle to load its operands.

## Check node schedule

For a degree-4 node the forward-backward algorithm needs six elementary min-max steps (Qj is the
rotated input of slot j):

| step   | L1 | L2 | result              |
|--------|----|----|---------------------|
| FW1    | Q2 | Q1 | F2                  |
| FW2    | F2 | Q3 | R4 (= F3)           |
| MERGE2 | F2 | Q4 | R3                  |
| BW1    | Q3 | Q4 | B3                  |
| BW2    | B3 | Q2 | R1 (= B2)           |
| MERGE1 | B3 | Q1 | R2                  |

Each intermediate vector (F2, B3) is used by the two steps that follow it. One of those steps
takes it from the unit's output register and the other from the L1 array, where it already sits.
No intermediate vector is stored. Every step after the first reads exactly one message from
memory. Each R is written during the load cycle of the next step, or in one final cycle for R2.
`cnu_sched` produces this sequence as a control word (`cnu_ctrl_t`) shared by all 16 CNUs:
1 pre-load cycle + 6 x 17 + 1 = 104 cycles.

## Timing and throughput

| phase                        | cycles              |
|------------------------------|---------------------|
| load 32 symbols              | 32                  |
| first VN pass                | 96                  |
| each iteration (CN + VN)     | 1 + 104 + 96 = 201  |
| final parity check + result  | 1 + 17 + 1          |

For k iterations a frame takes 147 + 201 k cycles, which is 3765 cycles at the 18-iteration
limit. At 60.9 MHz, the clock reported for an FPGA implementation of this architecture, that
gives 2.07 Mbit/s. The clock rate this RTL reaches has not been measured. Loading is not
overlapped with decoding.

## Interface (`nbldpc_decoder`)

| port        | dir | width  | meaning |
|-------------|-----|--------|---------|
| `clk`, `rst_n` | in | 1   | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | one symbol is accepted per cycle with both high; 32 symbols make a frame, symbol 0 first |
| `in_llr`    | in  | 4 x 5  | signed bit LLRs ln(P(0)/P(1)) of the symbol; `in_llr[k]` is the coefficient of x^k |
| `out_valid` | out | 1      | one-cycle pulse when the frame is decoded |
| `out_cw`    | out | 32 x 4 | decoded symbols in polynomial form, `out_cw[n]` = variable node n |
| `out_ok`    | out | 1      | all parity checks hold |
| `out_iters` | out | 5      | iterations used (0 = channel decision was already a codeword) |
| `busy`      | out | 1      | decoding in progress |

`out_cw` keeps its value until the next frame's hard decisions start arriving.

## The code

`nbldpc_pkg` defines the matrix by formula:

* Column n has its entries in rows `n mod 16` and `(5n+3) mod 16` (n < 16), or
  `(5(n-16)+11) mod 16` (n >= 16).
* The entry in the k-th row of column n is alpha^((7n + 4k + 1) mod 15).

The result is regular (2,4) and has no 4-cycles. It is an example, not an optimised code. To use
another regular (2,4) 16 x 32 matrix, change `hrow_f` and `hexp_f`. Everything else (CNU
rotations, H ROM, memory addressing) is derived from them at elaboration.

## Where this RTL makes its own choices

These are not given by the published design and were chosen here:

* **Matrix and field:** the parity-check matrix and the primitive polynomial x^4 + x + 1.
* **Widths, tie rule and reset:** 5-bit signed channel LLRs, saturation of all sums at 31, the
  hard decision taken as the lowest power index among equal minima, and an asynchronous
  active-low reset.
* **Cycle-level scheduling:**
  * three VNU cycles per variable node;
  * 16 cycles per min-max step and 104 per CN pass;
  * the parity check overlapping the next CN pass, which is cancelled on success;
  * no overlap between loading and decoding.
* **Memories:** the message memory layout (words 0..3 hold Q, words 4..7 hold R, by slot =
  column order within the row) and asynchronous-read memories.
* **CNU inputs:** the published generic low-area CNU has shift registers at its inputs to apply
  the H coefficients. With one CNU per row they reduce to fixed wiring, so they are not present.
* **Symbol LLR generator:** only its function is given. It is built as the sum of bit-LLR
  magnitudes over the bits where a symbol differs from the bit decisions.

Only the low-area (16 CNU, 1 VNU) configuration is built. The high-throughput CNU/VNU variants
and other parallelism levels are alternatives and are not included.

## How far it is verified

Each module has a self-checking testbench in `tb/`. Reference values are computed independently
of the RTL, with GF(16) done by carry-less multiplication in `tb/tb_gf_pkg.sv`.

* **`minmax_unit`:** 200 random steps against exhaustive search, including reuse of L1.
* **`cnu` with `cnu_sched`:** four different rows against a brute-force evaluation of the
  Min-Max check node rule over all symbol configurations, plus the 104-cycle pass length.
* **`vnu`, `parity_check`, `symbol_llr_gen`, `min_tree`, `gf16_mul_rom`, `h_rom`, `dist_ram`:**
  random and exhaustive checks, including saturation and ties.
* **`tb_nbldpc_decoder` (full size, default parameters):**
  * Five frames of random codewords at several noise levels, compared with a complete reference
    Min-Max decoder in `tb/tb_gf_pkg.sv`.
  * The decoded word, success flag, iteration count and exact cycle count must all match.
  * It covers a frame decoded with no iteration, early termination after iterations, the
    18-iteration limit, a cancelled CN pass and saturation.

Concurrent assertions in the RTL check the handshakes that are active during every test:

* the CN sequencer is started only when idle;
* the completion pulses arrive only in the states that wait for them;
* the VNU never writes a message memory while the CNUs own its ports.

`tb_awgn_cer` sends 24 random codewords at each of Eb/N0 = 1, 2 and 3 dB over BPSK/AWGN. The
bit LLRs are scaled by 2 and rounded to 5 bits. Every frame must agree bit for bit with the
reference decoder. One run gave 11, 4 and 0 codeword errors out of 24 at the three points. The
test takes about 20 s. A real error-rate curve needs millions of frames and has not been run.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nbldpc_pkg.sv tb/tb_gf_pkg.sv tb/tb_nbldpc_decoder.sv --top-module tb_nbldpc_decoder
./obj_dir/Vtb_nbldpc_decoder
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. The full-size decoder test
builds in under a minute and runs in a few seconds. `tb_awgn_cer` is built the same way.

## Files

* `rtl/nbldpc_pkg.sv`: constants, message types, GF(16) tables, matrix definition, CNU control
  word.
* `rtl/nbldpc_decoder.sv`: top level.
* `rtl/control_unit.sv`, `rtl/cnu_sched.sv`: sequencing.
* `rtl/cnu.sv`, `rtl/minmax_unit.sv`, `rtl/min_tree.sv`: check node.
* `rtl/vnu.sv`: variable node.
* `rtl/parity_check.sv`, `rtl/gf16_mul_rom.sv`, `rtl/h_rom.sv`: syndrome check and matrix ROM.
* `rtl/dist_ram.sv`, `rtl/symbol_llr_gen.sv`: memories and channel input.
* `tb/`: one testbench per module, `tb_awgn_cer.sv` (channel workload) and `tb_gf_pkg.sv`
  (reference arithmetic and reference decoder).

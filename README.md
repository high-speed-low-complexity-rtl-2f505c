# Pipelined RS(255,239) decoder with pRiBM and folded PF-RiBM key-equation solvers

This is a streaming Reed-Solomon RS(255,239) decoder. It corrects up to t = 8 symbol
errors per 255-byte word and accepts one byte per clock with no gap between words.
The design is built to reach a high clock rate. Every GF(2^8) multiplier has a
pipeline register, and that includes the multipliers inside feedback loops: the
syndrome accumulators, the Berlekamp-Massey iteration and the Chien search.

A pipeline register inside a loop normally halves the throughput of that loop.
This design deals with it in one of two ways:

* **Interleaving.** The loop is two registers long, so it carries two independent
  sequences, one on even cycles and one on odd cycles. The syndrome cells, Chien
  cells, Forney cells and the x^(2t) generator do this. They lose no throughput and
  add at most one cycle of latency.
* **Zero insertion.** In the pRiBM key-equation solver, one iteration takes two
  cycles. Every second cycle carries zeros. The 2t iterations then take 4t = 32
  cycles, which is still far below the 255 cycles a word needs to arrive.

For the key-equation solver you can choose between two architectures with the top
parameter `FOLDED`:

| `FOLDED` | solver | structure | solver cycles | decoder latency |
|---|---|---|---|---|
| 0 (default) | pRiBM (pipelined reformulated inversionless Berlekamp-Massey) | 25 PEs, one per coefficient | 32 (+2 load/output) | 297 cycles |
| 1 | PF-RiBM (pipelined and folded RiBM) | 2 PEs, 13 coefficients each | 225 | 488 cycles |

The architecture follows "High-Speed Low-Complexity Reed-Solomon Decoder using
Pipelined Berlekamp-Massey Algorithm and Its Folded Architecture" (J.-I. Park,
K. Lee, C.-S. Choi, H. Lee). That paper reports latencies of 300 and 480 cycles.
Some cycle-level details here are this implementation's own, and the section
"Departures and own choices" lists them.

## Code and field

* GF(2^8) uses the primitive polynomial p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D) and
  alpha = 0x02.
* The generator polynomial is g(x) = prod_{i=0..15} (x - alpha^i).
* The syndromes are S_i = R(alpha^i) for i = 0..15.
* Symbols are sent highest coefficient first: R254, R253, ..., R0. R254 is the
  first symbol of a word.

## Dataflow

```
in ──► syndrome_block ──S0..S15──► KES (pribm_kes | pfribm_kes) ──σ,ω──► chien_search ──σ(x), xσ'(x)──► error_correction ──► out
  │                                                                 └──► forney_eval ──ω(x)──────────────►    ▲
  └──────────────────────────────► delay_fifo (received symbols) ─────────────────────────────────────────────┘
```

Cycle budget for the default configuration. Cycle 0 is the cycle that carries R254.

| event | cycle |
|---|---|
| R0 enters | 254 |
| `syn_valid`: S0..S15 valid, the KES loads | 255 |
| KES `done`: sigma and omega valid, the Chien search and Forney evaluation start (c0) | 289 |
| first point (x = alpha^1, symbol R254) leaves the Chien/Forney trees | c0+3 = 292 |
| corrected R254 on `out_data` | c0+8 = 297 |

The FIFO delay is 255 + KES latency + 8, so it adapts automatically to `FOLDED`.
A word's Chien search runs for 255 cycles. The next word's KES result may arrive
while the search is still running: each unit holds what it still needs
(sigma_0, omega_0, the x^(2t) loop state).

## The pipelined GF multiplier (`gf_mul_pipe`)

The product is computed as a matrix product:

* The rows A·alpha^k (k = 0..7) are formed from XORs of the bits of A.
* Each row is ANDed with bit b_k of B.
* Each output bit is then the XOR of 8 partial products, summed in a three-level
  tree.

The pipeline register sits at one of two cut lines:

* `CUT=1`: directly after the AND plane, with 64 bits registered. The folded solver
  uses this cut, because its loop also contains a multiplexer.
* `CUT=2`: after the first XOR level, with 32 bits registered. Everything else uses
  this cut.

Either way, the latency is one cycle and a new product can start every cycle. The
multipliers by a constant are the same module with a constant operand. Synthesis
reduces them to XOR networks.

## Syndrome cell: even/odd split

The loop of a syndrome cell contains the register D and the multiplier pipeline
register. The cell therefore evaluates

S_i = R_even(alpha^(2i)) + alpha^i · R_odd(alpha^(2i)),

where the even-indexed symbols (R254, R252, ..., R0) and the odd-indexed symbols
(R253, ..., R1) accumulate in alternate cycles. Both accumulators step by
alpha^(2i).

On the cycle after R0, two values are ready at once:

* D holds the even sum.
* A second constant multiplier (alpha^i), fed from D, has just produced
  alpha^i · (odd sum).

Their XOR is the syndrome. It is valid for that one cycle, which is when the KES
loads it. `signal1` replaces the loop value with 0 for the first two symbols of a
word, and that starts both accumulators.

## pRiBM key-equation solver (`pribm_kes`, `pribm_pe`, `pribm_ctrl`)

The solver runs RiBM on 3t+1 = 25 coefficient pairs (delta_i, theta_i). The
initial values are:

* delta = theta = S_i for i < 16
* 0 for i = 16..23
* 1 for i = 24

Each of the 2t iterations computes:

```
delta_i <= gamma*delta_(i+1) + delta_0*theta_i            (all i, PE_i)
if delta_0 != 0 and k >= 0:  theta_i <= delta_(i+1), gamma <= delta_0, k <= -k-1
else:                        theta_i unchanged,       gamma unchanged, k <= k+1
```

Each PE has two pipelined multipliers, an XOR and the delta register, so the
recursion needs two cycles. A 1-bit counter in the control unit gates `gamma` and
`delta_0` to zero on every second cycle. That makes the odd cycles compute zeros,
and the even cycles carry the iteration. The k register loop is also two registers
long, and only its even slot is meaningful. MC, the "swap" decision, is
(delta_0 != 0) AND NOT sign(k). It is zero automatically on the zero cycles.

After 4t cycles:

* PE0..PE7 hold omega_0..omega_7.
* PE8..PE16 hold sigma_0..sigma_8.

This implementation copies them into an output register bank, because the PE
registers alternate with zeros.

## PF-RiBM folded solver (`pfribm_kes`, `pfribm_pe`, `pfribm_ctrl`)

The 25 coefficients (padded to 26 slots) are folded onto two PEs of 13 slots each.
Each PE has two `CUT=1` multipliers and one adder, and processes one coefficient
per cycle. Coefficient k is read in cycle k (k = 0..12). Its new value leaves the
adder in cycle k+1, one cycle late because of the multiplier pipeline.

An iteration therefore takes 14 cycles, counted by a modulo-14 counter, and the 16
iterations take 224 cycles. `done` comes 225 cycles after the start. The folded
registers then hold the result until the next start, so this solver needs no output
register bank.

### Registers between iterations

Each PE keeps its coefficients in shift registers, not in an addressed register
file. Between iterations they hold:

* `hold`: delta_0 of the PE.
* `spare`: delta_1.
* `chain[1..11]`: delta_2..delta_12.
* The theta values are in a 14-register ring: theta_q[0..12] plus `bridge2_q`.

### One iteration, cycle by cycle

* **The delta chain.** It shifts one place at the end of cycles 1..13. The adder
  output enters at the tail, and the value leaving the head goes to `spare`.
* **The gamma operand delta_(k+1).** It comes from `spare` in cycle 0, from the
  chain head in cycles 1..11, and from the next PE's `hold` in cycle 12.
* **The `hold` register.** It copies `spare` only at the end of cycle 13. Until
  then it keeps the PE's old delta_0, which the preceding PE needs in cycle 12.
* **The theta ring.** It rotates once per cycle, so theta_k is at the head in
  cycle k. The updated theta_k (MC ? delta_(k+1) : theta_k) re-enters through
  `bridge2_q` and is back at the head 14 cycles later.
* **Control values.** delta_0, gamma and MC are registered by the control unit and
  held for the whole iteration. PE0's new delta_0 passes its delta_2 chain register
  (`chain[2]`) in cycle 11, and the control unit captures it there. A two-stage
  pipelined OR tree then tests it for zero. In cycle 13 the new delta_0, gamma, k
  and MC are registered for the next iteration, so no long path ends in the
  control unit.

## Chien search and Forney evaluation

### Cells and evaluation points

A cell C_i (`chien_cell`) produces coef·x^i for the points x = alpha^1, alpha^2, ...,
alpha^255, one point per cycle. Point s (x = alpha^(s+1)) belongs to the received
symbol R_(254-s), because X^-1 = alpha^-(254-s) = alpha^(s+1).

The cell loop multiplies by alpha^(2i), and odd and even points interleave. A
pipelined multiplier starts the two sequences from coef·alpha^i and coef·alpha^(2i).

### Trees

* `chien_search` sums the odd and even terms of sigma in two registered XOR trees.
  The odd sum is x·sigma'(x): in characteristic 2, only the odd powers survive the
  derivative. Odd sum + even sum + sigma_0 is sigma(x).
* `forney_eval` evaluates omega(x) the same way.

### Error correction

`error_correction` computes

Y = x^(2t) · omega(x) / (x · sigma'(x))

and applies it where sigma(x) = 0. The structure is:

* The division uses a registered 256 x 8 inverse ROM. The ROM is computed at
  elaboration as a^254.
* Two pipelined multipliers form the product.
* x^(2t) = alpha^(16(s+1)) comes from another interleaved loop, started with
  alpha^16 and alpha^32 and stepped by alpha^32.
* The zero flag of sigma(x) is delayed by a NOR and four registers to line up with Y.

The corrected symbol is the FIFO output XOR (flag AND Y).

## Interface (`rs_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset of the control state |
| `in_valid`, `in_sop`, `in_data` | in | 1, 1, 8 | received symbol, R254 first, `in_sop` on R254 |
| `out_valid`, `out_sop`, `out_data` | out | 1, 1, 8 | corrected symbol, same order |
| `out_err` | out | 1 | this symbol was corrected |

Rules:

* The 255 symbols of a word must be on consecutive cycles.
* Two word starts must be at least 255 cycles apart. Back to back is the maximum
  rate.
* Outputs have a fixed latency: 297 cycles for `FOLDED=0` and 488 cycles for
  `FOLDED=1`.

## Departures and own choices

* **Decoder failure.** A word with more than 8 errors is not detected. It leaves
  with whatever the Chien search finds.
* **Output selection.** sigma_i is taken from delta_(t+i) and omega_i from delta_i.
  The initial theta_3t is 1, as in the original RiBM.
* **Chien start constants.** The Chien cells start from alpha^i and alpha^(2i), so
  that the first point is alpha^1, which is the point of R254. The published cell
  drawing labels its start multiplexer "1" and "alpha^i". The x^(2t) start values
  alpha^2t and alpha^4t imply the same first point.
* **PF-RiBM schedule.** The published PE drawing gives register names
  (delta_13i..delta_13i+12, Spare, Bridge1, Bridge2) and multiplexers controlled
  by an LC signal. The description gives the state at the end of an iteration.
  The shift schedule above was derived from those. The multiplexer controls are
  decodes of the cycle count. The multiplier pipeline registers take the place of
  the "delta_13i+12" and "Bridge1" registers.
* **Extra registers and latencies.**
  * The KES start and done pulses, the pRiBM output register bank and the
    registered inverse ROM read are this implementation's own.
  * The 297/488-cycle latencies follow from these choices. The published figures
    are 300/480.
* **Delay FIFO.** It is a circular RAM with one address that advances every cycle.
  Its contents are not reset. `out_valid` comes from the Chien window, not from the
  FIFO.
* **Clock rate.** The 700/750 MHz clock rates and the gate counts belong to a 90-nm
  standard-cell implementation, and this RTL cannot check them.

## Files

* `rtl/rs_pkg.sv`: field constants, the `gf_t` type, and constant-evaluation
  functions (gf_mul, alpha powers, inverse).
* `rtl/gf_mul_pipe.sv`: the pipelined multiplier.
* `rtl/syndrome_cell.sv`, `rtl/syndrome_block.sv`: the syndrome cells and the block
  of 16.
* `rtl/pribm_pe.sv`, `rtl/pribm_ctrl.sv`, `rtl/pribm_kes.sv`: the pRiBM solver.
* `rtl/pfribm_pe.sv`, `rtl/pfribm_ctrl.sv`, `rtl/pfribm_kes.sv`: the PF-RiBM solver.
* `rtl/chien_cell.sv`, `rtl/chien_search.sv`, `rtl/forney_eval.sv`: the Chien search
  and Forney evaluation.
* `rtl/gf_inv_rom.sv`, `rtl/error_correction.sv`: the inverse ROM and the error
  correction.
* `rtl/delay_fifo.sv`: the received-symbol delay.
* `rtl/rs_decoder.sv`: the top.
* `tb/rs_ref_pkg.sv`: independent reference models. It holds log/antilog field
  arithmetic, a systematic encoder, syndromes and a software RiBM.
* `tb/tb_*.sv`: self-checking testbenches. Each one prints
  `TB_RESULT checks=N failures=M`.

## Verification

| testbench | what it checks |
|---|---|
| `tb_gf_mul_pipe` | both cut lines against table multiplication, 1-cycle latency |
| `tb_syndrome` | syndromes of codewords and random words, back to back and with gaps, valid timing |
| `tb_pribm_kes`, `tb_pfribm_kes` | sigma/omega equal a software RiBM for 0..8 errors; sigma vanishes at every error location; done exactly 34 / 225 cycles after start |
| `tb_chien_forney` | sigma(x), x·sigma'(x), omega(x) at all 255 points, two back-to-back words with the inputs changing during the search |
| `tb_error_correction` | the Y formula, gating, and 5-cycle timing on random streams |
| `tb_delay_fifo` | exact delay at the default and a small depth |
| `tb_rs_decoder` | both solvers end to end on 12 words with 0..8 errors (including t = 8 and errors on R254/R0), back to back and after pauses; exact latency; out_err equal to the error pattern |
| `tb_rs_decoder_full` | the default decoder, four back-to-back words, 297-cycle latency, continuous output |

To simulate with Verilator (5.x), for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/rs_pkg.sv tb/rs_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v rs_pkg) tb/tb_rs_decoder.sv --top-module tb_rs_decoder
./obj_dir/Vtb_rs_decoder
```

Put the two packages first (`rtl/rs_pkg.sv`, then `tb/rs_ref_pkg.sv`), then the other
RTL files and one testbench. Replace `tb_rs_decoder` with any other `tb_*` module to
run that test. Each test finishes in a few seconds.

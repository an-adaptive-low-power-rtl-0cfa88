# Adaptive low-power LDPC decoder driven by SNR estimation

An iterative LDPC decoder spends part of every iteration making a tentative
hard decision and checking it against the parity-check matrix, so that it
can stop as soon as the frame is correct. At low SNR that work is wasted for
many iterations: a frame that needs at least six iterations cannot pass the
parity check after one. Receivers that use adaptive coding and modulation
already estimate the SNR of every frame. This design uses that estimate to
look up the smallest number of iterations any frame has needed at that SNR.
Until that iteration is reached, the decoder runs only the check-node and
bit-node updates. The tentative decision and the parity check are skipped,
and so are the switching activity and the cycles they cost.

The scheme is the one proposed by J.-Y. Park and K.-S. Chung ("An adaptive
low-power LDPC decoder using SNR estimation"). This RTL is an independent
implementation of it. Where the article leaves details open, this design
makes its own choices; they are listed under
[Departures and own choices](#departures-and-own-choices).

## Block diagram

```
 SOF samples ──► snr_estimator ──snr_idx──┐
                                          ▼
                       ┌───────────── ldpc_decoder ─────────────────────┐
 channel LLRs ──►      │ snr_lut (min-iteration + alpha tables, compare)│
                       │ ldpc_ctrl (phases, iterations)   agu           │
                       │                                                │
                       │ BNU0 ◄─► MEM0 ◄─┐  ┌─► CNU0                    │
                       │ BNU1 ◄─► MEM1 ◄─┼──┼─► CNU1   xbar_rot         │
                       │  ...      ...   │  │   ...    (rotation by slot)│
                       │ BNU7 ◄─► MEM7 ◄─┘  └─► CNU7                    │
                       │   │                                            │
                       │   ▼                                            │
                       │ tentative_unit ─► decision memory ─► xbar ─►   │
                       │                    (8 x 1-bit banks)  parity_check
                       └────────────────────────────────────────────────┘
                                          │
                        decisions, success, iterations ◄┘
```

`ldpc_rx_top` is the top level: the estimator and the decoder.

## The code and why the memories never collide

The decoder is dimensioned for a rate-1/2, (3,6)-regular code with 9216
bits and 4608 checks. This is the size of the CMMB rate-1/2 code. The CMMB
matrix itself is defined by that broadcast standard and is not reproduced
here. Instead, the design uses its own quasi-cyclic code of the same size
and degrees, built so that eight check-node units and eight memories can
work in parallel without conflicts.

H is an 8 × 16 array of P × P blocks, with P = 576. Every block is zero or a
cyclically shifted identity matrix.

* Row block `r` (checks `r*P … r*P+P-1`) belongs to check-node unit `r`.
* Its six non-zero blocks are visited in slot order `s = 0..5`.
* Slot `s` lies in column block `2*((r+s) mod 8) + (s mod 2)`. That is
  memory bank `(r+s) mod 8`, first or second half by the parity of `s`.
* Check `i` of row block `r` connects, in slot `s`, to bit
  `(i + r*(s+5)) mod P` of that column block.

Bank `k` owns bits `k*1152 … k*1152+1151`, with all three edges of each of
those bits. The bit-node update of bank `k` therefore never leaves the bank.
In any one cycle of the check-node phase, all eight CNUs are in the same
slot `s` and read banks `(r+s) mod 8`. Those are eight different banks, so
the crossbar is just a rotation by `s`. The shift rule `r*(s+5) mod P`
leaves no 4-cycles at P = 576, nor at P = 64, the size used by the smaller
testbench.

Each bank stores 3 × 1152 = 3456 edge words. Each word holds the most recent
message on that edge. After a bit-node phase that is the bit-to-check value
Z. After a check-node phase it is the check-to-bit value L. Each bank also
has a 1152-word channel-LLR memory and a 1152 × 1-bit decision memory.

## Arithmetic (normalised min-sum)

All messages and channel LLRs are 6-bit two's complement, saturated to ±31.

* **Check node** (`cnu`, serial, one message per cycle): the magnitude of
  each output is the minimum of the other five input magnitudes, times
  alpha/16, truncated. Its sign is the product of the other five signs.
  The unit keeps the minimum, the second minimum, the slot of the minimum,
  the sign product and the six signs. Zero counts as positive.
* **Bit node** (`bnu`, serial, one edge per cycle): `z_n = F_n + L0 + L1 + L2`
  (9 bits, no saturation needed). The outputs are `z_mn = sat(z_n − L_mn)`.
* **Tentative decision**: `c_n = 1` if `z_n > 0`, otherwise 0. With this
  sign convention, a negative LLR means bit 0.

Alpha comes from a per-SNR table: 12/16 below 2 dB, 13/16 from 2 to 4 dB and
14/16 from 4.5 dB. These values are this design's own choice.

## One frame, cycle by cycle

With P = 576, each phase is 6P = 3456 read cycles plus 9 cycles of pipeline
drain.

| step | cycles | what happens |
|---|---|---|
| load | 2P = 1152 | word `b` carries local bit `b` of all 8 lanes (global bit `k*1152 + b` on lane `k`) |
| check-node phase | 6P + 9 | AGU sweeps checks `i = 0..P-1`, slots `0..5`; the rotation crossbar feeds CNU `r` from bank `(r+s) mod 8`; results are written back to the same addresses 7 cycles later |
| bit-node phase | 6P + 9 | each BNU reads its own bank's 3 edges per bit; results are written back 4 cycles later; with the check enabled, the tentative unit writes the decisions |
| parity phase (only when enabled) | 6P + 9 | the decision banks are read with the check-phase addresses through a 1-bit rotation crossbar; each lane XORs 6 bits per check |
| unload | 2P + 1 | the decisions are streamed out; `done` pulses in the last cycle |

In iteration 1 the check-node phase reads the channel-LLR memories instead
of the edge memories. This is how the decoder starts from Z = F without a
separate copy pass.

So an iteration takes 2 × 3465 cycles when the check is skipped, or
3 × 3465 cycles when it runs. From the cycle after the last LLR word to
`done`, the decoder takes

    (6P + 9) * (2 * iterations + parity_phases) + 2P + 1   cycles.

The testbenches check this count exactly. At 188 MHz, the clock reported
for the original 0.18 µm implementation, an iteration takes about 37 µs
with the check skipped and 55 µs with it.

## The adaptive schedule

`snr_estimator` implements the data-aided signal-to-noise-variance
estimator over the 26-symbol DVB-S2 start-of-frame header, pattern
0x18D2E82, with bit 0 → +1. With `A = Σ r·c` and `B = Σ r²`, the estimate is
`A² / (26·B − A²)`. No logarithm is taken. The estimate is compared serially
with 27 thresholds `10^((−1+0.5k)/10)` in Q4.12, one per cycle. The result
is the grid index `k` for `−1 + 0.5k` dB, rounded up, over −1 … 12 dB. The
estimate is ready 28 cycles after the last header sample.

`snr_lut` registers the index when the last LLR word arrives. It returns the
minimum iteration count for that SNR:

| SNR (dB) | −1 … 0.5 | 1 | 1.5 | 2 | 2.5 … 3.5 | 4 | 4.5 … 6 | ≥ 6.5 |
|---|---|---|---|---|---|---|---|---|
| minimum iterations | 50 | 42 | 10 | 6 | 4 | 3 | 2 | 1 |

These are the minimum iteration counts over 10⁶ simulated frames of the
CMMB rate-1/2 code with a limit of 50 iterations. In iteration `k`, counted
from 1, the tentative decision and the parity check run only when
`k ≥ minimum` or `k = 50`. A frame that decodes in exactly the minimum
number of iterations therefore still stops there. Rounding the SNR estimate
up picks the smaller minimum, which is the safe side when the estimate is
off.

## Interfaces

`ldpc_rx_top` has the parameters `P = 576`, `MAX_IT = 50` and `SYM_W = 8`.
Its ports:

* SOF input: `sof_start`, `sym_valid`, `sym[7:0]` (signed real samples),
  with `snr_valid` and `snr_idx` out.
* LLR input: `llr_valid` / `llr_ready`, `llr_in[8]` (6-bit signed). The
  decoder takes the most recent SNR index with the last word. Until the
  first estimate, the index is 0 (−1 dB), which means checks only in
  iteration 50.
* Decision output: `out_valid`, `out_addr[10:0]`, `out_bits[8]`
  (lane `k` = bit `k*1152 + out_addr`).
* Status: `busy` and `done`, plus `success`, `iters`, `par_runs`,
  `min_iter` and `alpha`. These stay valid after `done` until the next
  frame is loaded.

Reset is asynchronous and active low.

## Files

| file | contents |
|---|---|
| `rtl/ldpc_pkg.sv` | widths, code construction, minimum-iteration and alpha tables, SNR thresholds, SOF pattern |
| `rtl/ldpc_rx_top.sv` | top: estimator + decoder |
| `rtl/ldpc_decoder.sv` | datapath of the decoder |
| `rtl/ldpc_ctrl.sv` | phase and iteration controller |
| `rtl/agu.sv` | address generation |
| `rtl/cnu.sv`, `rtl/bnu.sv` | check and bit node units |
| `rtl/xbar_rot.sv` | rotation crossbar |
| `rtl/sdp_ram.sv` | simple dual-port RAM (edge, LLR and decision memories) |
| `rtl/tentative_unit.sv`, `rtl/parity_check.sv` | tentative decision, syndrome check |
| `rtl/snr_estimator.sv`, `rtl/snr_lut.sv` | SNV estimator, SNR tables and comparator |
| `tb/ldpc_ref_pkg.sv` | flat, bit-true reference model of the decoder and a noise source |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_ldpc_rx_top` runs at the default size (9216 bits, 50 iterations) and
  takes about a second with Verilator. It runs SOF headers at 20, 3 and
  0 dB, then all-zero-codeword frames with Gaussian noise. The test
  compares:
  * every decision bit, the iteration count, the number of parity phases,
    the success flag and the exact cycle count, against the reference
    model;
  * the SNR index, against a floating-point SNV estimate.

  It also requires that each mechanism happens at least once: skipped
  checks, a failed parity phase, early success, the iteration limit and
  more than one alpha.
* `tb_ldpc_decoder` does the same at P = 64 for seven frames and a range of
  SNR indices.
* The unit testbenches check each block against direct computations. One
  of them checks that every AGU sweep touches every edge exactly once.

* `tb_snr_sweep` is a workload run at the default size. It sends three
  frames per channel SNR from 1.5 to 6 dB through the whole receiver. SNR
  here means 1/σ² for unit BPSK amplitude, the same quantity the estimator
  measures. Each frame is checked bit-true against the model, and the model
  is also run with a parity check in every iteration, for comparison. The
  test requires that the adaptive schedule never loses a frame that the
  every-iteration schedule decodes. It prints per SNR point:
  * the spread of the SNR estimates;
  * the iteration counts;
  * parity phases run by each schedule;
  * the share of decoding cycles saved.

  Two results are worth knowing:
  * **The estimate is noisy.** A 26-sample header gives estimates several dB
    off at a single SNR point.
  * **An underestimate costs latency.** It selects a large minimum. A frame
    that would have decoded in 10 iterations can then only stop at
    iteration 42. The decoding outcome is unchanged, but the cycle count
    goes up.

  The table values were measured on the CMMB code. This design's own code
  and 6-bit arithmetic converge at different SNRs, so the table is only
  approximately right for it. Regenerate `min_iter_of` from simulations of
  the code actually used.

To run one with plain Verilator:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_rx_top.sv \
        --top-module tb_ldpc_rx_top -o sim && ./obj_dir/sim

## Departures and own choices

* **Parity-check matrix.** The design uses a quasi-cyclic (3,6)-regular code
  of the CMMB size, not the CMMB matrix. To use another code of the same
  degrees, the shift rule (`shift_of`), the bank mapping (`bank_of`) and the
  AGU address formula must change together.
* **Only the rate-1/2 CMMB-size code is built.** DVB-S2 short frames (16200
  bits, irregular codes, several rates) do not fit this datapath, and their
  minimum-iteration tables are not included.
* **Word widths** (6-bit messages), the **alpha values**, the **rounding**
  of the SNR estimate to the grid, the **DVB-S2 SOF pattern** and the
  **sequential phase schedule** are this design's own choices. The article
  does not specify them.
* The **comparison** `iteration ≥ minimum` is chosen so that no frame
  decodes later than without the scheme. The article's pseudo-code writes
  it as a strict comparison with an iteration counter whose start is not
  fixed. The last allowed iteration always checks.
* A **channel-LLR memory** per lane and the **decision read-out** port are
  additions; the article's block diagram does not show them.
* The **parity phase** computes the whole syndrome and does not stop at the
  first failing check.
* **Power** cannot be measured at RTL. The savings show up as skipped
  parity phases and gated decision-memory writes: `iters − par_runs`
  phases of 3465 cycles per frame.

# IIR filter with a Hamming-protected delay line (single encoder, shared locator)

A recursive (IIR) filter keeps its whole history in a delay line of state
words. A single event upset (SEU), a bit flipped in a register by a particle
strike, in that delay line is fed back through the recursion and can corrupt
the output indefinitely. This design protects the delay line with a
single-error-correcting Hamming code. It is arranged to use as little logic as
possible:

* **one encoder** for the whole line instead of one per tap;
* **corrected data moves on**: every tap passes its *corrected* data and its
  *unchanged* parity bits to the next tap;
* **one error locator** shared by all taps. Each tap keeps only a cheap
  syndrome calculator and an XOR corrector.

The multipliers only ever see corrected tap values, so a single upset never
reaches the output or the feedback path.

## Filter

The filter is a direct form II realisation of order `ORDER` (N = M):

```
w[n] = x[n] - sum_{k=1..N} a_k * w[n-k]
y[n] =        sum_{k=0..N} b_k * w[n-k]
```

The delay line holds `w[n-1] .. w[n-N]`. The new state `w[n]` is written
into its first tap.

Number format (this design's choice):
* Samples and states are signed 16-bit integers.
* Coefficients are signed 16-bit Q2.14 values, so |a_k|, |b_k| < 2.
* Both sums are formed at full precision, then shifted right by 14 bits.
  The shift is arithmetic, so results round toward minus infinity.
* `w[n]` and `y[n]` are then saturated to 16 bits.
* Coefficients are run-time inputs. Unused high-order coefficients can be set
  to zero to run a lower-order filter on a larger build.

## The protected delay line

This is the part that needs the most care (`protected_delay_line.sv`).

### Code

Each tap register holds a codeword: `DATA_W` data bits and `P_W` parity bits.
`P_W` is the smallest p with `DATA_W + p + 1 <= 2^p`. For 16 data bits that is
5, so the code is Hamming(21,16) and each tap is 21 bits wide.

The layout is the classic one:
* Codeword positions are numbered from 1.
* Parity bit j sits at position 2^j.
* Data bits fill the other positions in order. Data bit 0 is at position 3 and
  data bit 15 at position 21.
* Parity bit j is the XOR of the data bits whose position has bit j set.

The syndrome is the stored parity XOR the parity recomputed from the stored
data. It is therefore the position of a single flipped bit, or zero if no bit
flipped. The code corrects one error per word and does not detect two.

### Dataflow per tap

```
           w[n] --+--> [encoder] --parity--+
                  |                         v
                  +-----------data-------> tap 1 --+--> syndrome_1 --+
                                                   |                 |
                     corrected data_1 <--[corr_1]--+                 |
                           |    parity_1 (unchanged)                 |
                           v       v                                 |
                           tap 2 ------> syndrome_2 ------+          |
                           ...                            v          v
                                          grant + select --> [shared locator]
                                                                     |
                                        error vector to all correctors
```

* **Tap 1** is loaded with `w[n]` and the parity bits from the only encoder.
* **Tap k+1** is loaded with the corrected data of tap k and the parity bits
  of tap k as stored. The parity is never recomputed. Because the data moves
  on corrected, a word can be hit once in each tap it passes through and
  still be correct at every tap, as long as the hits fall in different taps.
* **Syndrome and corrector.** Every tap computes its syndrome and the OR of
  the syndrome bits (`nonzero`). Its corrector XORs the shared error vector
  into the tap's data when enabled.
* **Shared locator.** The locator decodes a syndrome into a one-hot error
  vector over the data bits. It exists once. The lowest-numbered tap whose
  syndrome is nonzero is granted the locator. Its syndrome is decoded, and
  only its corrector is enabled (its `nonzero` ANDed with the grant).

### One upset at a time

Sharing the locator assumes that only one tap holds an upset at any moment.
When two or more taps are flagged together:

* `err_conflict` rises, and only the granted tap is corrected that cycle.
* The other flagged taps are not miscorrected: their correctors are gated off
  by the grant, and their stored bits are left as they are. Their
  uncorrected values do reach the multipliers during that cycle.
* A data-bit upset left waiting is corrected after the next shift, once it is
  the only flagged tap, because its parity travels with it.

The grant gating and the `err_conflict` flag are additions of this design.
Two immediate assertions in `protected_delay_line` check, outside reset, that
the locator is granted to at most one tap and only to a flagged one.

### Parity-bit upsets

A flipped parity bit is detected but never repaired. Because parity is passed
on unchanged, it travels with its word to the end of the line and then drops
out. It does no damage, since the data bits are intact. It does, however,
take the shared locator in every cycle it is in the line. A data-bit upset in
another tap during that time is a conflict, handled as described above.

### Stalls

With the sample enable low the line holds. An upset in a held tap stays in
the register and is corrected again in every cycle. The stored bits are only
cleaned up when the word moves on. There is no background scrubbing.

## Top level: `iir_seu_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all taps to the all-zero codeword, which is valid) |
| `in_valid` | in | 1 | `x_in` carries a sample; the line shifts on this clock edge |
| `x_in` | in | 16 | input sample x[n], signed |
| `a_coef` | in | `[ORDER:1][16]` | a_1 .. a_N, Q2.14 |
| `b_coef` | in | `[ORDER:0][16]` | b_0 .. b_N, Q2.14 |
| `seu_inject` | in | `[ORDER:1][21]` | upset emulation: a set bit flips that stored bit at the clock edge; tie to 0 in use. Per tap: data in bits 15:0, parity in 20:16 |
| `out_valid`, `y_out` | out | 1, 16 | y[n], registered, one cycle after the accepted sample |
| `sat` | out | 1 | w[n] or y[n] of that sample was saturated |
| `err_detected` | out | 1 | some tap has a nonzero syndrome (combinational) |
| `err_corrected` | out | 1 | a data bit is being corrected (combinational) |
| `err_conflict` | out | 1 | more than one tap flagged (combinational) |

Timing:
* Throughput is one sample per clock.
* Latency is one cycle from `in_valid` to `out_valid`.
* The datapath from the taps through the multipliers and adders to `w[n]` and
  into tap 1 is one combinational path. It includes the corrector of each tap,
  the shared locator and the grant logic. This path sets the clock rate. The
  shared locator makes it longer than in a design with one decoder per tap.

Parameters (all with defaults): `DATA_W = 16`, `COEF_W = 16`,
`COEF_FRAC = 14`, `ORDER = 15`. The scheme was evaluated at orders 5, 10 and
15. The default is 15; orders 5 and 10 are builds with `ORDER = 5` or `10`.
Any `DATA_W` works: the parity width and the bit positions are computed at
elaboration from `iir_seu_pkg`.

At the defaults a coarse synthesis with yosys gives about 340 word-level
cells and 333 flip-flops: 15 x 21 in the delay line, plus the output register
and flags.

## Modules

| file | role |
|---|---|
| `iir_seu_pkg.sv` | parity width rule and data-bit positions |
| `hamming_encoder.sv` | the single encoder at the head of the line |
| `hamming_syndrome.sv` | per-tap syndrome and its OR |
| `hamming_locator.sv` | shared syndrome-to-error-vector decoder |
| `hamming_corrector.sv` | per-tap enabled XOR corrector |
| `protected_delay_line.sv` | taps, forwarding, grant logic, flags |
| `iir_df2_datapath.sv` | the two multiply-accumulate sums, scaling, saturation |
| `iir_seu_top.sv` | datapath + protected delay line + output register |

## Where this departs from, or adds to, the published scheme

Taken from the scheme:
* the direct form II structure;
* the Hamming SEC code and the parity-bit rule;
* one encoder at the head of the line;
* corrected data and unchanged parity passed from tap to tap;
* per-tap syndrome calculators and correctors with one shared locator;
* the orders 5, 10 and 15.

Chosen here, because the scheme leaves them open:
* the 16-bit data width and the Q2.14 coefficient format;
* rounding and saturation;
* run-time coefficients;
* the registered output and the `in_valid` handshake;
* the reset;
* the codeword bit layout;
* the priority grant of the shared locator, the gating of the correctors by
  the grant, and `err_conflict`;
* the `seu_inject` port.

Not covered by this design:
* Only the delay line is protected. The output register, the coefficient
  inputs and the combinational logic are not. Single event transients in the
  logic are out of scope.
* The conventional one-encoder-and-decoder-per-tap design and triple modular
  redundancy, which the scheme was compared against, are not included.
* The published FPGA area, clock-rate and power figures have not been
  reproduced.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops on its own, with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_hamming_encoder` | known vectors and random words against a reference model (`hamming_ref_pkg.sv`) |
| `tb_hamming_syndrome` | zero syndrome for clean words; the position of any single flipped bit |
| `tb_hamming_locator` | all 32 syndromes |
| `tb_hamming_corrector` | random data, enable on and off |
| `tb_protected_delay_line` | order 5 against a shadow model. Covers random single upsets with stalls, a word hit in every tap, two taps hit at once (conflict, then recovery after one shift) and an upset held through a stall |
| `tb_iir_df2_datapath` | both sums against an integer model, with and without saturation |
| `tb_iir_seu_top` | the default build (order 15) end to end. Covers a hand-checked impulse response, random filtering with stalls and random upsets, a word hit in all 15 taps, saturation, and a conflict followed by reset. It checks the one-cycle latency and counts each of these events |
| `tb_iir_seu_orders` | order-5 and order-10 builds filtering random data under random upsets (`iir_order_run.sv`) |

To run one, for example the top-level test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_iir_seu_top \
    rtl/iir_seu_pkg.sv tb/hamming_ref_pkg.sv -y rtl -y tb +libext+.sv \
    tb/tb_iir_seu_top.sv
./obj_dir/Vtb_iir_seu_top
```

Each testbench finishes in well under a second.

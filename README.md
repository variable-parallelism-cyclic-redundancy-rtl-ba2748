# Variable-parallelism CRC-24b for LTE turbo decoders

Every LTE turbo-coded block (K = 40 to 6144 bits, in steps of 8) ends with a 24-bit CRC.
A turbo decoder can recompute that CRC after each iteration, or each half iteration,
and stop decoding as soon as the CRC checks. For this to work, the CRC has to keep pace
with the decoder. A bit-serial divider needs K-24 cycles per check: 6120 cycles for the
largest block. At 450 Mb/s with twelve half iterations, that would mean a clock of
about 5.4 GHz.

Parallel CRC circuits divide P bits per cycle. They usually fix P when the circuit is
designed. A decoder's hard decisions, however, sit in memories and registers 1, 2 or 4
bytes wide, spread over several cores. Border windows can also be truncated. A frame
therefore reaches the CRC as a mix of word sizes.

This circuit takes **8, 16 or 24 bits per cycle, and the size can change from one word
to the next**. An optional build also takes 32 bits per cycle. Take a two-core decoder
that keeps its hard decisions in 16-bit registers. With K = 80, each core holds
16 + 16 + 8 bits. The words are fed as P-16, P-16, P-8, P-16, P-16, P-8, one per cycle,
with no gaps and no repacking.

The circuit computes the remainder for every parallelism at once, from the same
registers. Most bits of the wider results are built from bits of the narrower ones. The
8/16/24 network therefore costs 92 two-input XORs. A standalone 24-bit network alone
needs about 73.

The design follows the circuit published by Condo, Martina, Piccinini and Masera
("Variable Parallelism Cyclic Redundancy Check Circuit for 3GPP-LTE/LTE-Advanced",
IEEE Signal Processing Letters, 2014). The interface, the frame handling and the
P-32 network are this implementation's own. They are listed under
[Departures and choices](#departures-and-choices).

## The division being computed

Generator: g(x) = x^24 + x^23 + x^6 + x^5 + x + 1. Its low 24 coefficients form the
feedback mask `POLY24 = 24'h800063`.

Serial rule, one frame bit per step:

```
rm_next = {rm[22:0], bit} ^ (rm[23] ? 24'h800063 : 0)
```

The remainder shifts up and the new bit enters at bit 0. If a 1 leaves bit 23, the
generator is subtracted. Frame bits enter in transmission order. Inside a data word, the
earliest bit is the most significant valid bit. Each frame starts from a zero remainder.

Be careful about what this remainder is. The rule is plain long division of the bits
fed: it gives a(x) mod g(x). The parity that an LTE transmitter appends is
a(x)·x^24 mod g(x). That value is different, so the two cannot be compared directly.
Two checks both work with this circuit:

* **Whole-frame check.** Feed all K bits, data and the 24 received parity bits. Then
  compare the remainder with zero. A correctly received LTE block leaves exactly zero.
  The testbenches use this to check against real LTE parity.
* **Data-only check.** Feed only the K-24 data bits. Then compare with a reference
  value of the a(x) mod g(x) form.

The comparison value is the input `crc_expected`, so the user picks the check.

## How the three parallelisms share one XOR network

Unfolding the serial rule P times gives each bit of the new remainder as the XOR of some
bits of the old remainder `c` and some data bits `r_d`. The data sits MSB-aligned in the
24-bit register `r_d`:

* P-24 uses `r_d[23:0]`.
* P-16 uses `r_d[23:8]`.
* P-8 uses `r_d[23:16]`.

In every case `r_d[23]` is divided first. Because the data is MSB-aligned, all three
unfoldings see the same physical bits. The equations therefore overlap heavily. The
table below leaves out rows 6 and 13, which are short sums of two or three terms:

| result bits | P-8 (`rm8`) | P-16 (`rm16`) | P-24 (`rm24`) |
|---|---|---|---|
| 14..22 | `c[6..14]` (wires) | `rm8[6..14]` | `rm16[6..14]` |
| 9..12 | `c[1..4] ^ c[19..22]` | `rm8[1..4] ^ c[11..14]` | 9..11: `rm16[1..3] ^ rm16[19..21]`; 12: `rm16[4] ^ c[6]` |
| 1..4 | `r_d[17..20] ^ c[16..19]` | `r_d[9..12] ^ c[8..11]` | `r_d[1..4] ^ rm16[16..19]` |
| 7, 8 | 7: `r_d[23]^c[17]^c[22]`; 8: `c[0]^c[18]^c[23]` | `r_d[15..16] ^ c[9..10] ^ c[14..15]` | `r_d[7..8] ^ c[6..7] ^ rm16[17..18]` |
| 0, 5, 23 | long chains over `c[16..23]` | long chains over `c[7..23]`, reusing `rm8[23]` | long chains over `c[0..23]` |

Rows 0, 5 and 23 are the expensive ones. Each parallelism builds a few partial sums that
these three outputs share, for example:

* P-8: `v8 = c16^c17^c18^c19^c21^c22^c23` and `t8 = v8 ^ c20`.
* P-16: `u16 = c[8..11] ^ c13 ^ c14 ^ rm8[23]` and `t16 = u16 ^ c12`.
* P-24: `w24` and `x24`.

Written this way, `crc24_xor_net` has 92 two-input XORs:

* 31 in the shared partial sums;
* 18 more for P-8;
* 19 for P-16;
* 24 for P-24.

This equals the published gate count. A balanced-tree version of the network has a
critical path of 5 XORs (P-24 bits 0, 5, 23 and P-16 bits 0, 23; P-8 needs only 4). The
shared chains as written are deeper than that. A synthesis tool restructures them for
whatever clock target it is given. `tb_crc24_xor_net` checks every equation against the
serial rule.

A multiplexer then keeps the result that matches the parallelism of the word now in
`r_d`.

### P-32 option

Set `P32_EN = 1` to build the 32-bit option. It has the following effects:

* `r_d` grows to 32 bits. P-8, P-16 and P-24 stay in its top bits, and their network
  reads `r_d[31:8]`.
* A fourth network, `crc24_xor_p32`, adds the 32-step result.
* The largest data part (6120 bits) then fits in 192 words: 191 of P-32 and one of P-8.
  With P-24 it takes 255 words.

The P-32 equations are not derived by hand here. The module writes the 32-step unfolding
as a loop over the serial rule (`crc24_unfold` in `crc24_pkg`), and elaboration turns
that loop into a fixed XOR network. The published figure for this option is 54 extra
XORs and a critical path of 6 XORs. How much of the P-8/16/24 logic the P-32 network
shares is left to synthesis.

## Datapath, interface and timing

```
 in_d, in_par, in_first/last, in_valid
        |
   [crc24_rd_reg]  r_d register: stores d in the top bits of r_d
        |
   [crc24_xor_net] rm8, rm16, rm24        [crc24_xor_p32] rm32 (P32_EN)
        |                                   |
   [crc24_rm_mux]  select by parallelism of the word in r_d
        | rm
   [crc24_rem_reg] remainder c (24 flops); fed back as c_fb, forced to 0 on a frame's first word
        |
   [crc24_check]   rem == crc_expected  ->  crc_ok / crc_fail
```

Top module `crc24_varpar`. Parameter `P32_EN` (default `0`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a word is presented this cycle |
| `in_first`, `in_last` | in | 1 | word is the first / last of a frame (both for a one-word frame) |
| `in_par` | in | 2 | `crc24_pkg::par_e`: `PAR_8`, `PAR_16`, `PAR_24`, `PAR_32` |
| `in_d` | in | 24 (32) | data word, **right-aligned** (a P-8 word on `in_d[7:0]`); its top valid bit is the earliest frame bit |
| `crc_expected` | in | 24 | value the finished remainder is compared with |
| `rem` | out | 24 | remainder register |
| `rem_valid` | out | 1 | `rem` holds a finished frame's remainder |
| `crc_ok`, `crc_fail` | out | 1 | comparison result, valid while `rem_valid` is high |

How a word moves through the circuit:

* **Cycle t.** A word is presented. It is written into `r_d` at the end of the cycle.
* **Cycle t+1.** The network computes the word's remainder. It is written into `c` at
  the end of the cycle.
* **Cycle t+2.** If that word was the frame's last, `rem_valid`, `rem`, `crc_ok` and
  `crc_fail` are valid for this one cycle.

A frame of m bits in words of P bits therefore needs m/P input cycles, plus 2 cycles
of latency.

There is no backpressure, and the circuit accepts a word every cycle. Frames may follow
back to back: while the first word of a frame is in `r_d`, the remainder fed back to the
network is forced to zero. The previous frame's result still sits in `c` during that
cycle, so it is not lost.

`in_valid` may drop in the middle of a frame, and `c` simply holds its value. A `PAR_32`
word in the default build is a usage error: the top module has an assertion for it, and
the multiplexer ignores such a word.

## Departures and choices

* **The pipelined variant is not provided.** The published work also describes a version
  with four register stages inside the XOR network, taking one XOR delay per cycle and
  (m+4)/P cycles. The XOR trees sit inside the remainder feedback loop, however. How that
  loop is restructured so that one word per cycle still gets through is not described,
  and neither is the placement of its 154 registers. This design keeps to the
  combinational version, which is the main one.
* **Interface choices.** The valid/first/last framing, the right-aligned input bus, the
  parallelism encoding and the asynchronous reset are this design's choices, as are
  the zero start on a frame's first word (in place of a clear cycle) and the
  `crc_expected` input with its two flags.
* **Register count.** The remainder register has 24 flip-flops, matching the published
  count of delay elements. The `r_d` register and a few control flops come on top.
* **P-32 network.** It is derived by the synthesis tool from the unfolded serial rule.
  It is not a hand-shared netlist (see above).
* **No timing or area figures.** Published synthesis results (90 nm): 1 GHz in about
  1061 µm²; 2.5 GHz when area is relaxed; 833 MHz with P-32. They have not been
  reproduced, and the RTL makes no frequency claim. For the 450 Mb/s case above, P-24
  needs 255 cycles per check, so the decoder clock must be at least about 224 MHz.
* **Lint.** Verilator's lint reports one `SYNCASYNCNET` note on `rst_n`. The assertion in
  the top module samples reset synchronously, while the flip-flops use it
  asynchronously. The note is harmless and is left as it is.

## Files

| file | content |
|---|---|
| `rtl/crc24_pkg.sv` | generator mask, `par_e`, `word_ctl_t`, serial step and unfolding functions |
| `rtl/crc24_rd_reg.sv` | `r_d` register with MSB alignment |
| `rtl/crc24_xor_net.sv` | P-8/16/24 shared XOR network |
| `rtl/crc24_xor_p32.sv` | P-32 network (optional) |
| `rtl/crc24_rm_mux.sv` | parallelism multiplexer |
| `rtl/crc24_rem_reg.sv` | remainder register, frame start and result flag |
| `rtl/crc24_check.sv` | remainder comparator |
| `rtl/crc24_varpar.sv` | top module |
| `tb/crc24_ref_pkg.sv` | reference models: bit-serial division, LTE parity LFSR |
| `tb/crc24_e2e_env.sv` | end-to-end stimulus and scoreboard for one instance |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Each testbench checks its block against models written independently of the RTL, and
ends by printing `TB_RESULT checks=N failures=M`:

* `tb_crc24_xor_net`, `tb_crc24_xor_p32`: every output against the bit-serial division.
  Inputs are walking ones and 2000 random pairs of `r_d` and `c`.
* `tb_crc24_rd_reg`, `tb_crc24_rm_mux`, `tb_crc24_rem_reg`, `tb_crc24_check`:
  cycle-by-cycle models of alignment, selection, load and hold, zero start and result
  flag, and comparison. The first two cover both builds (with and without P-32).
* `tb_crc24_varpar` runs both builds end to end. Stimulus:
  * the K = 80 two-core example;
  * a K = 6144 block, which must take exactly 255 words (192 with P-32), one per cycle;
  * 40 random frames per build.

  Every word's parallelism is random, with idle cycles and back-to-back frames. Half of
  the frames are full LTE blocks whose parity comes from an independent LFSR, and these
  must leave zero. Some frames are corrupted on purpose. Every result is checked for
  value, `crc_ok`/`crc_fail` and the exact 2-cycle latency. The testbench also counts
  each mechanism and fails if one never occurred: each parallelism, a parallelism
  switch, back-to-back frames, an idle cycle, pass, fail, the K = 80 case, a full frame
  and a maximum-size frame.
* `tb_crc24_full` uses the default build with default parameters. It feeds one
  maximum-size block (K = 6144) in words of random size, which must give a zero
  remainder, and then the block's data part in 255 P-24 words.

Running with plain Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/crc24_pkg.sv tb/crc24_ref_pkg.sv tb/tb_crc24_varpar.sv --top-module tb_crc24_varpar
./obj_dir/Vtb_crc24_varpar
```

Replace the testbench name to run the others. Each one finishes in well under a second.

## Changing it

* **Another generator polynomial.** Change `POLY24` in `crc24_pkg`, and `GEN25` in the
  testbench reference package. `crc24_xor_p32` follows automatically. The hand-shared equations in
  `crc24_xor_net` are specific to this generator and must be re-derived: unfold the
  serial rule symbolically and look for reuse between parallelisms. `tb_crc24_xor_net`
  will flag any mismatch.
* **Other word sizes.** A new parallelism needs a new `par_e` code, a network instance
  (the `crc24_unfold` approach of `crc24_xor_p32` works for any size up to 32), a
  multiplexer arm and an alignment case in `crc24_rd_reg`.

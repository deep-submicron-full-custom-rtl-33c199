# Partially bit-serial Min-Sum LDPC decoder

This is a fully parallel decoder for regular LDPC codes of the size used by
10GBASE-T (IEEE 802.3an): 2048 code bits, 384 parity checks, every bit in 6
checks and every check over 32 bits. Every bit node and every check node
exists in hardware. Every edge of the Tanner graph is a single wire in each
direction. Messages cross those wires one bit per clock cycle, most
significant bit first. This cuts the wiring between the 2048 bit nodes and
384 check nodes (the part that dominates a bit-parallel decoder) by the
message word length. Inside the bit node the arithmetic stays
word-parallel, so one iteration takes only `W + 2 = 8` clock cycles for
6-bit channel values.

The decoder runs the normalised Min-Sum algorithm with a factor of 0.5. The
normalisation is moved from the check node to the bit-node output, so every
message on a wire is 5 bits: a sign and 4 magnitude bits. Decoding stops early
once all 384 parity checks hold. The check uses the hard decisions of the
current iteration, which travel to the check nodes on the same wires in
cycles the messages leave free.

The package `rtl/` also holds two building blocks of a hardware decoder test
bench: a combined Tausworthe uniform random number generator and a bit/frame
error counter. They are independent of the decoder. The top module places
them next to it with their own `urng_*` and `ber_*` ports.

## Top level and data flow

```
 in_llr (P x W) --> llr_input_buffer --(N x W)--> 2048 x bit_node <==wires==> 384 x check_node
                                                        |  dec                   | parity_ok
                                                        v                        v
 out_bits (P)  <-- dec_output_buffer <--------------- ldpc_ctrl <-------------- AND of all
```

`ldpc_decoder` (the top) has:

* an input buffer that collects `N/P = 32` beats of `P = 64` channel values
  (valid/ready handshake) while the previous block is decoded;
* the node array and its interconnect;
* a controller that sequences the iterations and broadcasts phase strobes
  (`phase_t` in `ldpc_pkg`);
* an output buffer that streams the 2048 decisions out in 32 beats, with
  `out_last`, the number of iterations (`out_iters`) and whether all checks
  were met (`out_conv`).

`max_iter` (0..31) and `et_en` (early termination on/off) are run-time
inputs.

Timing of one block on an idle decoder:

| cycles after the last input beat | event |
|---|---|
| 1 | controller leaves idle |
| 2 | INIT: channel values copied into the bit nodes |
| 3 ... | iterations, 8 cycles each |
| 3 + iters*8 + 6 | first output beat valid |

With `iters` iterations the first output beat comes `3 + 8*iters + 6`
cycles after the last input beat, for example 201 cycles for 24 iterations.
When blocks arrive back to back, a new block starts every `8*iters + 9`
cycles. If the output buffer is still streaming the previous block when a
block finishes, the controller holds the decoder until the buffer is free.

## The iteration schedule

All nodes step through the same 8-cycle plan (`W = 6`). The controller
supplies the cycle number and strobes:

| cycle | bit node → check node wire | check node → bit node wire | inside |
|---|---|---|---|
| 0 | sign of L(q) | hold | bit node saturates, halves and converts its new messages |
| 1 | magnitude bit 3 | hold | check node registers the signs |
| 2 | magnitude bit 2 | sign of L(r) | check node starts the minimum search |
| 3 | magnitude bit 1 | magnitude bit 3 | bit node: sign-extension cycle of the adder |
| 4 | magnitude bit 0 | magnitude bit 2 | bit node: accumulate |
| 5 | hard decision | magnitude bit 1 | bit node: accumulate |
| 6 | hard decision | magnitude bit 0 | check node registers the decisions, parity valid; controller decides whether to stop |
| 7 | hard decision | hold | bit node: last accumulation |

Each wire carries message bits in 5 of its 8 cycles. The hard decision goes
into the spare cycles, so the exact parity of every check comes at no cost
in throughput.

## Check node

`check_node` registers the 32 incoming bits every cycle. It sends:

* the XOR of all signs except each input's own sign (a 32-input XOR and 32
  two-input XORs);
* the minimum magnitude over all other inputs.

`cn_min_search` finds the minimums MSB first with 90 instances of
`bcs_min_cell`:

* a tree of 30 cells finds the minimum of every group of 2, 4, 8 and 16
  inputs;
* an inverse tree of 60 cells combines, for every group, the minimum of the
  sibling group with the minimum of everything outside the parent.

The top tree level, the minimum of all 32 inputs, is never needed and is not
built.

`bcs_min_cell` compares two numbers one bit per cycle. It has two status
flops:

* `found`: the operands have already differed in a higher bit;
* `b_min`: which operand was smaller at that bit.

Until the operands differ the cell outputs their common bit. After that it
passes the smaller operand through.

`parity_ok` is the XNOR of the 32 hard decisions. It is valid in cycle 6.
The controller ANDs all 384 of them.

## Bit node: an MSB-first multi-operand adder

This is the subtle part. Each bit node receives 6 messages in sign-magnitude
form, one bit per cycle, MSB first. Within the same 8 cycles it must produce:

* the a-posteriori sum `L(Q) = Lc + Σ r`;
* six extrinsic sums `L(q_j) = L(Q) - r_j`.

`bit_node` does this with one shared column adder and seven accumulators.

1. **One's complement** (`bn_input_stage`). A negative sign-magnitude
   number is turned into one's complement by inverting its magnitude bits.
   The missing `+1` per negative operand is collected as a correction term:
   * `C`, the number of negative messages, for `L(Q)`;
   * `C - 1` for the extrinsic sum of a message that is itself negative.

   These terms are fed LSB-aligned into the last three accumulation cycles.
2. **Sign-extension cycle** (`bn_psum_gen`, cycle 3). The sign bits of the
   one's-complement messages carry weight `-2^4`. The channel value has one
   more bit than the messages, so this cycle also takes the channel's top
   two bits. When those two bits differ (`10` or `01`) the plain circuit
   would be off by two. An a-priori correction of ±2 fixes the partial sum.
3. **Subtraction logic**. The column sum `sum` counts every operand bit.
   `sub` is `sum` minus one bit: each extrinsic accumulator removes its own
   message by choosing `sub` when its own message bit is 1.
4. **Accumulation** (`bn_accumulator`). Each cycle computes
   `acc = 2*acc + partial`. The upper half of this 8-bit addition uses a
   carry-select structure.

   Eight bits are enough: the largest magnitude is `32 + 6*15 = 122`.
5. **Output conversion** (cycle 0 of the next iteration). The finished sum
   is turned into sign and magnitude. The magnitude is halved (the 0.5
   normalisation, truncating toward zero), saturated to 15 and shifted out
   MSB first. The sign of `L(Q)` is the hard decision.

In the first iteration the accumulators are preset with the channel value.
This makes the first outgoing messages equal to `Lc` (normalised and
saturated).

## Controller

`ldpc_ctrl` has four states:

* IDLE: waits for a full input buffer.
* INIT: one cycle; the nodes load the channel values.
* RUN: the iterations.
* HOLD: a finished block waits for the output buffer.

In cycle 6 of each iteration the controller stops the block in either case:

* early termination is on and all parity checks hold;
* the number of completed iterations has reached `max_iter`.

Outside RUN the node registers do not change, because `ph.run` acts as their
enable. In silicon this enable is a global clock gate.

## Code structure

The parity-check matrix is a 6 × 32 array of 64 × 64 cyclic permutation
matrices. Block `(r, c)` is shifted by `(r*(c+1) + c) mod 64`. The
interconnect is generated from this rule by `bn_edge_cn` and `cn_edge_bn` in
`ldpc_pkg`.

This is **not** the permutation set of IEEE 802.3an: that code is built from
a Reed-Solomon code, and its permutation tables are not reproduced here. The
code has the same size, degrees and regularity, so hardware size and timing
are representative. Decoding performance of the real code will differ. To
use the real code, replace `h_shift` (or `bn_edge_cn`/`cn_edge_bn`) with
the standard's mapping. Nothing else depends on it.

## Test-bench building blocks

* `tausworthe_urng`: three LFSRs with characteristic polynomials
  `z^31 - z^13 - 1`, `z^29 - z^2 - 1` and `z^28 - z^3 - 1`, stepped by 12, 4
  and 17 bits per cycle and XORed together. It gives a 32-bit uniform word
  per cycle with a period of about 2^88. It is meant to feed a Box-Muller
  noise generator, which is not included.
* `ber_analyzer`: compares decoded and sent bits beat by beat. It counts bit
  errors, frames with at least one error, and frames.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 2048 | code length; `Z = N/DC` is the permutation size |
| `DV`, `DC` | 6, 32 | bit and check node degree (`DC` a power of two) |
| `W` | 6 | channel value width; messages are `W-1` bits |
| `P` | 64 | channel values / decisions per I/O beat |
| `ITW` | 5 | width of `max_iter` and `out_iters` |

## Where this design departs from a silicon decoder of this kind

* The parity-check matrix is a stand-in (see above).
* Clock gating and node disabling appear as register enables, not gated
  clocks.
* The I/O buffers and their handshakes are a plain choice of this design.
* Normalisation truncates toward zero.
* Critical path, area and power depend on the cell library and layout, and
  cannot be judged from the RTL. At 201 cycles per block (24 iterations), a
  rate of 3.125 million blocks per second needs a clock period of 1.59 ns.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`.

* `tb_bcs_min_cell`, `tb_cn_min_search`, `tb_check_node`: random operands
  against integer minimum, sign and parity computations.
* `tb_bn_psum_gen`, `tb_bn_input_stage`, `tb_bn_accumulator`,
  `tb_bit_node`: exhaustive or random inputs against integer sums of the
  same operands, including saturation and the a-priori correction cases.
* `tb_ldpc_ctrl`, `tb_llr_input_buffer`, `tb_dec_output_buffer`: phase
  sequence, stop conditions, iteration count, hold behaviour, beat order and
  handshakes.
* `tb_tausworthe_urng`: every component state against a bit-level model of
  its recurrence, plus a histogram check.
* `tb_ber_analyzer`: counters against injected errors.
* `tb_ldpc_decoder`: end to end at `N = 256` (`Z = 8`), with the real
  `DV = 6`, `DC = 32` and `W = 6`. Every block is decoded by a bit-true
  reference model (`tb/ldpc_ref_pkg.sv`). All decisions, the iteration count
  and the convergence flag must match. The idle latency is checked against
  `3 + 8*iters + 6`. The test covers:
  * several noise levels and pure noise;
  * saturating inputs and an input that is already a code word;
  * early termination off, `max_iter` 0 and 31;
  * back-to-back blocks under output back-pressure, which makes the
    controller hold.

  Each of these mechanisms is counted and must occur.

The largest size simulated is `N = 256`. The full `N = 2048` decoder
elaborates and lints cleanly, but its verilated model is too large to build
in reasonable time.

Build and run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv rtl/*.sv tb/tb_ldpc_decoder.sv \
  --top-module tb_ldpc_decoder -Mdir obj && obj/Vtb_ldpc_decoder
```

Smaller testbenches need only the package, `tb/tb_util_pkg.sv` and the
modules they instantiate.

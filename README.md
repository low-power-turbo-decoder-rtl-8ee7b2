# Turbo decoder with early give-up and state reuse

A turbo decoder normally keeps iterating until its output checks out or it hits
a fixed iteration limit. When the channel is bad, most packets reach that limit
and still fail. All those iterations cost energy and delay the retransmission
that will be needed anyway.

This design adds two things to a 3GPP turbo decoder:

* **Early give-up.** After each iteration the decoder adds up the magnitudes of
  all extrinsic values. On a packet that is converging this sum grows from one
  iteration to the next. On a packet that will fail it stalls or oscillates. The
  first time the sum does not grow, the decoder stops and asks for a
  retransmission.
* **State reuse.** The extrinsic values of the abandoned packet are kept in
  memory. When the retransmitted copy of the same packet arrives, its first
  half-iteration uses them as a-priori information instead of starting from
  zero, so it usually needs fewer iterations.

The hardware cost of the give-up detector is one accumulator, one register and
one comparator next to a full sliding-window Log-MAP decoder.

## Decoding flow

A packet is K = 1024 bits. Its last 16 bits are a CRC-16 of the rest (generator
x^16+x^12+x^5+1). The decoder receives K channel triplets (systematic, parity 1,
parity 2) and then runs iterations. Each iteration is two half-iterations of
the same MAP decoder:

1. **Code 1** in natural order, with a-priori values from the extrinsic memory.
2. **Code 2** in interleaved order. Its extrinsic outputs are written back
   de-interleaved, and hard decisions are taken from its LLRs.

After each iteration the flow controller (`flow_ctrl`) checks, in this order:

| check | result | retransmission requested |
|---|---|---|
| CRC of the hard decisions is zero | `RES_VALID` | no |
| give-up enabled and the sum of \|Le\| did not grow | `RES_GIVEUP` | yes |
| iteration count reached `MAX_IT` (10) | `RES_MAXIT` | yes |
| otherwise | next iteration | |

The termination check comes before the give-up check on purpose. A packet that
already decodes correctly is then never thrown away because its extrinsic sum
happened to dip. With `giveup_en = 0` the decoder behaves like a plain decoder
with CRC early termination.

Reuse: the flow controller remembers whether the last packet failed. If the next
packet arrives with `in_retx = 1`, the extrinsic memory is left as it is, and
the first half-iteration reads it as a-priori input. In every other case, the
a-priori input of the first half-iteration is forced to zero.

## The sliding-window MAP decoder

This is the hardest part to follow. `siso_map` decodes one half-iteration with
a sliding-window Log-MAP algorithm and several processing elements (PEs):

* **WP** (`wp`) fetches the symbols of one window from the frame memories and
  writes them into one bank of **M1**. WP goes through the interleaver in the
  second half-iteration.
* **FP** (`fp`) runs the forward recursion over a window. It stores each alpha
  vector in one bank of **M2**.
* **BP0 and BP1** (`bp`) run the backward recursion. One of them spends a window
  *learning*: it runs backwards over the next window from equal metrics, so that
  its beta values are reliable at the window border. Meanwhile the other runs
  the *valid* pass over the current window. The valid pass reads the matching
  alpha from M2 and feeds alpha, beta and gamma to the soft-output unit. The two
  BPs swap roles every window.
* **Soft output** (`soft_output`) is a four-stage pipeline. It finds the LLR
  with a three-level max* tree for each decision value, and then the extrinsic
  value Le = LLR − La − ys.

The window length is L = 32, so there are NW = K/L = 32 windows. One
half-iteration runs NW+3 *stages*. In stage p:

| PE | works on window | memory |
|---|---|---|
| WP | p | writes M1 bank p mod 4 |
| FP | p−2 | reads M1, writes M2 bank (p−2) mod 2 |
| learning BP (BP number p mod 2) | p−1 | reads M1 |
| valid BP (the other one) | p−3 | reads M1 and M2 bank (p−3) mod 2, drives soft output |

So M1 has four banks: one being written, and three being read by FP and the two
BPs. M2 has two banks (ping-pong): FP fills one while the valid BP drains the
other. Backward recursions read their window in reverse address order. For the
last window there is nothing to learn from: that BP just loads equal metrics
(no trellis termination is decoded).

`pe_controller` starts every active PE at the beginning of a stage. It waits for
all their `done` levels, plus the soft-output pipeline to drain, before starting
the next stage. A stage therefore lasts as long as its slowest PE, about L+4
cycles.

Extrinsic values and decisions are written back through one write stage in the
top. In the first half-iteration the address is k; in the second it is π(k).
The memories are updated in place. That is safe because WP reads a window
three stages before the soft output rewrites it.

## Arithmetic

All values are two's complement with 3 fractional bits:

| quantity | bits | range |
|---|---|---|
| channel symbol | 6 | ±4 |
| branch metric | 9 | |
| state metric (alpha, beta) | 11 | |
| LLR | 12 | |
| extrinsic / a-priori | 8 | ±16 |

* **Branch metrics** (`gamma_unit`): only two values are computed,
  A = (La + ys + yp)/2 and B = (La + ys − yp)/2. The four branch labels use
  ±A and ±B. This works because BPSK makes the metric of a label the negative
  of the metric of its complement.
* **max\*** (`max_star`): max(a, b) + f(|a − b|). The correction f is a table
  holding round(8·ln(1 + e^(−d/8))) in units of 1/8. It is 6 at d = 0 and
  reaches zero at d = 22.
* **ACSO** (`acso`): add–compare–select–offset. Eight ACSO cells make one
  trellis step (`sm_update`). The same cells serve forward and backward.
* **Normalisation**: state metrics only grow, so they are renormalised the
  modulo-free way. If any new metric in a step is at least 512 (half the 11-bit
  range), 512 is subtracted from all eight, and the result is saturated to
  11 bits. The check is a few OR gates, and its cost does not grow with the
  number of states. `norm_evt` reports each time it happens.
* **Start values**: the forward recursion starts at 0 for state 0 and −256 LSB (−32.0) for
  the others. Backward recursions, and the learning BP, start at all zeros.

Channel values must arrive already multiplied by the channel reliability
Lc = 4·Es/N0. The design does not hold an Lc table.

## Give-up detector

`giveup_detector` accumulates |Le| over the K extrinsic outputs of the second
half-iteration. A counter loaded with the frame size marks the end of the sum.
It then compares the sum with a *Max* register. If the sum is larger, the sum
is stored in Max. Otherwise `give_up` is raised. Max is cleared at the start of
each packet, so the first iteration gives up only if all its extrinsic values
are zero. `giveup_eval` pulses
once per comparison. The unit is idle when `giveup_en` is low, which is the
hook for gating its clock.

## Interleaver

`interleaver_rom` holds the 3GPP TS 25.212 internal interleaver for the
compile-time K. The table is computed at elaboration by a constant function.
The function picks the number of rows (5, 10 or 20), the prime p and primitive
root, the column count, the intra-row sequence and the inter-row pattern, and it
prunes padding. No data file is needed. For K = 40 the function reproduces the
worked 5 × 8 example of the standard exactly. The ROM has two registered read ports:
WP uses one, and the write-back stage uses the other.

## Interface and timing (`turbo_decoder`)

| port | dir | meaning |
|---|---|---|
| `giveup_en` | in | enable early give-up |
| `in_valid`, `in_ready`, `in_ys`, `in_yp1`, `in_yp2` | in/out | K channel triplets, 6-bit q(6,3) |
| `in_retx` | in | sampled with the first triplet: this packet resends the last failed one |
| `res_valid`, `res`, `res_iters`, `retx_req` | out | one-cycle result pulse: outcome, iterations used, resend request |
| `dec_raddr`, `dec_rdata` | in/out | read the decoded bits (one cycle latency) once the result is out |
| `busy` | out | decoding in progress |
| `giveup_eval`, `norm_evt`, `reuse_active` | out | activity flags |

Measured at the defaults (K = 1024, L = 32):

* Loading a packet takes K cycles.
* A half-iteration takes 1296 cycles (35 stages).
* A full iteration, including the CRC pass of K+2 cycles, takes 3623 cycles.
  That is 72.5 µs at 50 MHz.

Memories: frame memories 3 × 1024 × 6 bits, extrinsic 1024 × 8, decisions
1024 × 1, interleaver 1024 × 10, M1 4 × 32 × 20, M2 2 × 32 × 88.

## Where this design departs from the source design

* **M1 word**: an M1 word holds the a-priori value next to ys and yp (20 bits
  instead of 12). M1 is 2560 bits rather than 1536. The alternative, reading the
  extrinsic memory three times per window, would need more ports.
* **One MAP decoder** serves both constituent codes in turn. This is the usual
  arrangement, and the only one that gives the "same state" needed for reuse.
* **No tail bits.** The trellis is not terminated and the last window's backward
  recursion starts from equal metrics. The encoder's tail is simply not used.
* **Termination test**: CRC-16 over the decisions, with the CRC carried in the
  last 16 bits of each packet. The generator polynomial is a choice of this
  design.
* **Quantisation**: only the one scheme above (3 fractional bits everywhere) is
  built. Other word lengths need a new max* table.
* **Frame size** is a compile-time parameter. K must be a multiple of L. The
  3GPP range 40–5114 at run time is not supported.
* **Retransmission** is signalled from outside with `in_retx`. The design does
  not match packets by itself.
* Memories are plain arrays (`dp_ram`, `m1_buffer`, `m2_buffer`) with registered
  reads. Any dual-port SRAM with the same behaviour can replace them.

## Verification

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
one compares against an independent model in `tb/tb_tdec_pkg.sv`. That package
contains a reference encoder, interleaver, CRC, branch-metric and state-metric
step, and a Gaussian noise source. Each testbench prints
`TB_RESULT checks=N failures=M`. Highlights:

* `tb_siso_map` runs whole half-iterations against a bit-exact sliding-window
  model, and checks every LLR and Le value.
* `tb_interleaver_rom` checks the table against a reference for K = 40 (the
  worked 5 × 8 example) and K = 1024, and checks that it is a permutation.
* `tb_turbo_decoder` runs the full design at its default parameters. It covers:
  * a clean packet (valid after 1 iteration) and a noisy one (valid after 2);
  * pure noise with give-up (gives up after 2 iterations), and the same packet
    without give-up (runs all 10 iterations);
  * a bad-SNR packet that is given up, followed by its better retransmission
    decoded with reuse.

  It counts each mechanism (CRC termination, give-up, iteration limit,
  retransmission request, reuse, normalisation, multi-iteration decode) and
  fails if any never happened. It also checks the iteration latency and the
  decoded bits.

Two more testbenches run the system-level experiments on a few hundred packets
at the default size. Each takes 10–15 s of wall time.

* `tb_flow_workload` compares the traditional flow with the proposed one:
  * traditional: no give-up, and every resend starts from zero;
  * proposed: give-up on, and a resend reuses the kept state.

  It uses 32 packets per SNR, Eb/N0 from 0.0 to 0.8 dB. A resend is 1 dB better
  than the first send. Both flows see the same noise. A typical run (seed 1)
  gives these averages:

  | Eb/N0 | traditional | proposed |
  |---|---|---|
  | 0.0 dB | 10.75 iterations per valid packet | 7.44 |
  | 0.2 dB | 8.72 | 6.75 |
  | 0.4 dB | 5.38 | 4.94 |

  At higher SNR the two flows converge. The testbench also counts false
  alarms: give-ups on a first send that the traditional flow then decodes. In
  the seed-1 run, 4 of the 39 first-send give-ups were false alarms.
* `tb_reuse_workload` isolates state reuse. It collects given-up packets at
  0.0 and 0.5 dB, then decodes a resend 0, 0.5 or 1.0 dB better, once with the
  kept state and once from zero. Reuse saves about 0.5 to 1.3 iterations per
  resend. It saves more when the packet was given up at the better SNR.

To run one testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/tdec_pkg.sv tb/tb_tdec_pkg.sv tb/tb_turbo_decoder.sv \
  --top-module tb_turbo_decoder -o sim
./obj_dir/sim
```

Replace `tb_turbo_decoder` with any other testbench. The full-size run finishes
in well under a second of simulation time.

## Files

| file | role |
|---|---|
| `rtl/tdec_pkg.sv` | widths, types, trellis, branch metric, max* table, saturation |
| `rtl/max_star.sv`, `rtl/acso.sv`, `rtl/gamma_unit.sv`, `rtl/sm_update.sv` | arithmetic |
| `rtl/fp.sv`, `rtl/bp.sv`, `rtl/wp.sv`, `rtl/soft_output.sv` | processing elements |
| `rtl/m1_buffer.sv`, `rtl/m2_buffer.sv`, `rtl/dp_ram.sv` | memories |
| `rtl/pe_controller.sv`, `rtl/siso_map.sv` | stage schedule and the MAP decoder |
| `rtl/interleaver_rom.sv` | 3GPP interleaver |
| `rtl/giveup_detector.sv`, `rtl/crc16.sv`, `rtl/flow_ctrl.sv` | decoding flow |
| `rtl/turbo_decoder.sv` | top level |
| `tb/tb_tdec_pkg.sv`, `tb/tb_*.sv` | reference models and testbenches |

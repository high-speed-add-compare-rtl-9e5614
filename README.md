# A 16-state Viterbi decoder built around a fast add-compare-select loop

A Viterbi decoder recovers a convolutionally encoded bit stream from noisy received
symbols by tracking, for every state of the encoder, the cheapest path that leads to it.
In a state-parallel decoder all states are updated at once, every clock, and the speed of
the whole decoder is set by one feedback loop: state metrics leave a register, pass
through an **add-compare-select (ACS)** unit and return to the same register in the next
cycle. Nothing can be pipelined inside that loop, so the ACS delay plus one flip-flop delay
*is* the clock period, and the clock period *is* the time per decoded bit.

This RTL implements such a decoder for a constraint-length K = 5, rate-1/2 code
(2^(K-1) = 16 states). Its ACS unit is arranged for speed: each candidate metric comes
from a saturating Kogge-Stone adder, and the comparison is not a subtraction but a
single carry computation. The design was originally aimed at a self-resetting dynamic
CMOS circuit style; that circuit style is not something RTL can express, so what is here
is the logic of that design, which any standard-cell flow can map.

## Block structure

```
 r0,r1 (4b each)        BM0..BM3 (5b)                  NSM 16x8
 ------------> bmc ------------------> acs_array ---------------> pipeline_register
                                        ^   |                          |
                                        |   +------ SM 16x8 <----------+
                                        |
                                        +--> PS (16 decisions) --> path_memory --> decoded
```

| Module | Role |
|---|---|
| `viterbi_decoder` | Top: wires the four blocks below. |
| `bmc` | Branch metric calculator, combinational. |
| `acs_array` | 16 `acs_unit`s wired by the trellis. |
| `acs_unit` | Two `sat_adder`s, one `acs_comparator`, one `acs_selector`. |
| `pipeline_register` | 128 flip-flops holding the state metrics (`dff_ar`, `dff_as`). |
| `path_memory` | Register-exchange survivor memory built of `dff_ar`. |
| `viterbi_pkg` | Widths, generators and the encoder branch function. |

The BMC and the ACS array are purely combinational. Only the state-metric register and
the path memory are clocked. Both load on the rising edge, and both share the active-low
asynchronous reset `rb`.

## The ACS unit

For every next state j there are two predecessors. Call them upper and lower. The unit:

1. **Adds** the branch metrics to the predecessor metrics in two `sat_adder`s:
   SU = SMu + BMu and SL = SMl + BMl. The 5-bit branch metric is zero-extended, and the
   sum is formed by a three-level radix-2 Kogge-Stone prefix tree. Metrics are unsigned
   8-bit numbers.
2. **Saturates.** If the adder's final carry is 1, every sum bit is forced to 1, so the
   result is 255 rather than a wrapped small number. A wrapped sum would make a bad path
   look like the best one. Each adder also drives a complement rail `sn = ~s`, which the
   comparator uses.
3. **Compares** using only an adder's final carry. With the complement of SL fed in and
   a carry-in of 0, SU + ~SL >= 256 exactly when SU > SL. So the carry itself is the
   path-select bit:
   `PS = 0` if SU <= SL, and `PS = 1` if SU > SL.
   `acs_comparator` computes just that carry, with a group generate/propagate tree of
   depth log2(8) = 3 and no sum logic.
4. **Selects** the survivor: NSM = SU when PS = 0, and SL when PS = 1. On a tie, the upper
   path wins.

The decision bits PS of all 16 units go to the path memory.

## Code, trellis and branch metrics

- **State numbering.** A state is the last four input bits, with the newest in bit 0.
  Input u moves state s to {s[2:0], u}.
- **Predecessors.** State j has two predecessors. The upper one is {0, j[3:1]} and the
  lower one is {1, j[3:1]}. So PS[j] is exactly the bit the survivor drops.
- **Generators.** The code uses 1 + D^3 + D^4 and 1 + D + D^2 + D^4 (octal 23 and 35).
  This is the K = 5 pair with the largest free distance (7). Change them in
  `viterbi_pkg` (G0, G1): the ACS array wiring follows automatically, because
  `acs_array` derives which branch metric feeds which adder from
  `viterbi_pkg::branch_code` at elaboration time.
- **Soft inputs.** Each received value is 4 bits: 0 means a confident '0', 15 a confident
  '1'. The four branch metrics are Manhattan distances,
  BMk = |R0 - 15*c0| + |R1 - 15*c1| with k = 2*c0 + c1. They lie in 0..30, which fits
  5 bits.

## Start condition and metric range

The state-metric register contains two flip-flop types:

- state 0 uses flip-flops with asynchronous *reset*, so its metric starts at 0;
- states 1..15 use flip-flops with asynchronous *preset*, so theirs start at 255.

After `rb` is released, decoding therefore starts from the all-zero encoder state.

There is **no metric normalisation**. The saturating adders keep metrics from wrapping,
but they cannot stop them from growing. Once the metric of the true path reaches 255,
it ties with the losing paths and decisions become arbitrary. On clean input the true
path's metric stays near 0 indefinitely. On noisy input, frames have to be short enough
(or restarted by reset) for the accumulated noise distance to stay below 255. The test
uses frames of 105 symbols. If you need unbounded streams, add normalisation: subtract
a common value when all metrics exceed a threshold. It is one extra compare and
subtract, outside the ACS loop's adders.

## Path memory and latency

`path_memory` is a register exchange. Each state holds a 25-bit survivor, with its own
input bit in bit 0. On every clock edge, state j copies the survivor of its chosen
predecessor {PS[j], j[3:1]}, shifts it up by one and appends j[0]. The oldest bit of
state 0's survivor is the output.

- **Depth.** `DEPTH = 25` is five times the constraint length. After that many steps the
  survivors of all states have normally merged, so reading a fixed state is enough.
- **Latency.** The symbol present at the inputs before rising edge n is decided on
  `decoded` right after edge n + DEPTH - 1, i.e. 24 clocks later.
- **Throughput.** One decoded bit per clock, continuously.
- **Reset.** Survivors clear to 0, so the first 24 output bits after reset are 0.

## Timing budget

The loop from the metric register through an ACS unit and back is the critical path. The
per-bit time is therefore the flip-flop clock-to-Q plus the ACS delay. The
branch-metric path (inputs → BMC → ACS) runs in parallel with the register's clock-to-Q,
as long as the received pair arrives early in the cycle.

The figures below were reported for a 0.25 µm process. They show what this structure
allows:

| ACS circuit style | ACS delay | + flip-flop | period | bits/s |
|---|---|---|---|---|
| self-resetting dynamic | 1.46 ns | 0.30 ns | 1.76 ns | 568 Mb/s |
| two-phase domino | 1.76 ns | 0.30 ns | 2.06 ns | 485 Mb/s |
| static CMOS | 2.50 ns | 0.30 ns | 2.80 ns | 357 Mb/s |

This RTL fixes the architecture (one step per clock), not the circuit style. The rate it
reaches is whatever period a given flow closes on that loop.

## Where this RTL is its own

The following points are the RTL's own choices, not fixed by the original design
description:

- code generators, state numbering and branch-metric indexing;
- the soft-value encoding and the distance measure in the BMC;
- the start metrics (0 for state 0, 255 elsewhere);
- the register-exchange organisation of the path memory, its depth of 25, and reading
  the output from state 0;
- the omission of metric normalisation (see above);
- behavioural flip-flops in `dff_ar` / `dff_as` instead of transistor netlists;
- the selector written as a multiplexer instead of transmission gates;
- single-rail selection after the comparator. The upper adder's complement rail has no
  reader and is left open.

The following points follow the original design:

- the 16-state K = 5 rate-1/2 structure;
- all port widths (4-bit soft inputs, 5-bit branch metrics, 8-bit state metrics,
  16 decisions);
- the saturating Kogge-Stone adders with true and complement outputs;
- the carry-only comparator and its PS convention;
- the 128-flip-flop metric register built of reset and preset flip-flops;
- a clocked path memory fed by the 16 decisions.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each one ends by
printing `TB_RESULT checks=N failures=M`.

- `tb_sat_adder`, `tb_acs_comparator` and `tb_bmc` test every input combination.
- `tb_acs_unit` and `tb_acs_array` compare against a reference written independently
  in the testbench. For the array, the reference enumerates all 32 trellis branches
  from explicit generator taps.
- `tb_path_memory` checks the register exchange against a trace-back through the
  recorded decisions.
- `tb_viterbi_decoder` runs the full decoder at its default parameters. It sends
  20 frames of 105 symbols, encoded in the testbench, with soft noise and 129 isolated
  hard bit flips. It checks:
  - every decoded bit, at the exact 24-cycle latency;
  - that the true state's metric never exceeds the transmitted path's cost;
  - the reset metrics.

  It also counts saturation events, lower-path selections and corrected flips, and
  fails if any of them never happened.

- `tb_viterbi_stream` sends 5000 clean symbols after a single reset. It checks that a
  bit is decoded every clock and that the true state's metric stays at 0 throughout.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/viterbi_pkg.sv tb/tb_viterbi_decoder.sv --top-module tb_viterbi_decoder
./obj_dir/Vtb_viterbi_decoder
```

Replace the testbench name to run any other one. All modules are synthesizable; the
package must be read first.

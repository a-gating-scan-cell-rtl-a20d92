# Low power gating scan cell and scan chain

In scan test, every shift clock moves a new bit into every scan flip-flop. In an
ordinary scan cell, that bit also appears at the output Q, which drives the
circuit's combinational logic. The logic then ripples on every shift cycle,
although nothing it computes is used until the capture cycle. That ripple
dominates test power.

The *gating scan cell* separates the two roles of Q:

* **Scan path.** The cell shifts through its inverted output **Qbar**. Qbar is
  taken straight from the slave latch node, so the shift path is short and has
  no output inverter.
* **Logic path.** The output **Q** to the combinational logic goes through a
  pass gate that opens only while the shift enable **SE** is low. While SE is
  high, a small feedback inverter (the *state preserving logic*) holds Q at its
  last value.

Shifting therefore produces no transitions at all at the logic inputs, and the
cell needs no control signal besides SE. Because every cell inverts the bit it
passes on, test vectors are shifted in as *adaptive* vectors, with every other
bit complemented, and responses are corrected the same way on the way out.

This repository gives synthesizable SystemVerilog for the cell, for a chain of
cells, and for a port that applies and reads adaptive vectors. Each part has a
self-checking testbench.

## The cell, signal by signal

```
            SE                CLK-bar         CLK        SE-bar
             |                   |              |           |
 DI ──┐    ┌─┴─┐   master latch  |   slave gate |  gating   |  gating inverter
      ├────┤mux├──[pass]──►(inv)─┴─ m_n ──[pass]─┴─ Qbar ──[pass]──►(inv)──┬──► Q  (to logic)
 SI ──┘    └───┘                            │                  ▲         │
                                            │                  └─(inv)◄──┘  state preserving
                                            └──► Qbar (scan out)    powered while SE = 1
```

| node | RTL | behaviour |
|------|-----|-----------|
| `m_n` (master) | `gsc_master_latch` | `~(se ? si : di)` while CLK = 0; holds while CLK = 1 |
| `qbar` (slave node, scan out) | `gsc_modified_slave_latch` | follows `m_n` while CLK = 1; holds while CLK = 0 |
| `q` (to the logic) | `gsc_modified_slave_latch` | `~qbar` while SE = 0; holds while SE = 1 |

Master and slave together form a rising-edge flip-flop. With SE = 0 the cell is
an ordinary D flip-flop: Q = DI sampled at the last rising edge, and Qbar = ~Q.
With SE = 1 it shifts: Qbar = ~SI sampled at the last rising edge, and Q is
frozen.

The effect that matters for test is the **launch**. When SE falls after the
last shift, the gating gate opens and Q at once takes the shifted-in value,
before the capture edge. The logic sees the test vector, and the capture edge
(with SE still low) stores the logic's response. `tb_gating_scan_cell` and
`tb_gsc_scan_top` both exercise two cases:

* SE falls in the low clock phase just before the capture edge.
* SE falls in the high phase right after the last shift edge.

In the transistor circuit, SE can also fall at the same moment as the capture
edge, which changes how many transistors switch. That case is about peak
power only. In a zero-delay model SE must be low before the capture edge, or
the multiplexer still selects SI.

### Why latches

All three storage nodes are written as `always_latch`, because the circuit is
made of latches, and synthesis reports them as such.

* Master and slave could be folded into one `always_ff`. They are kept apart so
  that Qbar moves exactly when the slave opens, as in the real cell.
* The Q latch is the state preserving feedback itself. It is level-sensitive
  to SE, not to a clock, so it cannot be expressed as a flip-flop.

One consequence for anything that samples the chain with flip-flops: Qbar (and
therefore SO) changes during the high phase after a rising edge. The adaptive
scan port therefore drives SI and strobes SO on the **falling** edge, when the
slave latches are closed.

There is no reset in the cells, as in the transistor circuit. A chain is
initialised by shifting, or by one capture.

## Inversion along the chain and adaptive vectors

Cell 0 takes SI, cell *i* takes the Qbar of cell *i*−1, and SO is the Qbar of
the last cell. A bit that ends in cell *i* has passed *i*+1 inverting cells
by the time it sits at that cell's Qbar, and *i*+2 at Q. Uncorrected, a vector
would therefore land with alternating polarity.

The adaptive vector complements the bits that would otherwise land inverted.
For five cells, with the test vector v1..v5 = 1 0 1 0 1 (v1 in cell 0):

| step | bits |
|------|------|
| adaptive vector shifted in (v5's bit first) | ~v1 v2 ~v3 v4 ~v5 = 0 0 0 0 0 |
| Qbar of cells 0..4 afterwards | v1..v5 = 1 0 1 0 1 |
| Q of cells 0..4 | complement, 0 1 0 1 0 |

On the way out, a response r1..r5 = 1 0 1 0 1 captured at Q leaves SO as
~r5 r4 ~r3 r2 ~r1 = 0 0 0 0 0.

`gsc_pkg` holds the general rule. For a chain of any length, the inversion
mask of test-vector bit *i* is:

* `i` even, when the vector must stand at Qbar (`TARGET = LOAD_AT_QBAR`, the
  default, as in the example above);
* `i` odd, when the vector must stand at Q (`TARGET = LOAD_AT_Q`).

The *j*-th bit seen at SO after a capture (j = 0 before any shift) is inverted
when *j* is even.

**Which polarity the logic sees.** With the default alternation, the logic
receives the *complement* of the loaded vector at Q. This is harmless if the
test vectors are generated for that polarity. If the logic must see the vector
itself, set `TARGET = LOAD_AT_Q`. Responses are always returned in true
polarity, as captured at Q.

## Scan architecture (`gsc_scan_top`)

```
                  load, pattern ──►┌────────────────────┐──► response, done
                                   │ adaptive_scan_port │
                              ┌────└────────────────────┘◄────┐
                              │ si                         so │
                              ▼                               │
            ┌─────────┐ Qbar ┌─────────┐ Qbar     ┌───────────┐
   clk, se ►│ cell 0  │─────►│ cell 1  │── ... ──►│ cell N-1  │
            └─────────┘      └─────────┘          └───────────┘
              Q │ ▲ DI         Q │ ▲ DI             Q │ ▲ DI
                ▼ │              ▼ │                  ▼ │
         ppi_q / ppo_di: to and from the circuit under test
```

The top holds one `gsc_scan_chain` of `SCAN_LEN` cells, which share `clk` and
`se`, and one `adaptive_scan_port`. The combinational logic of the circuit under
test is outside the design: its inputs `ppi_q` (the cells' Q) and outputs
`ppo_di` (captured by the cells) are ports. `scan_qbar` and `so` are brought
out for observation.

The tester drives SE. One test round:

1. In the high phase after a capture edge, assert `load` with `pattern`. The
   port samples it on the falling edge and puts the first adaptive bit on SI.
2. Hold `se = 1` for `SCAN_LEN` rising edges. `done` rises after the
   `SCAN_LEN`-th shift. `response` now holds the previous capture, decoded.
3. Drop `se`. `ppi_q` takes the new vector at once, which launches it.
4. Give one rising edge with `se = 0`, which captures `ppo_di`. Go back to 1.

`ppi_q` does not change at any point while `se = 1`.

| parameter | default | meaning |
|-----------|---------|---------|
| `SCAN_LEN` | 5 | cells in the chain (the five-cell example above) |
| `TARGET` | `LOAD_AT_QBAR` | where the loaded vector stands in true polarity |

`SCAN_LEN` has no upper limit in the RTL. The tests also run chains of 245,
449, 490, 735 and 3320 cells. These are the flip-flop counts of the ITC'99
circuits b14, b15, b21, b22 and b18, which are the usual benchmarks for this
kind of cell.

## What the RTL does not capture

The gains of this cell are transistor-level. They come from the shorter shift
path, fewer switching transistors at capture, sleep transistors that cut the
feedback inverter off the supply in normal mode, and a full-custom layout.
Reported figures for one cell in a 32/28 nm process at 1.05 V and 250 MHz are
about 7 % lower total average power and about 13 % lower shift-mode power than
a conventional cell. For whole scan chains they are roughly 46–67 % lower shift
dynamic power and 65–85 % lower peak power.

None of that is visible in a logic model. The RTL reproduces the **logical**
behaviour those numbers rest on:

* no transitions reach the logic during shift;
* the inverting shift path;
* state preservation while SE is high;
* launch on the falling edge of SE.

`tb_gsc_shift_transitions` shows the difference in transition counts against a
conventional cell. Over 200 random shift windows, the conventional cell's Q
switched 562 times and the gating cell's Q did not switch at all.

The pull-up and pull-down sleep transistors can be shared among all cells of
a chain. They have no logic function beyond enabling the feedback while
SE = 1, which is already part of the Q latch.

## Design choices not fixed by the cell itself

* The adaptive scan port is this design's own hardware for the adaptive
  process: a parallel-load serialiser, a deserialiser with correction, a
  load/done handshake, an asynchronous active-low reset, and falling-edge
  timing.
* The default chain length of 5 comes from the worked example. A real chain is
  as long as the circuit's flip-flop count.
* There is one chain. Splitting into several chains, or reordering cells, can
  be combined with this cell but is not built here.
* Every cell in the chain is a gating cell (full gating). Partial gating,
  where only some flip-flops get the gating cell and the rest stay
  conventional, is a possible use of the cell but is not built here.
* The default polarity, `LOAD_AT_QBAR`, puts the vector's complement on the
  logic inputs; see above.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by itself.
Each compares the design against values it computes independently.

| testbench | what it shows |
|-----------|---------------|
| `tb_gsc_master_latch` | master latch is transparent and inverting in the low phase and holds in the high phase (random inputs) |
| `tb_gsc_modified_slave_latch` | Qbar follows the master node only while CLK is high; Q = ~Qbar while SE is low and is held while SE is high, even as Qbar toggles |
| `tb_gating_scan_cell` | cell against a reference flip-flop model; both launch cases; Q never moves in shift mode |
| `tb_gsc_scan_chain` | the five-cell adaptive example bit for bit (Qbar = 1 0 1 0 1, SO = 0 0 0 0 0); random shift/capture against a chain model |
| `tb_adaptive_scan_port` | port with behavioural chains of 5 and 6 cells in both polarities: pattern placement, decoded responses, `done` on the N-th shift |
| `tb_gsc_scan_top` | whole design at default parameters: 300 load/shift/launch/capture/unload rounds with a stand-in logic function; every mechanism counted |
| `tb_gsc_shift_transitions` | gating cell against a conventional cell on the same random waveforms |
| `tb_gsc_benchmark_chains` | chains of 245, 449, 490 and 735 cells, three full rounds each |
| `tb_gsc_b18_chain` | a 3320-cell chain, three full rounds |

Helpers used by the testbenches: `tb_port_harness`, `tb_chain_workload` and
`tb_conventional_scan_cell`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gsc_scan_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/gsc_pkg.sv tb/tb_gsc_scan_top.sv
./obj_dir/Vtb_gsc_scan_top +verilator+rand+reset+2
```

All testbenches except the 3320-cell one build and run in under a minute. That
one takes about three minutes to build and a few seconds to run.

Verilator reports `UNOPTFLAT` on long chains and `NOLATCH` on the slave latch.
Both come from modelling latches as level-sensitive processes, and neither
affects the results.

## Files

| file | content |
|------|---------|
| `rtl/gsc_pkg.sv` | default chain length, polarity enum, inversion-mask functions |
| `rtl/gsc_master_latch.sv` | SE multiplexer and master latch |
| `rtl/gsc_modified_slave_latch.sv` | slave gate, gating logic, state preserving logic |
| `rtl/gating_scan_cell.sv` | the complete cell |
| `rtl/gsc_scan_chain.sv` | chain of `SCAN_LEN` cells |
| `rtl/adaptive_scan_port.sv` | adaptive vector loader and response decoder |
| `rtl/gsc_scan_top.sv` | top: chain plus port |
| `tb/*.sv` | testbenches and their helpers |

# Offset min-sum processing engine for an LDPC decoder

An LDPC decoder that uses message passing spends most of its effort in the
check-node update: for each parity-check row it gathers the messages of all
edges of the row, and for each edge it returns a new message computed from
the other edges. This repository holds synthesizable SystemVerilog for such a
check-node *processing engine* (PE) with 5-bit messages, together with the
interface logic that connects it to ordinary static CMOS.

The engine was designed for a charge-recovery circuit style, *pseudo-NMOS
boost logic* (pNBL). pNBL gates are dual-rail, are powered by a two-phase
sinusoidal "power clock" from an on-chip LC oscillator, and each gate is a
half-cycle pipeline stage: it evaluates while the clock is low and boosts and
holds its output while the clock is high. That circuit style is what makes
the engine energy-efficient, but it is a transistor-level matter. The RTL
here describes the *logic* the pNBL gates compute, clocked by one ordinary
rising-edge clock. It is a functional and cycle-level model that
synthesizes to standard cells. It is not a model of the charge-recovery
circuit.

## The algorithm

Each edge j of a row arrives as a pair of 5-bit messages:

* `lqj`: the variable-node log-likelihood ratio L(q_j);
* `rij`: the check message R_ij that this row sent to the edge last time.

The engine first removes its own old contribution, Q_j = L(q_j) - R_ij. It
then applies offset min-sum:

```
m_j        = min over k != j of |Q_k|
s_j        = XOR over k != j of sign(Q_k)
R_ij_new   = (s_j ? -1 : +1) * min(max(m_j - OFFSET, 0), 15)
L(q_j)_new = saturate(Q_j + R_ij_new, -15..+15)
```

Nobody computes "min over the other edges" separately for each edge.
During the row the engine keeps only three values: the smallest magnitude
(min1), the second smallest (min2) and the position of the smallest
(min_idx). When the row is replayed, edge min_idx gets min2 and every other
edge gets min1. The sign product works the same way: the parity of all signs,
XORed with the edge's own sign, gives the product of the other signs. If two
edges tie for the smallest magnitude, min2 equals min1 and both rules still
give the exact answer.

## Number formats

| quantity | width | format |
|---|---|---|
| `rij`, `lqj`, `rij_new`, `lqj_new` | 5 | sign-magnitude: bit 4 sign, bits 3:0 magnitude (-15..+15) |
| Q_j (inside) | 6 | two's complement, -30..+30, always exact |
| \|Q_j\| (inside) | 5 | unsigned 0..30, compared by the 5-bit comparator |

Both outputs saturate at magnitude 15. A zero result is always sent with the
sign bit clear. An input of "minus zero" (`5'b10000`) is read as 0.

## Datapath

```
          +-------+   Q   +-----------+ |Q|  +------------------------+
 lqj ---->|       |------>| ABS, sign |----->| min search (2x COMP,   |-- min1, min2, min_idx
 rij ---->|  sub  |   |   +-----------+  |   | MUX, min registers)    |
          +-------+   |         sign     +-->| sign accumulator (XOR) |-- parity
                      |   index counter ---->|                        |
                      |                      +------------------------+
                      +--> FIFO (Q_j) ---------+--> offset: m_j - OFFSET --> rij_new
                                               +--> adder: Q_j + rij_new --> lqj_new
```

| module | role |
|---|---|
| `pe_pkg` | widths, the `msg_t` sign-magnitude type and the saturation function |
| `pe_sub` | Q = L(q_j) - R_ij |
| `pe_abs_sign` | \|Q\| and sign of Q |
| `pe_comp5` | 5-bit unsigned comparator, `ge = a >= b` |
| `pe_index` | position of the current edge in its row, first/last flags |
| `pe_min_search` | running min1/min2/min_idx; results latched at the row's last edge |
| `pe_sign_acc` | running XOR of the signs; parity latched at the row's last edge |
| `pe_fifo` | holds each Q_j until its row's result is known |
| `pe_offset` | offset subtraction, clamp at 0, saturation, sign |
| `pe_add_sat` | L(q_j)_new = Q_j + R_ij_new with saturation |
| `pe_core` | the processing engine: all of the above plus the replay sequencer |
| `cmos_to_pnbl` | input interface: each bit becomes a complementary rail pair |
| `pnbl_to_cmos` | output interface: per-bit sample-and-latch back to single-rail CMOS |
| `pe_system` | top: input interfaces, engine, output interfaces |

## How a row flows through the engine

The schedule is the part that needs the most care.

1. **Collection.** Each cycle with `in_valid=1` accepts one edge. `pe_index`
   counts the edges modulo `ROW_DEG`; a row is always exactly `ROW_DEG`
   accepted edges, so no start or end marker is sent. Cycles with
   `in_valid=0` may appear anywhere, even inside a row. On the first edge of
   a row the min registers and the sign accumulator start afresh. No clear
   cycle is needed.
2. **Latch.** When the last edge is accepted, min1, min2, min_idx and the
   parity are copied into result registers. These hold until the next row
   completes. In the same clock edge the replay sequencer starts.
3. **Replay.** For the next `ROW_DEG` cycles the sequencer pops one Q_j per
   cycle from the FIFO and forms that edge's `rij_new` and `lqj_new`. The
   outputs are registered.
4. **Overlap.** While a row is being replayed the next row can already be
   collected, because the FIFO holds up to `2*ROW_DEG` words. A row cannot
   complete in fewer than `ROW_DEG` cycles, so the next row's results are
   latched no earlier than the cycle in which the current replay ends.
   Assertions in `pe_core` check this and check that the FIFO never holds
   more than one row.

Timing of `pe_core`: `out_valid` for edge 0 of a row is high two cycles after
the cycle in which that row's last edge had `in_valid=1`. The edges then
follow on consecutive cycles, in input order. With back-to-back input the
engine takes and delivers one edge per cycle, and the first-in to first-out
latency is `ROW_DEG+1` cycles. `pe_system` adds one cycle at each interface,
so at the top the first output follows the last input by four cycles. There
is no backpressure: the consumer must take one result per cycle.

## Dual-rail interfaces

pNBL logic carries every bit on two rails. `cmos_to_pnbl` captures each
input bit on the clock edge as the pair (d, ~d). After reset both rails are
low, which means "no data". `pe_system` treats an edge as present only when
the valid bit's pair is (1,0). An assertion checks that the data rails are
complementary whenever an edge is taken.

`pnbl_to_cmos` stands for the per-bit sense stage and set/reset latch of the
circuit. On each clock edge the pair (1,0) sets the output bit and (0,1)
clears it. Equal rails leave the bit unchanged. It provides `q` and `q_n`.

In the circuit the power clock comes from an LC oscillator: a centre-tapped
on-chip inductor with a cross-coupled NMOS pair, and off-chip capacitors that
set the frequency. It has no RTL equivalent. Here it is simply the `clk`
input.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `ROW_DEG` | 6 | `pe_system`, `pe_core`, `pe_index` | edges per parity-check row (2 or more) |
| `OFFSET` | 1 | `pe_system`, `pe_core`, `pe_offset` | offset subtracted from the minimum, in LSBs |
| `MSG_W` | 5 | `pe_pkg` | message width; the rest of the datapath follows from it |
| `DEPTH` | 12 | `pe_fifo` | set to `2*ROW_DEG` by `pe_core` |

## What comes from the design description and what was chosen here

These follow the original design: the block structure (subtractor, ABS,
sign, index, comparator, MUX/min, min_index, offset, sign accumulator, FIFO,
output adder); 5-bit signed messages made of a sign bit and a 4-bit
magnitude; a 5-bit `a >= b` comparator; the min search followed by an offset
subtraction; input and output interfaces between static CMOS and dual-rail
logic; and a single power clock.

These are choices made here, because the source gives no value:

* the row degree (6) and the offset (1);
* keeping a second minimum. The source mentions only "the minimum", but its
  min_index block only makes sense with this method. It takes two comparator
  instances where the block diagram shows one;
* saturation of both outputs to ±15, and the encoding of zero;
* the valid signals, the collect/replay schedule, the FIFO depth and the
  absence of backpressure;
* an asynchronous active-low reset;
* one rising-edge clock in place of the two-phase power clock. Each pNBL gate
  in the circuit is a half-cycle stage. Here whole blocks are combinational
  between registers, so the cycle counts above belong to this RTL, not to the
  chip.

Not modelled at all: the pNBL gate circuits, the analog levels on the rails,
the LC power-clock generator, and everything about energy and frequency.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `pe_comp5`, `pe_sub`, `pe_abs_sign`, `pe_offset` and `pe_add_sat` are
  tested exhaustively over their reachable inputs.
* `pe_index`, `pe_sign_acc`, `pe_min_search` and `pe_fifo` are tested with
  random traffic against simple models, including idle cycles, ties, and a
  full and an empty FIFO.
* `tb_pe_core` and `tb_pe_system` send 500 rows at the default parameters.
  Their reference, `tb/pe_ref_pkg.sv`, uses the textbook definition (minimum
  and sign product over the *other* edges) rather than the min1/min2 method.
  They also check the exact output cycle of every edge. They count, and
  require, back-to-back rows, gaps between rows, gaps inside a row, ties,
  the minimum at the first and at the last position, clamping to zero,
  saturation of each output, and negative sign products.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/pe_pkg.sv tb/pe_ref_pkg.sv tb/tb_pe_system.sv \
    --top-module tb_pe_system -Mdir obj_tb -o sim
./obj_tb/sim
```

Replace `tb_pe_system` with any other testbench name. `pe_ref_pkg` is needed
only by `tb_pe_core` and `tb_pe_system`. The whole system test runs in well
under a second.

Lint reports `SYNCASYNCNET` on `rst_n`. The flops use it as an asynchronous
reset and the assertions use it in `disable iff`. This is expected.

# Uni-directional MultiRing switch

A MultiRing is a set of N = 2^n processing nodes that can be rearranged into
rings of different sizes: one ring of all N nodes, two rings of N/2 nodes,
and so on down to N/2 rings of two nodes, n arrangements in all. Image and
vision algorithms that pass data around rings in several steps can then use
the ring size that suits each step. Giving every node direct wires to every
possible neighbour is too expensive. Instead the nodes are wired in a star to
one central switch, and the switch forms the rings.

This RTL implements that central switch. It is a network of 2x2 exchange
boxes, arranged like a butterfly, with n columns of N/2 boxes. It is steered
by n one-hot configuration bits plus n(n-1)/2 OR gates. In every
configuration all N nodes send to their ring neighbour at the same time, and
no two transfers share a link. The switch does not inspect the data. It only
provides the paths, and it moves on its own through all configurations,
holding each one for a fixed time.

The default build is the 8-node switch (n = 3) with 1-bit links. The same
code builds any 2^n-node switch from the `N_LOG` parameter.

## Ring configurations

Configuration `k` (k = 0 .. n-1) forms 2^k rings of 2^(n-k) nodes. Node P_p
sends to its right-hand neighbour P_((p + 2^k) mod N). It receives from
P_((p - 2^k) mod N).

| k | 8-node example   | P_p sends to      | configuration bits C2 C1 C0 |
|---|------------------|-------------------|-----------------------------|
| 0 | 1 ring of 8      | P_(p+1) mod 8     | 0 0 1                       |
| 1 | 2 rings of 4     | P_(p+2) mod 8     | 0 1 0                       |
| 2 | 4 rings of 2     | P_(p+4) mod 8     | 1 0 0                       |

For example, with k = 1 the two rings are P0→P2→P4→P6→P0 and
P1→P3→P5→P7→P1.

## How the fabric forms a ring

This is the part of the design that is least obvious. It depends on three
wiring rules and one control rule, and all four must agree.

**Ports and boxes.** Box `S_rs` sits in row r (0 .. N/2-1) and column s
(0 .. n-1). Ports of a column are numbered top to bottom, 0 .. N-1. Port p
is input or output number (p mod 2) of the box in row p/2. Node P_i feeds
input port i of column 0.

**Switch box.** A box with control 0 passes its inputs straight through
(I0→O0, I1→O1). With control 1 it crosses them (I0→O1, I1→O0).

**Links between columns (recursive construction).** A 2^n-node switch is two
2^(n-1)-node switches, one above the other, followed by a joining column of
N/2 boxes (`mr_join_column`). Each box of the joining column pairs one output
of the upper half with one output of the lower half. Unrolled, column s is a
row of joining columns, each of which merges the two 2^s-node switches in a
group of 2^(s+1) ports. Let h = 2^s, and let l be a port's number inside its
group. Output port l of column s-1 is then wired to input port k of column s:

    l <  h :  l even -> k = l        l odd  -> k = l + h - 1
    l >= h :  l odd  -> k = l        l even -> k = l - h + 1

Column 0 is the degenerate case: it merges single nodes into 2-node switches
and is just a column of boxes. For a 16-node switch the joining column maps
incoming ports 0..15 to box inputs 0 8 2 10 4 12 6 14 1 9 3 11 5 13 7 15.

**Nodes on the output side (perfect shuffle).** Output port j of the last
column drives node P_(j/2) when j is even, and P_(N/2 + (j-1)/2) when j is
odd. Top to bottom, the 8-node switch delivers to P0 P4 P1 P5 P2 P6 P3 P7.

**Which control steers which box.** The control unit makes
C_ij = C_i | C_(i+1) | ... | C_j for all i <= j. In configuration k this is
1 exactly when i <= k <= j. Box S_rs takes C_is. Let m = r mod 2^s. Then
i = 0 when m = 0. Otherwise i is the bit length of m, that is,
2^(i-1) <= m < 2^i. For 8 nodes:

| box control | s=0 | s=1 | s=2 |
|-------------|-----|-----|-----|
| r=0         | C00 | C01 | C02 |
| r=1         | C00 | C11 | C12 |
| r=2         | C00 | C01 | C22 |
| r=3         | C00 | C11 | C22 |

So column s only sees configuration bits C_0 .. C_s. In configurations
k > s, column s is entirely straight. In configuration k = s it is entirely
crossed. In configurations k < s, a box crosses only if its row pattern puts
k within range.

**Worked path.** Take 1 ring of 8 (k = 0), where P0 must reach P1. P0
enters S00 on I0. S00 has C00 = 1, so it crosses, and the word leaves on
output port 1 of column 0. That port is wired to column-1 port 2, input I0
of S11. S11 has C11 = 0, so the word goes straight to output port 2. That
port is wired to column-2 port 2, input I0 of S12. S12 has C12 = 0, so the
word goes straight to output port 2, which the shuffle delivers to P1. All
24 source/configuration paths of the 8-node switch were checked this way
against the reference path lists (`tb_multiring_fabric`).

**Why there is no contention.** Every box sends its two inputs to two
different outputs. The whole fabric is therefore a permutation of its N
ports for any setting of the controls, and no link ever carries two words.
The rules above choose the controls so that this permutation is the ring
neighbour map. The tests check that for N = 8, 16, 32 and 64.

## Control unit and automatic reconfiguration

`signal_creator` holds a configuration index and a dwell counter. After
reset it is in configuration 0 (one ring of all nodes). It stays in each
configuration for `DWELL` clock cycles, then steps to k+1, and after n-1
wraps back to 0. It drives the one-hot bits C_k. While `en` is 0 the
sequencer freezes and the current rings stay up.

`control_unit` adds the OR network. C_ii is C_i itself. Every other term
costs one two-input OR, chained along the row: C_ij = C_i(j-1) | C_j. That
makes n(n-1)/2 gates in total, 3 for the 8-node switch.

## Switch box implementations

`switch_box` has two gate structures with the same function, selected by
`IMPL`:

* `SB_AND_OR`: O0 = I0·C' + I1·C and O1 = I0·C + I1·C'. This uses four AND,
  two OR and one NOT gate per bit.
* `SB_XOR` (default): O0 is the same multiplexer, and O1 = I0 ⊕ I1 ⊕ O0.
  This uses two AND, one OR, one NOT and two XOR gates per bit, six in all.
  It is the cheaper form, which makes the whole 8-node switch
  6·3·4 + 3 = 75 gates.

After synthesis the 8-node fabric is 24 AND, 24 XOR, 12 OR and 6 NOT cells.
Boxes that share a control term share one inverter, so the count is slightly
below the per-box figure.

## Top-level interface and timing (`multiring_switch`)

| port        | dir | width                 | meaning |
|-------------|-----|-----------------------|---------|
| `clk`       | in  | 1                     | clock (used only by the sequencer) |
| `rst_n`     | in  | 1                     | asynchronous active-low reset → configuration 0 |
| `en`        | in  | 1                     | 1: reconfigure automatically; 0: hold the current configuration |
| `node_tx`   | in  | N × WIDTH (packed)    | `node_tx[i]`: link from node P_i into the switch |
| `node_rx`   | out | N × WIDTH (packed)    | `node_rx[k]`: link from the switch to node P_k |
| `cfg`       | out | max(1, ⌈log2 n⌉)      | current configuration k |
| `c`         | out | n                     | one-hot configuration bits C_0 .. C_(n-1) |
| `cfg_first` | out | 1                     | first cycle of the current configuration |
| `cfg_last`  | out | 1                     | last cycle before the switch reconfigures |

The data path `node_tx → node_rx` is purely combinational and n boxes deep.
There are no registers in it, and the switch never buffers or inspects data.
The configuration is a register. It changes on the clock edge that ends the
last cycle of a dwell (the cycle with `cfg_last = 1`). Nodes are expected to
send only while `cfg` shows the ring they need. A node that needs its word to
travel once round a ring of 2^(n-k) nodes needs `DWELL >= 2^(n-k)`.

## Parameters

| parameter | default  | where it appears | meaning |
|-----------|----------|------------------|---------|
| `N_LOG`   | 3        | all | n; the switch has 2^n nodes, n configurations, n·2^(n-1) boxes |
| `WIDTH`   | 1        | switch, fabric, box | bits per link; the reference design switches single bits |
| `DWELL`   | 16       | switch, control unit, sequencer | cycles spent in each configuration |
| `IMPL`    | `SB_XOR` | switch, fabric, box | gate structure of the boxes |

## Files

| file | contents |
|------|----------|
| `rtl/mr_pkg.sv` | box-type enum; constant functions for C_ij indexing, the inter-column links, the output shuffle and the box control selection |
| `rtl/switch_box.sv` | 2x2 exchange box |
| `rtl/signal_creator.sv` | configuration sequencer, one-hot C_k |
| `rtl/control_unit.sv` | sequencer plus C_ij OR network |
| `rtl/mr_join_column.sv` | column of N/2 boxes joining two half-size switches |
| `rtl/multiring_fabric.sv` | n columns, each a row of joining columns; control term routing |
| `rtl/multiring_switch.sv` | top: control unit, fabric, output shuffle |
| `tb/tb_switch_box.sv` | both box forms, exhaustive 1-bit and random 8-bit |
| `tb/tb_signal_creator.sv` | sequence, one-hot code, dwell length, hold, reset (16 nodes) |
| `tb/tb_control_unit.sv` | every C_ij against its definition every cycle (n = 3 and 5), the listed 8-node values |
| `tb/tb_mr_join_column.sv` | 8- and 16-port joining columns: every link and box control against written-out tables |
| `tb/tb_multiring_fabric.sv` | 8 nodes: every box control and every path against the reference tables; 16/32/64 nodes: ring rule |
| `tb/mr_node_array.sv` | behavioural node array used by the end-to-end tests |
| `tb/tb_multiring_switch.sv` | end-to-end at the default size |
| `tb/tb_multiring_switch_scaled.sv` | end-to-end at 16 nodes × 8 bits (AND/OR boxes) and 64 nodes × 4 bits |

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/mr_pkg.sv tb/tb_multiring_switch.sv --top-module tb_multiring_switch
    ./obj_dir/Vtb_multiring_switch

To run another test, substitute its name. To lint the RTL:

    verilator --lint-only -Wall -Irtl -y rtl rtl/mr_pkg.sv rtl/multiring_switch.sv \
        --top-module multiring_switch

The end-to-end tests model the nodes in `mr_node_array`. At the start of each
configuration every node picks a random word. In every later cycle it sends
the word it holds and keeps the word it receives, so words circulate round all
rings at once. The node array checks, every cycle and for every node, that it
received exactly its left-hand neighbour's word. It also checks that after t
cycles it holds the right origin's word, and that after one full trip round
its ring every word is back home. It further checks the one-hot code,
`cfg_first`, the order of configurations and that each configuration lasts
exactly `DWELL` cycles. At the end it requires that every configuration was
entered, that a full ring trip happened in every configuration, that the
sequencer wrapped and that a hold occurred. A mid-run reset is also applied.
The default-size test takes well under a second.

## Design choices and departures

These points are this design's own choices, or places where the reference
design leaves a detail open:

* **Dwell time.** The reference design only says that the switch stays in a
  configuration for a set time. `DWELL = 16` is chosen so that a word can go
  once round the largest 8-node ring.
* **Hold input, reset state and status outputs.** `en`, the reset to
  configuration 0, and the `cfg`/`c`/`cfg_first`/`cfg_last` outputs were
  added so that nodes can tell which ring they are in.
* **Link width.** The reference switches one bit per link. `WIDTH > 1`
  switches a word with the same control.
* **Box control rule.** The rule is stated here as m = 0 → C_0s, otherwise
  2^(i-1) <= m < 2^i → C_is. This is the form that reproduces the reference
  8-node control table and all of its paths.
* **XOR box equation.** The equation O1 = I0 ⊕ I1 ⊕ O0 is one way to build
  the six-gate box from the stated gate set. It has the same truth table as
  the seven-gate box.
* **Order of the OR chain.** The order in which the OR gates of the control
  unit are chained is a free choice.
* **Fabric built from joining columns.** The fabric is not a module that
  instantiates itself. Each column is instead a row of joining columns, which
  gives the same wiring as nesting half-size switches. Joining two switches
  into one (adding a joining column) corresponds to raising `N_LOG` by one.
  Physical aspects of joining two switch units, such as back-plane
  connectors, are not modelled.

Not included:

* **The processing nodes.** This includes their neighbour and routing tables
  and the message frame format. These belong to the nodes and to the message
  layer, not to the switch.
* **Preferred-configuration cache.** An optional cache that would keep the
  switch longer in frequently used configurations is mentioned only as a
  possible enhancement. All configurations here get the same dwell.
* **Other reconfiguration schemes.** Manual reconfiguration (waiting for all
  nodes to agree) and a "smart" switch that routes by reading messages are
  alternative designs, not this one.
* **Bi-directional version.** A bi-directional MultiRing switch, which would
  need extra control gates, is not built.

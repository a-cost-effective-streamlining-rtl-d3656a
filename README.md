# GIQ-DIOGENES: a reconfigurable processor-array interconnect on one insertion-queue bundle

DIOGENES builds fault-tolerant and reconfigurable arrays of identical
processing elements (PEs) in a particular way. The PEs sit in one logical
line, and every link between two PEs is a wire in a bundle that runs along
the line. The switch at each PE port either takes a wire into the bundle,
takes one out, or lets the bundle pass.

In the classic version each bundle behaves as a stack or as a queue of
wires. An irregular topology then needs many bundles. This design uses a
single bundle that behaves as a **generalized insertion queue (GIQ)**:

* **REMOVE** takes the wire at position 1 (the head) out to a port. Every
  other wire moves down one position.
* **INSERT-k** puts the port's wire into position *k*. Wires at positions
  *k* and above move up one position.

INSERT-1 is a stack push and INSERT-(p+1), with *p* wires present, is a
queue enqueue. The free choice of *k* lets the wires be kept sorted by the
order in which they will be removed. So **any linear ordering of any graph
can be wired on one bundle whose width equals the ordering's cutwidth**:
the largest number of edges passing over any gap between two neighbouring
PEs.

This repository holds synthesizable SystemVerilog for the switches, the
bundle, the configuration hardware and a 32-PE array: 6 ports per PE, an
8-line bundle, 1-bit lines. It also holds self-checking testbenches,
including a reference model of the off-line procedure that computes the
switch settings.

## A worked example

Take six nodes a–f in this line order, with edges ab, ad, ae, bc, be, ce,
cf, de and ef. Split every node into one *subnode* per incident edge,
neighbours in left-to-right order. That gives 18 subnodes and 18 switches.
Scanning left to right gives this sequence, with the bundle shown head
first:

| switch | node | operation | bundle afterwards |
|---|---|---|---|
| 1 | a | INSERT-1 | ab |
| 2 | a | INSERT-2 | ab ad |
| 3 | a | INSERT-3 | ab ad ae |
| 4 | b | REMOVE | ad ae |
| 5 | b | INSERT-1 | bc ad ae |
| 6 | b | INSERT-4 | bc ad ae be |
| 7 | c | REMOVE | ad ae be |
| 8 | c | INSERT-4 | ad ae be ce |
| 9 | c | INSERT-5 | ad ae be ce cf |
| 10 | d | REMOVE | ae be ce cf |
| 11 | d | INSERT-4 | ae be ce de cf |
| 12–15 | e | REMOVE ×4 | cf |
| 16 | e | INSERT-2 | cf ef |
| 17–18 | f | REMOVE ×2 | – |

This ordering has three mutually crossing edges and two nested edges. A
stack layout would need three stacks and a queue layout two queues. Here it
needs one 5-line bundle.

**How the settings are computed.** Keep the edges that currently hang over
the scan point in a list sorted by their right-hand subnode. When the scan
reaches an edge's left subnode, the edge's INSERT position is one plus the
number of listed edges whose right subnode comes first. That is the edge's
crossing number plus one. When the scan reaches a right subnode, that edge
is always at the head, and the switch is REMOVE.

With a balanced order-statistic tree this takes O(|E| log c) time, where c
is the cutwidth. It is done off-line, in software. `tb/giq_tb_pkg.sv`
contains a straightforward SystemVerilog version (`layout`) that the
testbenches use to configure the hardware.

## The switches

Lines are numbered 1..N from the bottom, and line *w* is index *w-1* of a
packed `[N-1:0][W-1:0]` vector. The bundle runs from the left side of a
switch to its right side.

### REMOVE switch (`giq_left_switch`)

This switch has one control bit and one 2-to-1 multiplexer per line:

```
 remove = 0:  right[w] = left[w]                      (port bypassed)
 remove = 1:  port     = left[1]
              right[w] = left[w+1]   for w < N,  right[N] = 0
```

### INSERT switch (`giq_right_switch`)

This is the less obvious part. Every line *w* has two multiplexers. The
"right" multiplexer, controlled by c[w], chooses *straight* (left[w]) when
c[w] = 0. When c[w] = 1 it passes the output of the "left" multiplexer.
The left multiplexer, controlled by c[w-1], chooses the *port* when that
bit is 0 and the *slanted* line left[w-1] when it is 1. Line 1 has only
the right multiplexer, and its second input is the port.

INSERT-k must make lines 1..k-1 straight, line k the port, and lines k+1..N
slanted. That is exactly the thermometer code **c[w] = 1 for every w ≥ k**.
So the switch needs one configuration bit per line, and bit k drives both
the right multiplexer of line k and the left multiplexer of line k+1. All
zeros means bypass. For example, with four lines, c[4..1] = 1,1,1,0 is
INSERT-2.

```
            c[w]=0      c[w]=1, c[w-1]=0     c[w]=1, c[w-1]=1
 right[w] = left[w]     port                 left[w-1]
```

Left line N falls off the top. A correct configuration never inserts into
a full bundle, so that line is idle whenever it happens.

The switching cost is 2N-1 multiplexers and N configuration bits. A stack
or queue switch needs N multiplexers, so a GIQ switch costs about 50% more.
In exchange, the whole array needs only one bundle.

### Both directions of a link

The original switches are CMOS pass-gate multiplexers, so every connection
is bidirectional. A two-state digital model cannot share one net in both
directions. Therefore every line exists twice:

* **Forward lines** (`fwd_*`) run left to right. They carry the source PE's
  data to the destination PE of each edge.
* **Backward lines** (`bwd_*`) run right to left along the same connections,
  set by the same control bits.

A port therefore has `port_in` (PE to bundle) and `port_out` (bundle to PE).
For an edge (u, v), v's REMOVE port reads u's `port_in` and u's INSERT port
reads v's `port_in`. A port that is not connected reads zero.

### Port switch (`giq_port_switch`)

In a reconfigurable array, the same port may start an edge in one topology
and end one in the next. Each port is therefore a REMOVE switch followed
along the bundle by an INSERT switch. A legal configuration enables at most
one of them. The (N+1)-bit configuration word is:

| bits | meaning |
|---|---|
| N | remove enable |
| N-1..0 | insert thermometer c[N..1] |
| all zero | bypass |

## The array (`giq_diogenes_array`)

```
 pe_tx/pe_rx[0..5]  [6..11]             ...                [186..191]
        |  PE 0  |  |  PE 1  |                          |  PE 31 |
 0 ==> [sw0 .. sw5][sw6 .. sw11] ==== 8-line bundle ==== [.. sw191] ==> bundle_right_out
 bundle_left_out <== (backward lines, same switches) <========================= 0
                      ^
                      | 192 x 9-bit configuration words
               giq_config_store  (4 stored topologies)
```

* `giq_network` chains K = NUM_PES × PORTS port switches. The right lines
  of each switch feed the left lines of the next. Paths are combinational
  and cross up to K switches.
* PE *p* owns switches 6p..6p+5. Port *j* of a PE serves its *j*-th edge,
  neighbours taken left to right. The PEs themselves are not part of this
  RTL; their ports are the top-level `pe_tx` / `pe_rx`.
* Both bundle ends are fed zeros. The lines leaving the ends are outputs,
  and they stay zero under a correct configuration.

### Routing around faulty PEs

Fault tolerance comes from the same mechanism as reconfiguration. Lay out
the wanted topology over the working PEs only, keeping their order along
the line. Every port of a faulty PE then gets the all-zero word. Its
switches pass the bundle straight through, and whatever the faulty PE
drives on `pe_tx` reaches no one. Skipping a PE does not change the
cutwidth of the layout, so the bundle width needed stays the same.

### Changing topology (`giq_config_store`)

Topologies are computed off-line and stored. The array switches between
them at run time.

* **Storing a topology.** Write one word per cycle through `cfg_wr_*` (set,
  switch index, word). Assertions reject an illegal word: a broken
  thermometer, or remove and insert set together.
* **Loading a topology.** Pulse `cfg_apply` with `cfg_apply_set`.
  - From the next cycle, `cfg_busy` is high for exactly K = 192 cycles.
  - Switch *i* takes its new word on the *i*-th busy cycle.
  - When busy falls, `cfg_active_set` names the new topology.
  - During the reload, the array is partly in the old topology and partly
    in the new one.
  - An apply while busy is ignored.
* **Reset** (`rst_n`, synchronous, active low) bypasses every port. It does
  not clear the stored topologies.

### Parameters

| parameter | default | meaning |
|---|---|---|
| NUM_PES | 32 | processing elements |
| PORTS | 6 | ports per PE |
| LINES | 8 | lines in the bundle = largest cutwidth that fits |
| W | 1 | bits per line; cost grows linearly with W |
| NUM_CFG | 4 | stored topologies |

## What fits on the default array

A topology fits when three conditions hold for its chosen ordering:
maximum degree ≤ 6, number of edges ≤ 96 (192 ports), and cutwidth ≤ 8.

| topology | degree | edges | cutwidth | fits |
|---|---|---|---|---|
| 6-node example above | 5 | 9 | 5 | yes |
| 4×5 mesh, row-major (row edges length 1, column edges length 4) | 4 | 31 | 5 | yes |
| 4×8 mesh, row-major | 4 | 52 | 5 | yes |
| 4×6 mesh on the 24 working PEs, 8 faulty PEs bypassed | 4 | 38 | 5 | yes |
| 5-cube (32 nodes) | 5 | 80 | 21 (exact) | no |
| butterfly, 8 rows × 4 levels | 4 | 48 | ≤ 10 found | not shown |
| 3-D mesh 4×4×2 | 5 | 64 | ≤ 13 found | not shown |
| binary de Bruijn, 32 nodes | 4 | 61 | ≤ 13 found | not shown |

The published plan for this array lists the hypercube, butterfly, 3-D mesh
and de Bruijn graph among its target topologies. At 8 lines and 1 wire per
link, the 5-cube cannot fit, and no fitting ordering was found for the
other three. Reaching them would take more lines, or time-multiplexing of
wires and ports. The latter is only mentioned as future work, and it is not
implemented.
`tb_giq_workloads_32pe` routes all four topologies end to end on an array
widened to `LINES = 24`.

## Where this RTL makes its own choices

These points follow the published GIQ switch design:

* the switch graphs;
* the multiplexer structure and the meaning of control value 0 in both
  switches;
* the one-bit REMOVE control and the thermometer INSERT control;
* the chaining of switches;
* the settings procedure;
* the 32 × 6 × 8 sizes.

These points are this design's own:

* **Directional lines.** Pass-gate lines are modelled as separate forward
  and backward lines. Idle lines and unconnected ports read 0, not a
  floating level.
* **The 2:1 multiplexer** selects A when its control is 0. The published
  circuit does not pin this down.
* **Port switches** can change direction: a REMOVE and an INSERT switch in
  series, with an (N+1)-bit word per port.
* **The order of ports along the bundle** within the array.
* **The configuration store:** 4 sets, a word-wide write port, a reload of
  one word per cycle over K cycles, reset to bypass, and apply ignored
  while busy.
* **No PE logic.**

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each one also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_giq_mux2` | mux truth table |
| `tb_giq_left_switch`, `tb_giq_right_switch`, `tb_giq_port_switch` | every setting, random data on all lines and ports, both directions, compared with an independent model built from the switch-graph definition |
| `tb_giq_config_store` | reset, write, K-cycle reload order and timing, apply-while-busy |
| `tb_giq_network` | the example's settings must match the table above; queue-order layouts must always insert at the tail; stack and random layouts; every edge carries data both ways |
| `tb_giq_workloads_32pe` | the 5-cube, butterfly, 3-D mesh and de Bruijn graph on a 24-line array; each reload and every edge in both directions |
| `tb_giq_diogenes_array` | the full default array with four stored topologies (4×8 mesh, 4×5 mesh plus the example, a random graph that fills all 8 lines, a 4×6 mesh routed around 8 randomly chosen faulty PEs) and six reconfigurations. It counts stack-like, queue-like and middle insertions, removals, bypassed ports, full-bundle moments, ports that change direction and faulty PEs routed around, and fails if any never occurs |

Example build and run, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/giq_pkg.sv tb/giq_tb_pkg.sv tb/tb_giq_diogenes_array.sv \
  --top-module tb_giq_diogenes_array -o sim
./obj_dir/sim
```

The full-size run builds in about 20 s and simulates in well under a
second.

## Files

| file | contents |
|---|---|
| `rtl/giq_pkg.sv` | default sizes, insert-code helpers |
| `rtl/giq_mux2.sv` | 2:1 multiplexer |
| `rtl/giq_left_switch.sv` | REMOVE switch |
| `rtl/giq_right_switch.sv` | INSERT switch |
| `rtl/giq_port_switch.sv` | per-port switch |
| `rtl/giq_network.sv` | the bundle of K port switches |
| `rtl/giq_config_store.sv` | stored topologies and reload |
| `rtl/giq_diogenes_array.sv` | top |
| `tb/giq_tb_pkg.sv` | switch-graph model, settings procedure, random graph generator |
| `tb/tb_*.sv` | the testbenches |

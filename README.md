# MinBD: a minimally-buffered deflection router and mesh network

A bufferless deflection router has no input buffers. Every flit that arrives leaves again
on some output port in the next pipeline pass. When two flits want the same port, one of
them is *deflected*: it is sent the wrong way and finds another path later. Dropping the
buffers saves a lot of router power and area. The cost is that under heavy load flits
are deflected again and again. That wastes link bandwidth, raises latency and adds
dynamic power.

MinBD keeps the cheap bufferless pipeline and removes most of the deflections with three
small additions:

| problem | fix in this router |
|---|---|
| any conflict over a link causes a deflection | a **side buffer** of 4 flits. It holds only flits that would otherwise have been deflected, at most one per cycle. |
| only one flit can leave the network per node per cycle | **dual-width ejection**: up to two flits per cycle |
| fast arbiters decide each 2x2 conflict on their own, so flits are deflected for no reason | a **two-level priority**: one network-wide *golden* packet, then one *silver* flit per router per cycle |

This repository holds synthesizable SystemVerilog for the router and for a 2D mesh built
from it (4x4 by default). A reassembly buffer at every node puts packets back together.
Each block has a self-checking testbench.

## Files

| file | contents |
|---|---|
| `rtl/minbd_pkg.sv` | flit format, port numbering, event struct, helper functions |
| `rtl/minbd_mesh.sv` | **top**: mesh of routers, link registers, reassembly buffers |
| `rtl/minbd_router.sv` | one router: the 2-stage pipeline that ties the blocks below together |
| `rtl/eject_dual.sv` | dual-width ejection stage |
| `rtl/reinject_stage.sv` | side-buffer re-injection and buffer redirection |
| `rtl/inject_stage.sv` | local injection into a free slot |
| `rtl/silver_select.sv` | picks the silver flit |
| `rtl/perm_net.sv`, `rtl/arb_block.sv` | two-stage permutation network of 2x2 arbiter blocks |
| `rtl/buf_eject.sv` | moves one deflected flit per cycle into the side buffer |
| `rtl/side_buffer.sv` | 4-entry FIFO |
| `rtl/golden_ctrl.sv` | Golden Packet schedule |
| `rtl/lfsr16.sv` | pseudo-random bits for each router |
| `rtl/reassembly_buffer.sv` | per-node packet reassembly, reports flits it must drop |
| `tb/tb_<block>.sv` | one self-checking testbench per block; `tb/minbd_tb_pkg.sv` holds shared helpers |

## Flits, packets and the mesh

A packet has 1 to 8 flits, and each flit is routed on its own. A flit (`minbd_pkg::flit_t`,
70 bits) carries:

- a valid bit;
- the destination `dst_x` and `dst_y`;
- the packet identity: `src` (node number) and `txn` (transaction number, 16 per source);
- `seq`, its place in the packet, and `last_seq`, the `seq` of the packet's last flit;
- a 32-bit data word.

These widths are this design's own choice. They are sized so the same package also serves
an 8x8 mesh.

Ports are numbered 0 = North, 1 = East, 2 = South, 3 = West. x grows to the East and y to
the North. Node (x, y) has index `y*MESH_X + x`. A port is *productive* for a flit if
leaving through it moves the flit closer to its destination.

Timing:

- A router has two pipeline stages and a registered output, so it takes 2 cycles.
- Each link has one register, so it takes 1 cycle.
- A hop therefore takes 3 cycles.
- A flit injected at a node is ejected 3 x hops cycles later if it is never deflected. The
  end-to-end testbench checks this for 3 hops (9 cycles).

**Mesh edges.** A port on the mesh boundary has no neighbour. Its output is looped back
through a link register into the same router's port. A flit deflected off the edge
therefore comes back one hop later. This keeps every router a full 4-port deflection
router, which it must be: every flit has to leave on some port every cycle. This boundary
rule is this design's own choice.

## The router pipeline

```
            stage 1 (combinational)                   reg   stage 2 (combinational)                  reg
in_link -> eject x2 -> re-inject / redirect -> inject -> s1 -> silver + golden tags -> permutation net -> buffer eject -> out_link
              |              ^        |          ^                                                          |
              v              |        v          |                                                          v
           ej[0..1]      side buffer head    inj/inj_taken                                      side buffer write
                                  (redirect writes the buffer too)
```

**Stage 1** works on the four incoming slots.

1. *Ejection* (`eject_dual`). Two ejection units in series each remove one flit addressed
   to this node. A golden flit goes first; otherwise the lowest-numbered slot goes first.
   The node must accept ejected flits in the same cycle. Nothing pushes back into the
   network.
2. *Re-injection* (`reinject_stage`). If a slot is now empty, the side-buffer head takes
   the lowest empty slot.
3. *Injection* (`inject_stage`). If a slot is still empty, the node's flit enters it. The
   node holds `inj` until `inj_taken` is high. The side buffer comes before new traffic.

**Stage 2** routes the slots.

1. `silver_select` makes one flit silver: the first occupied slot at or after a random
   start.
2. A flit whose packet identity equals the current golden identity is tagged golden.
3. The permutation network (below) assigns the flits to the four output ports.
4. `buf_eject` takes up to one flit that left on a non-productive port into the side
   buffer, if the buffer can take a write. It starts the search at a random port and never
   takes a golden flit. Nor does it take a flit addressed to this router that missed
   ejection: the buffer re-injects behind the ejection point, so such a flit could circle
   between buffer and outputs forever. Sent out instead, it comes back a few cycles later
   and is ejected then.
5. The result is registered onto `out_link`.

Flits are never created or lost inside the router. The number of flits that leave equals
the number that enter, minus the ejected ones, plus the net change of the side buffer.

### Permutation network and the two priority levels

```
 stage 1                      stage 2
 N, E -> block A  --out0-->  block C -> N (out0), S (out1)
                  --out1-->  block D -> E (out0), W (out1)
 S, W -> block B  --out0-->  block C
                  --out1-->  block D
```

A and B send their upper output to C, which drives the N and S ports. They send their
lower output to D, which drives the E and W ports. Each 2x2 block (`arb_block`) decides
alone:

1. **Pick a winner.** A golden flit beats a silver flit, which beats an ordinary flit. An
   empty input always loses. Between two golden flits (they belong to the same packet) the
   lower sequence number wins. Between two ordinary flits a random bit decides.
2. **Steer.** The winner gets the output it wants, and the other flit takes the other
   output. In the first stage a flit "wants" the half that holds a productive port. In the
   second stage it wants the productive port itself. A winner that can use either output
   (for example a flit that has both a productive E/W and a productive N/S direction)
   leaves the choice to the other flit.

Each block decides alone, which keeps the critical path short. Without priorities, a flit
can win in stage 1 and lose in stage 2, while the flit it beat in stage 1 has already been
sent the wrong way. Both are then deflected. The silver flit solves this: every block
favours the same flit, so at least one flit per router per cycle always reaches a
productive port. `tb_perm_net` checks this property.

### Golden Packet: why nothing livelocks

`golden_ctrl` makes one packet identity {src, txn} golden for 64 cycles. It then moves on
to the next identity in a fixed order: the transaction number counts fastest, then the
source. In a 4x4 mesh there are 16 x 16 = 256 identities, so the schedule repeats every
16K cycles.

Each router keeps its own copy of the counter. All copies leave reset together, so they
always agree.

A golden flit is never deflected while it has a productive port, and it is never put into
the side buffer. It therefore reaches its destination within an epoch. 64 cycles covers
the worst-case 4x4 delivery, 3 x (7 hops + 7 cycles of serialization) = 42 cycles, plus
the side-buffer rescue time below.

### The side buffer and buffer redirection

The side buffer takes flits out of the stream only when they would have been deflected.
It puts them back only into empty slots. Under heavy load there may be no empty slot for a
long time. A flit that *became* golden while it was buffered could then be stuck, and the
golden guarantee would fail.

Buffer redirection prevents this:

- `reinject_stage` counts the cycles the buffer head has been blocked.
- In the head's `C_THRESHOLD`-th cycle at the front (2 by default), it picks a non-golden
  incoming flit at random. That flit goes into the side buffer, and the head takes its
  slot.
- The buffer pops and pushes in the same cycle, so it accepts the write even when full.
- Any buffered flit is therefore back in the network within `C_THRESHOLD x BUF_DEPTH` =
  8 cycles.

The buffer has a single write port. If a redirection and a buffer-eject want it in the
same cycle, the redirection wins. The deflected flit then simply stays deflected.

## Reassembly and dropped flits

Each node's `reassembly_buffer` has 8 packet entries (a size chosen by this design). Each
arriving flit joins its packet's entry, or opens a free entry. When all flits from 0 to
`last_seq` are present, the packet appears on `done_*` for one cycle (one packet per node
per cycle) and the entry is freed.

If no entry is free, the flit is **dropped** and reported on `drop_valid` / `drop_flit`.
The network never back-pressures, so something must recover the flit. That is an
end-to-end protocol ("Retransmit-Once"): the receiver notes the dropped packet, later
reserves space and asks the sender to send it once more. This RTL does not contain that
protocol, because it needs sender-side packet copies and request messages that are not
specified. `drop_*` is the hook where it connects. The end-to-end testbench stands in for
it by sending each dropped flit again from the back of its source's queue.

## Top-level interface (`minbd_mesh`)

| parameter | default | meaning |
|---|---|---|
| `MESH_X`, `MESH_Y` | 4, 4 | mesh size (8, 8 is the larger evaluated configuration) |
| `NUM_TXN` | 16 | transaction numbers per source |
| `EPOCH` | 64 | cycles per golden identity; use about 128 for 8x8 (3 x (14+7) + 8 = 71 > 64) |
| `BUF_DEPTH` | 4 | side-buffer entries |
| `C_THRESHOLD` | 2 | blocked cycles before buffer redirection |
| `RA_SLOTS` | 8 | reassembly entries per node |

All ports are unpacked arrays indexed by node `n`:

- `inj[n]` and `inj_taken[n]`: injection;
- `ej[n][0..1]`: the flits ejected this cycle;
- `done_valid/done_id/done_last/done_data[n]`: a reassembled packet;
- `drop_valid[n]` and `drop_flit[n][0..1]`: flits a full reassembly buffer refused;
- `events[n]`: one-cycle pulses for deflections, ejections, injection, side-buffer write,
  re-injection, redirection, silver and golden activity.

Reset is asynchronous and active low. The clock is a single clock.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Build and run one
with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_minbd_mesh \
    -y rtl -y tb +libext+.sv rtl/minbd_pkg.sv tb/minbd_tb_pkg.sv tb/tb_minbd_mesh.sv -o sim
./obj_dir/sim
```

`tb_minbd_mesh` runs the 4x4 mesh at its default parameters for about 20,000 cycles, in
about half a minute of wall time. It has four phases:

1. one packet crosses 3 hops of an empty network (latency check);
2. uniform random traffic at high load;
3. a hot spot, where every node sends to node 5, which overflows reassembly buffers;
4. a drain.

A flit refused by a full reassembly buffer is handled by the testbench the way
Retransmit-Once would. If its packet already holds an entry at the destination, the flit
is sent again at once. Otherwise it waits until fewer than 8 packets are open at the
destination, and is then sent again from its source. Without this admission rule, a hot
spot can fill all 8 entries with partial packets whose missing flits keep being refused.

`tb_minbd_mesh_8x8` runs the same test on an 8x8 mesh (64 routers) with `EPOCH = 128`,
at lower injection rates, in about two minutes.

Every packet is checked word by word at its destination. Every mechanism (deflection,
side-buffer write, re-injection, redirection, dual ejection, silver, golden, reassembly
drop) must occur at least once.

`tb_minbd_router` drives a single router directly. It checks the 2-cycle latency, dual
ejection, that every flit is conserved under random load, and that the side buffer drains.
The other testbenches compare each block against a model written independently inside the
testbench.

## Where this design makes its own choices

The router's structure comes from the original design: the stage order, the 4-flit side
buffer, dual ejection, golden/silver/random priorities, redirection after `C_THRESHOLD`
cycles, the 64-cycle golden epoch, 16 transactions per source, the 2-cycle router and
1-cycle link latency, and the 4x4 and 8x8 meshes. Details it leaves open were filled in
here:

- flit field widths and the 32-bit data word;
- where the pipeline register sits (after injection);
- the mesh-edge loop-back;
- lowest-slot-first choices in ejection, re-injection and injection;
- a random start for silver selection, buffer eject and redirection;
- a 16-bit LFSR per router as the random source;
- the order in which the golden identity steps;
- redirection beating buffer eject for the single buffer write port;
- letting a winner with no single preferred output yield to the other flit;
- keeping flits addressed to the router itself out of the side buffer;
- the reassembly buffer's 8 entries and per-flit drop reporting.

## Not included

- **Retransmit-Once.** Only its drop hook exists; see above.
- **The traffic sources.** The cores, caches and directory protocol that generate traffic
  in a real chip are not part of this RTL. The testbenches use synthetic traffic.
- **Power and area models.** Power and area figures come from outside the logic (a
  standard-cell library and link/crossbar models).
- **Comparison routers.** Buffered virtual-channel routers, a purely bufferless router and
  a mode-switching hybrid router were only used for comparison and are not built.

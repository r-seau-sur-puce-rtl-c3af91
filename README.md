# Buffer-less, label-switched network-on-chip for an H.264/AVC encoder

An H.264/AVC encoder is a set of cores (intra prediction, inter prediction,
transform and quantisation, their inverses, deblocking filter, frame memory)
that pass macroblock data from one to the next. This RTL connects such cores
through a small 2D-mesh network-on-chip with two unusual properties:

* **No buffers in the routers.** A router is only a crossbar plus a switching
  table. A flit crosses it without being stored.
* **Labels instead of addresses.** A packet's header carries a *label*, not a
  destination. Each router looks the label up in its switching table to pick
  the output port. When a core has processed a packet, its network interface
  sends the result on with a *new* label, and that label leads to the next
  core of the chain. The first label, given where video enters the network,
  names the *scenario*: which chain of cores the data will visit.

A set-up processor loads all the tables before traffic starts. After that,
every packet of a scenario follows the same path, like a circuit-switched
connection. Cores that several scenarios need are shared rather than
duplicated. In the default map, DCT/Q and its inverse serve both the intra
chain and the inter chain.

The scheme follows the buffer-less NoC proposed for H.264/AVC in *Réseau sur
puce sans buffer pour les applications de codage vidéo : étude de cas
H.264/AVC*. The SystemVerilog here is an independent implementation. Many
details below (widths, handshake, table formats, set-up timing) are this
implementation's own choices, because the proposal does not specify them.
Section "Where this departs from, or adds to, the proposal" lists them.

## Node map (default 3x3)

Routers are numbered row by row from the north-west corner. Each router has a
network interface (NI) on its local port.

```
        col 0            col 1            col 2
row 0   0 Inter-Coding   1 Intra-Coding   2 DCT/Q
row 1   3 Inter-Decoding 4 Input/Output   5 Q^-1/DCT^-1
row 2   6 Memory         7 Deblock-Filter 8 Intra-Decoding
```

The centre node (`IO_NODE = 4`) is where raw video enters and results leave.
The H.264 cores themselves are **not** part of this RTL. For every node,
`h264_blnoc_top` brings out the NI's core-side streams as ports:

* `ip_rx_*` carries data towards the core.
* `ip_tx_*` carries results from the core.

At node 4, these same ports are the video output and the video input.

## Packets and labels

| flit | `type` | `data` |
|------|--------|--------|
| header | `FLIT_HEAD` | label in bits `[LABEL_W-1:0]` |
| body | `FLIT_BODY` | one payload word |
| tail | `FLIT_TAIL` | the last payload word; ends the packet |

A packet is a header, zero or more body flits and a tail. Every link is a
valid/ready handshake. A flit moves when `valid && ready` at a rising edge. A
flit that is offered must not change until it is taken; `blr_router` asserts
this.

A chain of *k* cores uses *k*+1 labels, one per hop. The testbench's intra
scenario looks like this:

```
label 1: in(4) -> Intra-Coding(1)     NI 1 relabels 1 -> 2
label 2: 1 -> DCT/Q(2)                NI 2 relabels 2 -> 3
label 3: 2 -> Q^-1/DCT^-1(5)          NI 5 relabels 3 -> 4
label 4: 5 -> Intra-Decoding(8)       NI 8 relabels 4 -> 5
label 5: 8 -> Deblock-Filter(7)       NI 7 relabels 5 -> 6
label 6: 7 -> out(4)
```

For each label, every router on the chosen path holds an entry giving the
output port, and the last router's entry says "local port". The path is
whatever the set-up processor writes; it need not be X-then-Y. Labels are
global, so a label used for one hop must not be reused for another hop that
crosses the same router. With `LABEL_W = 4` there are 16 labels.

## The buffer-less router (`blr_router`)

Per output port the router keeps one state bit, `rsv` (reserved), and the
index `owner` of the input that holds it. Nothing else is stored apart from
the table and the arbiter pointers.

1. A header at an input reads the switching table (`blr_switch_table`, one
   combinational read port per input) and asks for the output it names.
2. If that output is free, a round-robin arbiter (`blr_rr_arbiter`, one per
   output) picks one of the requesting headers. The output becomes reserved
   for that input at the next clock edge.
3. From the next cycle, the crossbar (`blr_crossbar`) wires the owner input to
   the output. The header and every later flit pass straight through, one per
   cycle. `ready` comes back through the same connection.
4. The reservation is dropped when the tail flit is handed on.

A header waits, with its input's `ready` low, while its output is reserved by
another packet or while its label has no valid table entry.

**Timing.** Each router costs exactly one clock, once per packet, to set up
the reservation. A header therefore reaches a node *h* routers away *h*
cycles after it is first offered. From then on, words stream at one per
clock end to end, with no register anywhere on the path. The flip side is
that `valid` and `data` travel forward and `ready` travels backward through
every router of a circuit in one cycle. The achievable clock period therefore
depends on the longest circuit, not on one router.

Lint tools report *circular combinational logic* on the mesh's link arrays.
Any crossbar can connect any input to any output, so the link wires form
loops around every ring of four routers. A signal only goes round such a loop
if the tables route a packet in a circle, which a correct set-up never does.
Simulation is unaffected. The warnings are expected, and each module that
carries them says so in its header.

## The network interface (`blnoc_ni`)

* **Receive side.** The NI takes the header, keeps its label (`ip_rx_label`)
  and passes the body and tail words to the core. `ip_rx_last` marks the
  tail's word.
* **Send side.** When the core offers its first result word, the NI sends a
  header first. The header's label is the relabel-table entry for the label
  that arrived. The NI then sends the words as body flits, and the word
  flagged `ip_tx_last` goes out as the tail.
* **One packet in flight.** The NI accepts a new header only after the result
  of the previous packet has left. This is what lets it work without a label
  queue.
* **Input/output node.** The NI at the input/output node (`EXT_LABEL = 1`)
  works differently. Its two sides are independent, and every entering packet
  is labelled with `io_scenario`. Hold `io_scenario` steady from the first
  word's `valid` until that word is accepted.

## Deadlock: why injection has to be metered

This is the hardest part of the design to use correctly. Two facts combine:

* A blocked header keeps the links it has already reserved.
* An NI whose core has not yet sent its result refuses the next header.

Together, these let circuits wait on each other in a circle. The default
inter chain (in → Memory → Inter-Coding → DCT/Q → Q^-1/DCT^-1 →
Inter-Decoding → Deblock-Filter → out, with X-then-Y paths) shows how:

* A packet on its way from the input to Memory holds the west output of the
  centre router while Memory is busy.
* Memory's result waits for Inter-Coding, which waits for DCT/Q, which waits
  for Q^-1/DCT^-1.
* Q^-1/DCT^-1's result to Inter-Decoding needs the same west output of the
  centre router.

With more than one inter packet in the network, this circle can close and
the system stops. The remedy lies outside the routers. One option is to
choose label paths whose circuits do not share links in a cycle (labels allow
any path). The other is to limit how many packets of a scenario are in
flight. The end-to-end testbench does the second: at most 3 intra and 1
inter packet at once. A single chain whose cores are all distinct and whose
paths do not cross back is safe at any injection rate, because its last hop
always drains.

## Configuration port (`h264_blnoc_top`)

The set-up processor makes one write per clock with `cfg_we` high. Each write
goes to the node selected by `cfg_node`.

| `cfg_target` | writes | key | value |
|---|---|---|---|
| 0 | router `cfg_node`'s switching table | `cfg_label` | `cfg_valid`, `cfg_port` (N=0, E=1, S=2, W=3, local=4) |
| 1 | NI `cfg_node`'s relabel table | `cfg_label` | `cfg_valid`, `cfg_new_label` |

After reset, every entry of every table is invalid.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 3, 3 | mesh size. 3x3 is the configuration the NoC was built for; 2x2 and 4x4 were also evaluated, and the mesh testbench runs all three |
| `DATA_W` | 32 | payload word width (own choice) |
| `LABEL_W` | 4 | label width: 16 labels (own choice) |
| `IO_NODE` | 4 | node where video enters and leaves (the centre) |

## Where this departs from, or adds to, the proposal

* **Switching and routing.** The proposal also describes its evaluation as
  using store-and-forward switching and XY routing. Those conflict with its
  own description of a buffer-less router driven by label tables.
  Store-and-forward needs a packet buffer, and the tables replace XY routing.
  This RTL follows the buffer-less, label-switched description. It keeps the
  valid/ready handshake and the round-robin arbitration that the evaluation
  also names. The arbiter is not drawn in the router figure.
* **Own choices.** The following are not given by the proposal and were
  chosen here:
  * the reservation from header to tail, with one set-up cycle per hop;
  * the table formats, with valid bits, reset to invalid;
  * the relabel table inside the NI (the proposal only says the NI changes
    the label);
  * one packet in flight per NI;
  * the tail flit carrying data;
  * the configuration bus;
  * waiting, rather than dropping, on an unknown label or on an edge port.
* **Widths and cost.** The proposal gives no packet or word size. The
  reported cost of its 3x3 network (a few hundred LUTs and registers) suggests
  narrower links than the 32 bits chosen here. It also suggests that the
  switching table sat in LUT-RAM, whereas here it is a register array with
  reset.
* **Links.** Links between routers are drawn as two-way. Here each is built
  as a pair of one-way links.
* **Not included.** The H.264 cores and the MicroBlaze set-up processor are
  outside this RTL. The cores were reused from earlier work and are not
  specified by the proposal. The testbenches use stand-ins for both.

## Files

| file | contents |
|---|---|
| `rtl/blnoc_pkg.sv` | port and flit-type enums |
| `rtl/blr_rr_arbiter.sv` | round-robin arbiter |
| `rtl/blr_switch_table.sv` | label → output-port table, 5 read ports |
| `rtl/blr_crossbar.sv` | 5x5 crossbar with ready routed back |
| `rtl/blr_router.sv` | buffer-less router |
| `rtl/blnoc_mesh.sv` | ROWS x COLS mesh |
| `rtl/blnoc_ni.sv` | network interface with relabelling |
| `rtl/h264_blnoc_top.sv` | mesh + NIs, node map above |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_mesh_harness.sv` | mesh traffic checker used at 2x2, 3x3 and 4x4 |
| `tb/tb_ip_model.sv` | behavioural stand-in for an H.264 core (y = rotl(x,1) + K) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if the test hangs. For example, the end-to-end
test at the default size:

```
verilator --binary --timing --assert -Wno-UNOPTFLAT -y rtl -y tb \
    rtl/blnoc_pkg.sv tb/tb_h264_blnoc_top.sv --top-module tb_h264_blnoc_top
./obj_dir/Vtb_h264_blnoc_top
```

Replace the testbench name to run any other test. `-Wno-UNOPTFLAT` is needed
only for the mesh and the top, because of the loop warnings explained above.

What the testbenches check:

* **`tb_h264_blnoc_top`.** It loads the tables for an intra and an inter
  scenario. It sends 300 packets of 1–16 words with random back-pressure at
  every core, then compares every output word with the chain of stand-in
  functions. It checks that the first header reaches Intra-Coding's NI two
  cycles after it is offered. It also counts, and requires, each of the
  following: arbitration contention, a header waiting on another packet's
  reservation, back-pressure through a circuit, label changes, an NI holding
  off a packet, and reservation release.
* **`tb_blnoc_mesh`.** It runs 2x2, 3x3 and 4x4 meshes with one label per
  destination. It checks the set-up latency of ROWS+COLS−1 cycles across the
  mesh and one word per cycle after that. It sends random all-to-all traffic
  and checks that every packet arrives whole and in order.
* **`tb_blr_router`.** It checks:
  * a header with an unwritten label waits;
  * a header crosses one cycle after it wins its output;
  * random traffic from all five inputs arrives as contiguous packets on the
    table's outputs.
* **Unit tests.** `tb_blr_switch_table`, `tb_blr_crossbar`,
  `tb_blr_rr_arbiter` and `tb_blnoc_ni` compare their modules against
  reference models.

All of these pass. They check function and cycle counts only. No timing,
area or power figure of the proposal has been reproduced.

# ATM-layer cell processing for a UNI/NNI interface module

This is the ATM-layer logic of one line-interface module of an ATM switch.
Cells from many physical links are merged into one stream. Each cell is
identified by its connection and checked against that connection's
negotiated peak rate. Any clumping it picked up in the network is then
smoothed out before the cell enters the switch fabric. On the way out of the
fabric, Available Bit Rate (ABR) traffic gets its rate-based flow control:
congestion marking, or a full virtual source and destination when this node
ends an ABR control segment. Each cell is then sent to one or more links,
and every copy gets the VPI/VCI agreed for that link.

The design follows a published description of a Korean ATM switching system's
interface blocks (mid-1990s, ITU-T/ATM Forum era). That description gives the
block structure, the policer's number formats, the spacer's linked-list
organisation and the egress ABR structure. It does not give the signal-level
behaviour. Every handshake, encoding and size the description leaves open is
this design's own choice; each one is named in the opening comment of the
file concerned and listed below.

## Cell path

```
 links 0..17 ──► cell_mux ──► header_xlate ──► upc_npc ──► spacer ──► sf_out  (to switch fabric)
 (lk_in_*)      priority      VPI/VCI lookup     VSA        peak-rate
                buffers       + routing tag      policer    shaper

 sf_in ──► abr_egress ──────────────────► [spacer] ──► cell_dmx_copy ──► links 0..17
 (from     CBR/VBR buffer, ABR buffer,       transmit     bitmap copy,       (lk_out_*)
  fabric)  FRM/BRM extraction, switch        shaper,      per-link VPI/VCI
           algorithm | VS + VD (seg_end),    only when
           scheduler                         tx_shape = 1
                 ▲ rev_in (backward cells from downstream) │ rev_out (backward cells to fabric)
```

The second spacer is the same design as the first. It shapes the transmit
side of an NNI, so that the neighbouring switch sees each connection within
its negotiated peak rate. A 4-cell queue in front of it holds the
scheduler's cells while it is busy; `tx_sp_lost` flags a cell that found
that queue full.

`atm_if_top` wires these together. The physical layer, the control
processor and the switch fabric are not part of it. Their signals are
ports:

* one 424-bit cell per link in each direction;
* the tagged cell streams to and from the fabric;
* write ports for every table;
* the node's congestion indication.

### Cell format and routing tag

`atm_pkg` defines the types used between blocks:

* `cell_t` is a 53-octet cell as one word. It holds a UNI header struct
  (GFC, VPI, VCI, PT, CLP, HEC) and a 384-bit payload, with octet 0 in
  bits [383:376].
* `sw_cell_t` adds a routing tag in front of the cell. The tag has four
  fields:
  * the fabric output port;
  * an 18-bit link bitmap for cell copy at the far side;
  * an ABR class flag;
  * an 8-bit connection index.

Header translation finds the connection index once. Every per-connection
table downstream (policer context, spacer VCAT, DMX VPI/VCI table) is then
addressed by it.

RM cells are recognised by payload type 110. They use the ATM Forum field
positions:

* protocol id in octet 0;
* DIR, BN, CI and NI in octet 1;
* ER, CCR and MCR in octets 2-7.

The rates are plain 16-bit binary fractions of the link cell rate, not the
standard's floating-point code.

## Multiplexer (`cell_mux`)

Each link has its own small buffer (DEPTH = 16 cells). A link signals a new
cell with a one-cycle `lk_valid` pulse, which works like an interrupt. If the
link's buffer is full, the cell is lost and `lk_lost` pulses. Whenever the
output can accept a cell, the buffer of the lowest-numbered non-empty link
is served. Link numbers are therefore priorities, and the fast links should
be wired to the low numbers.

Giving priority to the fast links keeps their buffers tiny. The cost is
delay on the slow links, where delay matters least. The published loss
curves for 2 × 155M, 2 × 44M and 14 × 2M links with Bernoulli loads of 0.2,
0.8 and 0.8 put loss below 10⁻⁷ with roughly 3, 6 and 8 cells of buffer.
`tb_cell_mux_load` runs that load. It loses about 1 cell in 10⁴ with 8
cells, and none in 400 000 slots with 16, so the default is 16. The mean
delays it measures are about 2, 3.7 and 25 slots, against roughly 1, 3
and 28 in the published curves. The polling discipline the description
compares against is not built.

## Header translation (`header_xlate`)

This is an associative table of 256 entries, searched on (incoming link,
VPI, VCI). A hit rewrites the VPI/VCI and attaches the routing tag. The
entry number becomes the connection index. A miss drops the cell and
pulses `miss`. Latency is one clock.

OAM cell handling is not built: the description places it in this block but
gives nothing of its function.

## Policer (`upc_npc` with `upc_ccm`, `upc_vsa_calc`, `upc_timer`, `upc_expiry`)

The policer checks each connection's peak cell rate with the Virtual
Scheduling Algorithm (VSA). Each connection has a theoretical arrival time
TAT, an emission interval T and a tolerance τ.

### Number formats

The whole unit counts time in cell slots of a 155.52 Mbit/s link (2.726 µs):

| quantity | bits | format |
|---|---|---|
| t (now), TAT | 24 | 16 integer + 8 fraction bits: t advances by 256 per `slot_tick` |
| T | 22 | 14 integer + 8 fraction bits: rate = 10⁶ / (2.726 µs·(k + m/256)) cells/s |
| τ | 12 | whole slots, shifted up 8 bits before use |

T therefore covers 9.49 kbit/s to 39.8 Gbit/s. Its step size is 0.37 % at
100 Mbit/s. Program T = 256·(slot time of the link)/(cell interval).

### The three decisions in parallel

`upc_vsa_calc` computes all three VSA outcomes from the same operands. A
priority encoder then picks one:

1. **Late.** The context is expired, or TAT ≤ t. The cell conforms, and
   TAT := t + T.
2. **Early.** TAT > t + τ. The cell is non-conforming, and TAT is kept.
3. **Otherwise** the cell conforms, and TAT := TAT + T.

Comparisons use the 24-bit modular difference read as a signed number. A
cell is policed in two clock cycles:

1. Read the context memory into a register with the cell.
2. Run the decision, write TAT back, and forward or drop the cell.

The original quotes about 850 ns at 23 MHz (≈ 19 clocks), so this leaves
plenty of margin.

### Policing modes

There are four modes per connection:

| mode | cells policed | action on a non-conforming cell |
|---|---|---|
| `POL_CLP01_DISCARD` | all | discard |
| `POL_CLP01_TAG` | all | tag: CLP := 1; a cell already CLP=1 is discarded |
| `POL_CLP0_DISCARD` | CLP=0 only; CLP=1 cells pass unpoliced | discard |
| `POL_CLP0_TAG` | CLP=0 only; CLP=1 cells pass unpoliced | tag |

`nc_pulse` flags every non-conforming cell and `drop_pulse` every discarded
one.

### Why there is an expiry processor

TAT and t wrap at 2²⁴ (65 536 slots, 178 ms). A connection that has been
silent for longer would appear to have a TAT in the future, and its next
cell would be wrongly discarded. `upc_expiry` prevents this:

* It walks the context memory cyclically, one entry per cycle, in the
  cycles when no cell is being policed.
* It sets the E bit of every entry whose TAT lags t by at least 2²² (16 384
  slots).
* An expired entry takes the "late" branch.
* Writing back a TAT clears E.

The description only states that such a cyclic scan exists. The 2²² limit
is this design's choice. It leaves 16 384 slots of margin, against a scan
of 256 entries.

## Peak-rate spacer (`spacer`)

This is the most intricate block. The policer allows bursts within τ, and
cell delay variation upstream creates clumps. The spacer re-spaces every
connection to its peak interval PI (in slots) without a queue per
connection. All connections share one buffer of NCELL = 108 cells, held
together by linked lists.

### Data structures

| structure | contents |
|---|---|
| cell buffer | 108 cell words, each with a `next` pointer |
| FL | free list of buffer words (head/tail) |
| VCAT | per connection: PI, the head/tail of its temporary queue (TQ), an in-flight flag, and the slot of its last departure (with a "recent" flag) |
| ES | event scheduler: a circular table of K = 54 entries, one per future slot. Each entry is the head/tail of a cell slot queue (CSQ) of cells due in that slot |
| OL | output list: cells that are due, in departure order |

### Rules

* **At most one cell per connection is scheduled at a time.** It sits in
  ES or in OL. Later cells of the same connection wait in its TQ.
* **Arrival.** If the connection has nothing scheduled and an empty TQ, the
  cell goes into the CSQ max(1, last departure + PI − now) slots ahead.
  Otherwise it is appended to the TQ.
* **Each slot:**
  1. MOVE: the CSQ of the new slot is spliced onto the tail of OL in one step.
  2. DEPART: the head of OL leaves on `out_*` and its buffer word returns to FL.
  3. RESCHEDULE: if the departed connection has a TQ, its head is put into
     the CSQ exactly PI slots ahead.

Scheduling from the *actual* departure is what guarantees that no cell ever
leaves faster than PI. Several cells can be due in the same slot. When that
happens they leave in consecutive slots (`contention` pulses) and are only
ever delayed, never sped up.

### Sizing

K must be larger than every PI, so PI is limited to 1..53. The description
sizes the buffer as 2δ for a CDV bound δ. It gives 108 cells, so δ = 54, the
10⁻¹⁰ quantile of an M/D/1 queue at load 0.8. It sizes K as min(δ, max PI + 1).

A cell that finds the buffer full is held back (`in_ready` low), not
dropped. A background scan of the VCAT clears the "recent" flag of
connections whose last departure is K or more slots old. Without it, a
wrapped 16-bit slot count could be misread.

### Timing

Each slot needs 6 clocks of list work, plus one clock per arriving cell,
between `slot_tick`s.

## ABR on the egress side (`abr_egress`)

ABR traffic is carried through the ingress side and the fabric untouched.
All ABR processing is at the output. Cells from the fabric are split by the
tag's ABR flag:

* CBR/VBR cells go into a 32-cell buffer.
* ABR cells go through forward-RM (FRM) extraction into a 64-cell ABR buffer.

The node counts as congested when the ABR buffer holds 32 or more cells, or
when the `cong_ind` input is high.

The `seg_end` input (SEL) selects between two ways of working:

**`seg_end = 0`: this node is inside an ABR segment.** Only the EFCI switch
algorithm (`abr_switch_alg`) works:

* While the node is congested, FRM cells get CI = 1 and go back into the
  ABR buffer.
* Backward-RM (BRM) cells from the downstream side (`rev_in`) get the same
  mark and leave on `rev_out` towards the source.
* CI is only ever set, never cleared, so an upstream node's mark survives.

**`seg_end = 1`: this node ends an ABR segment.** The switch algorithm is
off.

* The virtual destination (`abr_vd`) turns each FRM cell round into a BRM
  cell. It sets DIR, and sets CI while the node is congested. The cell goes
  out on `rev_out`.
* BRM cells arriving on `rev_in` are taken by the virtual source (`abr_vs`).
  It updates its current cell rate CCR on each one:

  | BRM cell | CCR change |
  |---|---|
  | CI set | CCR −= CCR >> `rdf_sh` |
  | CI and NI both clear | CCR += PCR >> `rif_sh` |

  The result is clamped to [MCR, PCR].
* The virtual source paces the ABR buffer's cells at CCR, using a credit
  accumulator.
* After every `nrm` data cells it inserts its own FRM cell, which carries
  CCR, MCR and ER = PCR.

`mux_scheduler` sends one cell per `eg_tick`. CBR/VBR cells have priority,
except that an MCR credit accumulator guarantees ABR its minimum rate:
while a whole cell of credit is held, a waiting ABR cell goes first
(`mcr_turn`). `vs_load` loads ICR into CCR.

## Demultiplexer with cell copy (`cell_dmx_copy`)

Every link whose bit is set in the tag's bitmap receives the cell in the
same clock, so multicast and broadcast cost nothing extra. Each copy's
VPI/VCI comes from a per-link table [link][connection]. Output is
registered, one cell per clock.

## Configuring the tables

All tables are written through plain write-enable ports on `atm_if_top`,
one entry per clock:

| ports | table |
|---|---|
| `hx_*` | header translation: index, used, link, VPI/VCI, new VPI/VCI, port, link bitmap, ABR flag |
| `ccm_*` | policer context: a whole `ccm_entry_t` {TAT, T, τ, E, mode}. Write E = 1 for a new connection |
| `sp_*` | spacer peak interval (ingress) |
| `tx_shape`, `tx_sp_*` | transmit-side spacer on/off and its peak intervals |
| `dx_*` | DMX VPI/VCI per (link, connection) |
| `pcr`, `mcr`, `icr`, `rif_sh`, `rdf_sh`, `nrm` | ABR settings, with `vs_load` |

Use the same index for a connection in every table.

## Parameters

| parameter | default | where |
|---|---|---|
| `NLINK` | 18 | package: links per multiplexer (2 × 155M + 2 × 44M + 14 × 2M) |
| `CONN_W` | 8 | package: 256 connections; not given in the description |
| `TAT_W`, `T_W`, `TAU_W`, `TIME_W` | 24, 22, 12, 24 | package: policer widths from the description |
| `MUX_DEPTH` | 16 | top: per-link multiplexer buffer |
| `SP_NCELL`, `SP_K` | 108, 54 | top: spacer buffer and event scheduler size |
| `ABR_DEPTH`, `ABR_THRESH`, `CBR_DEPTH` | 64, 32, 32 | `abr_egress`: own choices |

## Verification

Each block has a self-checking testbench `tb/tb_<block>.sv` that compares
against an independent model and prints `TB_RESULT checks=… failures=…`.

| testbench | what it exercises |
|---|---|
| `tb_upc_vsa_calc` | random operands against a sequential VSA |
| `tb_upc_npc` | the four peak rates 155, 155/2, 155/4, 155/8 Mbit/s against back-to-back cells (64, 32, 16, 8 of 64 pass); random traffic in all four modes against a model; expiry after 40 000 idle slots; latency ≤ 19 clocks |
| `tb_spacer` | 10 CBR sources (PI = 5, 3 × 10, 6 × 20) with random CDV of up to 12 slots: no cell ever departs closer than PI, every cell comes out, occupancy stays in the buffer, and the share of PI = 20 gaps that are exactly 20 is measured |
| `tb_cell_mux` | 18 links with random arrivals: strict priority, order, and loss exactly when a buffer is full |
| `tb_cell_mux_load` | the published multiplexer load at default sizes: no loss, order per link, delay ordering across the speed classes |
| `tb_abr_egress` | both SEL modes, congestion from the buffer and from `cong_ind`, VD turn-round, VS pacing and FRM insertion, MCR share |
| `tb_atm_if_top` | end to end at the default sizes, see below |

The other blocks are tested directly against models.

`tb_atm_if_top` loops the fabric output back to the fabric input and runs
five connections:

* one within contract;
* one 8× over its rate in discard mode;
* one 2× over its rate in tag mode, multicast to 3 links;
* one ABR connection, including its own FRM cells;
* one burst that overflows a link buffer;
* plus cells with an unknown VPI/VCI.

Halfway through, it switches `seg_end` from 0 to 1. Three quarters through,
it switches in the transmit-side spacer (`tx_shape`) and checks the spacing
of each connection on its link. It checks every output
header and link. It counts the following, and fails if any of them never
happens:

* multiplexer loss;
* translation miss;
* discard;
* tag;
* spacer contention;
* multicast;
* congestion marking;
* VS FRM insertion;
* VD turn-round;
* MCR turns;
* transmit-side shaping and its contention.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal rtl/atm_pkg.sv \
  $(ls rtl/*.sv | grep -v atm_pkg) tb/tb_atm_if_top.sv --top-module tb_atm_if_top
./obj_dir/Vtb_atm_if_top
```

Change the testbench name to run any other block's test.

## Departures and limits

* **Spacer accuracy.** The published result is that more than 99 % of the
  departures of a PI = 20 source are exactly 20 slots apart. In
  `tb_spacer`'s load (ten sources, random CDV up to 12 slots) about 97 %
  are. The testbench requires 95 %. The rule "never faster than PI" holds
  without exception. The original defers its exact scheduling rule to a
  separate publication that it does not reproduce, so the difference may be
  in the rule or in the test traffic.
* **Spacer placement.** The same spacer design is used twice: on the
  ingress path in front of the fabric, and (switched in by `tx_shape`, for
  NNI operation) after the egress scheduler. Where exactly each sits is this
  design's choice.
* **Switch algorithm.** Only the EFCI switch algorithm is built. The
  explicit-rate variant (EPRCA) is named without formulas.
* **Virtual source.** The virtual source holds the state of one ABR
  connection. With several ABR connections ending a segment at this node,
  it would need per-connection state.
* **OAM.** OAM cell processing in header translation is not built.
* **Multiplexer discipline.** The multiplexer implements only the
  priority-interrupt discipline.
* **Outside this design.** The physical layer (line conversion, bit sync,
  S/P and P/S, SDH/PDH framing, order wire and DCC), the control processor,
  the switch link interface, the switch fabric, signalling (SAAL, MTP-3) and
  circuit emulation are not designed here.
* **Timing.** The clock-level timing is this design's: cell-wide buses,
  valid/ready handshakes, and the slot strobes `upc_tick`, `sp_tick` and
  `eg_tick`. The original gives only the 850 ns policing figure.

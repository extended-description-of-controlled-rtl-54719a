# COSM: hardware-enforced isolation for a memory device shared by several hosts

A memory device attached to several hosts at once (for example over CXL) lets
them exchange data simply by writing and reading the same memory. Left alone,
any host that can reach a shared region can also write into it and read from
it, so the device is an open channel between all of them. Controlled Shared
Memory (COSM) closes that channel in the device itself: for every host and
every memory region, the device's memory path holds two bits, write permitted
(W) and read permitted (R), and drops every access those bits forbid before it
reaches memory. Nothing running on a host can override them.

The two bits per host and region form a permission matrix. For two hosts and
one region:

| [W R] host 0 | [W R] host 1 | what the region becomes |
|---|---|---|
| [0 0] | [0 0] | air gap: no data passes in either direction |
| [1 0] | [0 1] | forward data diode: host 0 → host 1 only |
| [0 1] | [1 0] | reverse data diode: host 1 → host 0 only |
| [1 1] | [1 1] | "wire": free two-way exchange |

The bits can be changed at run time, so a region can be opened for one
transfer and air-gapped again. A second level of isolation inspects the
payload of writes that the permissions allow and rejects those that fail a
range or header check.

This repository is synthesizable SystemVerilog for the datapath of such a
device with two hosts, modelled on an FPGA prototype that bridges two servers
over CXL and stores the shared data in two DDR4 channels.

## Datapath

```
 host 0 link ──► ATT 0 ──┬─ reads  ─► port 0 ┐                 ┌─► memory channel 0
 host 0 prog ──────────────────────► port 4 │   request        ├─► memory channel 1
                         └─ writes ─► port 1 ├─► switch ───────┼─► ATT 0 programming
 host 1 link ──► ATT 1 ──┬─ reads  ─► port 2 │   (10 in, 4 out) └─► ATT 1 programming
                         └─ writes ─► port 3 │
 host 1 prog ──────────────────────► port 5 │
 expansion 0..3 ───────────────────► 6..9   ┘

 memory ch 0/1, ATT programming responses, ATT rejects ─► response switch (6 in, 10 out)
                                                          ─► back to the issuing port
```

* **ATT (`att`)** – the Address Translation Table of one host link, the
  part that enforces COSM. Every request from the host is checked against up to
  32 rules before it may enter the switch. Rejected requests never reach the
  switch or memory. The host still gets an answer, an error response, so it
  never waits for a transaction that was silently dropped.
* **Request switch (`arb_switch`, 10×4)** – lets every input reach either
  memory channel, and carries the ATT programming traffic to the tables (see
  "Inside the switch" below).
  `route_compute` picks the output: programming inputs go to their own
  host's table, all other traffic goes to memory channel `addr[6]`, so
  consecutive 64-byte lines alternate between the channels.
* **Response switch (`arb_switch`, 6×10)** – returns every response to the
  port that issued the request. It routes on the `src` field that the top
  stamps into each request.
* Each host link is split into a read port and a write port, as the AXI
  read and write channels of the link are. A host's read responses come out of
  port 2h and its write completions out of port 2h+1.

Outside `cosm_esmd_top`, and brought out as ports, are:

* the CXL link controllers (`h_*` ports);
* the DDR memory controllers (`mem_*` ports). Each response must echo the
  request's `src` and `tag`;
* the processor that writes the rules (through `h_cfg_*`);
* four expansion links (`x_*`). They are reserved ports and, like the
  prototype, have no ATT in front of them. Anything attached there reaches
  memory unfiltered. Add an `att` instance per link before using them with
  untrusted traffic.

## How a rule table implements the permission matrix

The permission matrix is not stored as a matrix. Each host link has its own
table, and a host's column of the matrix becomes that table's rules: one rule
per memory region, naming the address range and what the host may do there.
A rule has:

| field | meaning |
|---|---|
| `lo`, `hi` | region bounds, both inclusive (52-bit addresses) |
| `enabled` | a disabled rule never matches |
| `reverse` | invert the range test: the rule matches addresses *outside* `[lo, hi]` |
| `reject` | deny every access that matches, whatever `rd`/`wr` say |
| `rd`, `wr` | allow reads / writes that match; these are R and W of the matrix |
| `xlat`, `xbase`, `xsize_log2` | optionally translate matching addresses |

The six rule kinds (`rule_kind_e` and `rule_ctrl()` in `cosm_pkg`) are
combinations of these bits:

* allow-all: W = R = 1.
* allow-read and reject-write: R only.
* allow-write and reject-read: W only.
* reject-all: the air gap.

**Priority.** Rule 0 is checked first, then rule 1, and so on. The first
enabled rule that matches decides. The hardware compares all 32 rules in
parallel and picks the lowest-numbered match, which gives the same decision in
one clock. If no rule matches, a default rule decides. Its permissions are
programmable, and after reset it rejects everything. A freshly reset device is
therefore fully air-gapped until software opens regions. Because earlier rules
win, a narrow rule can carve an exception out of a wide one. For example,
rule 0 can reject writes to one page of a region that rule 1 opens fully.

**Translation.** With `xlat` set, a matching address becomes
`xbase + addr[xsize_log2-1:0]`. This is correct only when the rule follows
these restrictions:

* the slice is a power of two, `2^xsize_log2` bytes;
* `lo` is aligned to that size;
* the range fits in the slice.

Firewall-only rules may use any bounds.

**Data inspection.** A write that the rules allow can also be checked on its
payload. Each of two checks can be turned on separately, and each reads a
32-bit field at its own programmable bit position:

* Range check: the field, unsigned, must lie in `[lo, hi]`. An example is a
  parameter value that must stay within its limits.
* Header check: the field must equal a programmed value in every bit of a
  programmed mask. An example is a message type or format version.

By default a write that fails is rejected like a permission violation. In
flag mode it goes through to memory and only raises the host's interrupt.
Reads are not inspected.

**Events.** Every rejection pulses `h_irq[h]` for one clock (an interrupt
to the host) and increments a saturating 32-bit counter. Every flagged write
pulses `h_irq[h]` too, but is not counted. Custom logic outside
the datapath can interrupt host h as well, through `ext_irq[h]`, which is ORed
into `h_irq[h]` without a register.

### Register map

Programming requests are flits on `h_cfg_*`: `is_write` selects write or
read, `addr[10:3]` selects a 64-bit register, and write data is in
`data[63:0]`. Each request is answered on `h_cfg_rsp_*`, with read data in
`data[63:0]`. `err` is set for an index that does not exist. A new rule
applies to requests accepted from the next clock on.

| `addr[10:5]` | `addr[4:3]` | register |
|---|---|---|
| rule 0..31 | 0 | Compare Low |
| rule 0..31 | 1 | Compare High |
| rule 0..31 | 2 | translation base |
| rule 0..31 | 3 | `[13:8]` xsize_log2, `[5:0]` {xlat, wr, rd, reject, reverse, enabled} |
| 32 | 0 | default rule control bits `[5:0]` |
| 32 | 1 | inspection: `[40:32]` header field position, `[18]` flag mode, `[17]` header check on, `[16]` range check on, `[8:0]` range field position |
| 32 | 2 | inspection range: `[63:32]` hi, `[31:0]` lo |
| 32 | 3 | reject counter (read), any write clears it |
| 33 | 0 | header pattern: `[63:32]` mask, `[31:0]` value |

Example, a forward diode on region `[A, B]` from host 0 to host 1:

* Host 0 writes its rule 0 with `lo = A`, `hi = B`, control =
  `rule_ctrl(ALLOW_WRITE)`, i.e. `6'b010001`.
* Host 1 writes its rule 0 with the same bounds and `rule_ctrl(ALLOW_READ)`,
  i.e. `6'b001001`.
* To air-gap the region later, rewrite either control register as
  `rule_ctrl(REJECT_ALL)`, i.e. `6'b000101`.

## Interfaces and timing

Every stream is a `flit_t` (`cosm_pkg`) with valid/ready. A flit moves on a
clock edge where both are high. A flit is one whole 64-byte transfer, one CXL
transaction:

| field | bits | |
|---|---|---|
| `src` | 4 | switch port that issued the request (set inside the top) |
| `is_write` | 1 | |
| `err` | 1 | in responses: the request was rejected |
| `tag` | 8 | returned unchanged |
| `addr` | 52 | byte address |
| `data` | 512 | write data or read data |

Reset is synchronous and active low. With no contention, counted between
handshakes:

* A request reaches the memory port 3 clocks after the host hands it over:
  one for the ATT decision register, two in the switch.
* A memory response reaches the host 2 clocks after memory hands it over.
* A rejected request is answered in 3 clocks.

Each ATT accepts one request per clock. Each switch output delivers one flit
per clock. Flits from one input to one output stay in order. A host's reads
and writes travel through different switch ports, so the device does not order
a read against an earlier write: a host that needs that order waits for the
write completion first.

### Inside the switch

Each switch input has `NUM_VC` (2) virtual channels: 2-entry FIFOs
(`FIFO_DEPTH`). A flit is queued in channel `dst % NUM_VC`. In the request
switch, that puts traffic for the two memory channels into different queues.
In the response switch, it separates read responses from write completions.
While one memory channel stalls, flits for the other still leave the same
input. Flits for one output always share a queue, so they stay in order.

Each clock, allocation takes two round-robin stages:

1. Each input picks one of its virtual channels. Only channels whose oldest
   flit targets an output that can take a flit this clock take part. An
   output can take a flit when its register is empty or is being read.
2. Each output picks one of the inputs whose chosen flit targets it.

An arbiter's pointer moves only when its grant is used. No input or channel
can starve another.

## Files

| file | contents |
|---|---|
| `rtl/cosm_pkg.sv` | flit and rule types, rule kinds, register map |
| `rtl/cosm_esmd_top.sv` | the device datapath (top) |
| `rtl/att.sv` | rule table, decision pipeline, programming port, rejects, events |
| `rtl/att_access_check.sv` | range test and permission decode of one rule |
| `rtl/data_inspect.sv` | write-payload range and header checks |
| `rtl/arb_switch.sv` | crossbar with virtual-channel input buffers and round-robin allocation |
| `rtl/route_compute.sv` | output selection for the request switch |
| `rtl/sync_fifo.sv`, `rtl/rr_arbiter.sv` | helpers |
| `tb/tb_*.sv` | one self-checking testbench per block, plus the end-to-end one |
| `tb/host_agent.sv`, `tb/ddr_channel_model.sv` | simulation models of a host and of a DDR channel |

Top parameters: `NUM_RULES` (32), `NUM_VC` (2), `FIFO_DEPTH` (2), `CH_SEL_BIT` (6).
Widths are in `cosm_pkg`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/cosm_pkg.sv tb/tb_cosm_esmd_top.sv --top-module tb_cosm_esmd_top
./obj_dir/Vtb_cosm_esmd_top
```

Use the same command with `tb_att`, `tb_att_access_check`, `tb_arb_switch`,
`tb_route_compute` or `tb_data_inspect` to test one block. The simulator
needs only two-state values: the design resets everything it reads.

The end-to-end testbench runs the top at its default parameters. It checks:

* Reset air gap.
* Programming and read-back through the switch. A host cannot see the other
  host's table.
* Exact idle latencies.
* Forward diode, reverse diode and a bidirectional region. Data written by one
  host is read by the other; blocked writes leave memory untouched.
* Revoking a permission at run time.
* Address translation, and the range check, flag mode and header check of
  write inspection.
* An expansion-link access, and back-pressure on every stream.
* Flits passing other flits held in another virtual channel.
* A custom-logic interrupt reaching only the host it is raised for.

It then repeats the prototype's load experiment:

* Host 0 runs read/write mixes (100/75/67/50/0 % reads).
* Host 1 loads the device with 100 % reads, 100 % writes or 50/50 under each
  of its four permission vectors.

The check is that traffic the permissions forbid never reaches memory and
changes neither host 0's throughput nor its read latency, while permitted
traffic lowers the throughput. With the DDR model limited to one access
every two clocks per channel:

* A permitted load roughly halves host 0's completions.
* A blocked load leaves them within a few percent of the idle value.
* Under a blocked load, host 0's read latency stays at its idle value.

This is the same pattern the prototype showed in its measurements. Absolute
bandwidths and nanosecond latencies are not reproduced: they depend on the
clock and the DDR controllers, which are outside this RTL. The DDR model is
not meant to be cycle-accurate.

## Departures and open points

* **Switch.** The prototype's switch is known only by its parts: input
  ports with several virtual channels, route compute, route reservation, flow
  control, virtual channel arbitration and a crossbar. The following are this
  design's own choices:
  * two channels per input, chosen by destination;
  * valid/ready flow control instead of credits;
  * a separable round-robin allocator;
  * ten ports built as two instances, 10×4 for requests and 6×10 for
    responses, rather than one 10×10 switch.
* **Own choices.** The source gives none of these, so they are this design's:
  * the flit format;
  * the register map and the rule register layout;
  * the line interleave between the channels;
  * error responses for rejected requests;
  * the reject counter;
  * the reset state (everything rejected).
* **Inspection.** Each host link has one range check and one header check
  on 32-bit fields, for writes only. These are the simplest forms of the
  examples COSM's second isolation level gives: a field within a range, and a
  header of the right format. Checksum validation is also mentioned as an
  example there. It is not built, because no checksum is defined. Inspecting
  data as it is read is mentioned too, but only writes are inspected here.
  Richer protocol-aware inspection would replace `data_inspect`.
* **Rule kinds.** "reject-read" is taken to mean that writes stay allowed, so
  it has the same bits as allow-write; likewise reject-write equals
  allow-read.
* **[W R] order.** Permission vectors are written [W R] throughout. A vector
  such as [0 1] is read-only.
* **Scope.** Only the prototype's two host links are filtered. A device for
  more hosts needs one `att` per link and more switch ports.
* **Not included.** The rest of a full shared-memory appliance is not part of
  this RTL: packet processing engines, DMA engines, accelerators, management
  CPU, side-band I/O and the management software.

# OPA router model in SystemVerilog

This is a cycle-level, synthesizable model of a 48-port Omni-Path (OPA)
style router with its end nodes. It follows the router structure of the
OpaSim simulator. A packet enters an input buffer, gets routed and crosses a
small crossbar local to its group of four ports (an *MPort*). If its output
is in another MPort, it also crosses a central crossbar. It is stored in the
output buffer and leaves on the link under credit flow control. All buffers
hold several virtual lanes (VLs) in one shared pool. The stage latencies of
a real router (tens of cycles each) are reproduced exactly. Each flit
carries a "ready time" stamp; it cannot move on until the cycle counter
reaches that stamp.

The top level, `opa_system`, is the configuration evaluated for this router
model: one 48-port router, a network interface (NIC) on every port, and a
link with flight time in each direction.

## Structure

```
opa_system
├── opa_nic ×48            message → packets, credit-checked injection, sink
├── opa_link ×96           FLY-cycle delay for flits and returned credits
└── opa_router
    ├── opa_input_port ×48       routing table + input buffer + VL arbiter
    │   ├── opa_route_unit
    │   └── opa_buf_port → opa_damq, opa_rr_arb
    ├── opa_mport_xbar ×12       4 inputs → 4 local outputs + 2 central links
    ├── opa_central_xbar         24 central buffers, 24:48 crossbar
    │   └── opa_buf_port ×24
    └── opa_output_port ×48      28-entry output arbiter + output buffer
        ├── opa_damq             + round-robin VL scheduler with credit check
        └── opa_credit_mirror
opa_pkg                          types, defaults, admission rule
```

Port `p` belongs to MPort `p/4`. Each MPort crossbar has 6 outputs (4:6):
- its 4 local output buffers;
- 2 links into the central crossbar, each feeding its own central buffer,
  so 12 × 2 = 24 central buffers.

The central crossbar is 24:48. Every output buffer therefore has an arbiter
with 4 + 24 = 28 entries.

Bandwidths, in flits per cycle:

| Path | Flits/cycle |
|---|---|
| Link into an input buffer | 1 |
| Input buffer → MPort crossbar (local output or central link) | 3 |
| Central buffer → output buffer | 4 |
| Output buffer → link | 1 |

## The path of a packet and its latency

The latency of each stage is a parameter. The defaults are RT = 32
(routing), SB = 50 (storing in an input or output buffer), AT = 16
(arbitration), X = 2 (crossing a crossbar) and FLY = 8 (link).

1. **Input buffer.** A header becomes visible to allocation SB+RT+AT cycles
   after it is written. The routing-table lookup is done on the way in, and
   its result is carried in the flit's `oport` field. Body flits are ready
   after SB.
2. **Allocation, first step.** In each input buffer a round-robin arbiter
   picks one VL whose head is a ready header (*VA*, virtual allocation).
   That request goes to one of two places:
   - if the output is in the same MPort, to that port's output arbiter;
   - otherwise, to the MPort's two central-link arbiters.

   These arbiters pick among the buffers that request them (*SA*, switch
   allocation). A request is eligible only if the target buffer can take a
   whole packet on that VL. The grant is combinational. The first flit
   moves in the next cycle.
3. **Crossing.** The granted buffer streams the packet through the crossbar
   at up to 3 flits per cycle and keeps the path until its tail has crossed.
4. **Central buffer (central turns only).** A central buffer has no storing
   latency. Its header is ready X+AT cycles after the write: X for the
   crossbar just crossed, AT for the second allocation. Body flits are
   ready after X. The central buffer then runs its own VA step. The output
   arbiter grants it, and the packet crosses at up to 4 flits per cycle.
5. **Output buffer.** Every flit is ready X+SB cycles after it is written.
   The VL scheduler picks, round robin, a VL whose head is a ready header
   and whose downstream buffer has room for a whole packet. It sends that
   packet one flit per cycle and releases the VL after the tail. There is no
   preemption.

With no contention, a header's latency from the NIC to the destination NIC
is:

```
turn inside an MPort : FLY + SB+RT+AT + 1 + X + SB + FLY                  = 167
central turn         : FLY + SB+RT+AT + 1 + X + AT + 1 + X + SB + FLY     = 186
```

Each `1` is the cycle between a grant and the first flit moving.

The stage terms follow the stage-by-stage description of the OpaSim model:
input storing, routing and arbitration; the crossbar; for a central turn, a
second arbitration and crossing; then storing in the output buffer and the
link. Two more points:
- That model also names an injection delay INJ in the NIC but gives it no
  value. It is taken as 0.
- Its summary total of 160 cycles counts the arbitration and crossbar
  terms only once. This design follows the stage-by-stage terms.

Because flits are stamped rather than delayed in shift registers, body
flits follow their header with cut-through timing. A stream that reaches a
flit which is not ready yet waits for it.

## Shared VL buffers (`opa_damq`)

This is the least obvious part of the design. Input, central and output
buffers all use it.

**Cells.** A buffer of `QUEUE_SIZE` flits (256) is cut into cells of
`FLITS_PER_CREDIT` flits (4). One cell is one credit, so there are 64
cells.

**Linked lists.** Each VL owns a linked list of cells. It keeps:
- a head cell and a read offset;
- a tail cell and a write offset.

Free cells are a bitmap, and the lowest free cell is taken first.

**Write port.** Up to `WR_W` flits of one VL per cycle. They fill the open
tail cell and may spill into one new cell.

**Read port.** The reader selects a VL. It sees the first `RD_W` flits of
that VL with their ready flags, and pops any prefix of them.

**Releasing cells.** A cell goes back to the pool only when all of its slots
have been written *and* read. One consequence: a sender that counts the
flits it has sent, ceil(sent/4), and the credits it got back knows the
receiver's cell usage exactly (`opa_credit_mirror`). No separate credit
counter has to be agreed on.

**Admission (`opa_pkg::cell_admit`).** A VL may take a packet of
`need` = ceil(PACKET_SIZE / FLITS_PER_CREDIT) = 4 cells when all of these
hold:
- `used + need ≤ MAX_VC_CREDITS` (48);
- `free ≥ need`;
- either `used + need ≤ EXCLUSIVE_VC_CREDITS` (16), or the free cells left
  afterwards still cover the unused reservations of all other VLs.

The check is made once per packet, before the packet is granted, so a
granted packet never stalls for space. Buffers, central links, output
arbiters and NICs all use this same rule.

At the default sizes, 8 VLs × 16 reserved cells is 128 cells, twice the 64
cells of a buffer. The reservations therefore cannot all be honoured at
once. Under the rule, a VL below its reservation gets a packet whenever
enough cells are free. Beyond that, it can grow only while the other VLs'
unused reservations stay free. With the defaults this rarely happens: the
unused reservations of 7 idle VLs are 112 cells, more than the whole
buffer. So in practice a VL holds at most its 16 reserved cells (64
flits). A VL alone in the buffer can grow to at most
60 − 7 × `EXCL_CREDITS` cells, with 64 cells, 4-cell packets and 7 other
VLs. It therefore reaches the 48-cell maximum only with `EXCL_CREDITS` ≤ 2.

## Allocation details

- **Round-robin arbiters (`opa_rr_arb`).** Each has a priority pointer. The
  caller says when the pointer moves past the winner:
  - The input buffers' VL arbiters move it after every attempt, granted or
    not. A VL whose output is busy therefore does not stop the buffer from
    trying its other VLs next cycle.
  - The output and central-link arbiters move it on every grant.
- **Two central links per MPort (`opa_mport_xbar`).** Both may grant in the
  same cycle. Link 1 only sees the inputs that link 0 did not take.
- **Packet order.** Packets of one input, VL and output keep their order
  on a turn inside an MPort. On a central turn, consecutive packets may use
  different central buffers, so a later one can overtake an earlier one.
- **Routing (`opa_route_unit`).** Each input has a 256-entry table, indexed
  by the destination node in header bits [7:0]. It resets to node n → port
  n mod 48, and `cfg_*` rewrites entries.

## End nodes and links

- **NIC (`opa_nic`).** It takes a message (destination, VL, length) and
  cuts it into packets of at most 16 flits. A packet starts only when its
  credit mirror says the router's input buffer can take a whole packet on
  that VL. Its flits then go out back to back, and the next message is
  accepted in the cycle of the last tail. On the receive side the NIC sinks
  every flit at once, returns a credit per 4 flits of a VL, and reports the
  header latency.
- **Link (`opa_link`).** A FLY-stage shift register. Credits travel back
  through the same link with the same delay.

## Flit format (`opa_pkg::flit_t`)

Each flit has 64 data bits plus side-band fields:

| Field | Bits | Meaning |
|---|---|---|
| `head` | 1 | header flit |
| `tail` | 1 | last flit of the packet |
| `vl` | 3 | virtual lane |
| `oport` | 8 | output port, filled in by the input port's routing |
| `data` | 64 | payload, below |

Payload layout:

| Flit | [7:0] | [15:8] | [31:16] | [63:32] |
|---|---|---|---|---|
| Header | destination node | source node | packet length | injection cycle |
| Body | flit index | source node | packet sequence number | injection cycle |

The payload layout is this design's choice.

Crossbar lines carry `bundle_t`: up to 4 flits and a count.

## Parameters

Defaults are in `opa_pkg`. The top passes them down.

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_PORTS` | 48 | router ports (multiple of 4, at least 8) |
| `PORTS_PER_MPORT` | 4 | ports per MPort |
| `CLINKS` | 2 | central links per MPort, at 3 flits/cycle each |
| `NUM_VL` | 8 | virtual lanes |
| `QUEUE_SIZE` | 256 | flits per input, central and output buffer |
| `FLITS_PER_CREDIT` | 4 | flits per credit (cell) |
| `EXCL_CREDITS` | 16 | cells reserved per VL |
| `MAX_CREDITS` | 48 | cell limit per VL |
| `PKT_FLITS` | 16 | packet size in flits |
| `RT_LAT`, `SB_LAT`, `AT_LAT`, `X_LAT`, `FLY_LAT` | 32, 50, 16, 2, 8 | stage latencies |

Widths are set in `opa_pkg`:
- VL number: 3 bits;
- port and node numbers: 8 bits;
- time stamps: 32 bits, compared so that they tolerate wrap-around.

## Where this design departs from, or adds to, the OpaSim model

These follow the OpaSim model:
- the structure;
- the bandwidths;
- the stage latencies;
- round-robin arbitration at every level;
- the VL scheduler that releases a VL after each tail;
- shared buffers with minimum and maximum space per VL;
- the parameter defaults.

These are this design's choices:
- the cell and linked-list organisation of the shared buffers and the exact
  admission rule;
- the size of the central buffers (not given; QUEUE_SIZE is used);
- one cycle from each grant to the first move;
- checking room in the central buffer before granting a central link;
- the flit payload layout and the table-based routing with its reset
  contents;
- the NIC's behaviour (the model names the NIC but does not describe it)
  and INJ = 0;
- link 1 taking only inputs that link 0 did not grant.

Not built:
- QoS arbitration and packet preemption, which the OpaSim model lists as
  future work;
- the iSLIP allocator it mentions as under development;
- the traffic generator. Short/long message mixes, injection processes and
  seeds belong to the testbenches.

## Measured behaviour

`tb_opa_workload` runs the evaluated workloads at the default size:

| Workload | Offered load (flits/cycle/node) | Accepted throughput | Mean header latency (cycles) |
|---|---|---|---|
| No contention, node x → (x+1) mod 48 | 1.0 (saturated) | 0.995 | 171.8 |
| Uniform random | 0.1 | 0.10 | 186 |
| Uniform random | 0.4 | 0.41 | 190 |
| Uniform random | 0.7 | 0.70 | 204 |
| Uniform random | 1.0 (saturated) | 0.93 | 321 |

In the no-contention run, every header arrives at exactly 167 or 186
cycles. This model's uniform-traffic saturation throughput (about 0.93) is
higher than the 0.72 reported for OpaSim. That report gives too few
allocator and traffic details to match; for example, it does not say how
the message VLs and destinations are drawn. The windows here are also short
(3000 cycles after 1500 of warm-up, one seed).

## Testbenches

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_opa_damq` | Random writes and reads on a small buffer against a reference model: order, ready times, cell release, admission. |
| `tb_opa_rr_arb` | Grant validity and round-robin fairness. |
| `tb_opa_route_unit` | Reset contents and table rewrites. |
| `tb_opa_link` | Flight time of flits and credits. |
| `tb_opa_credit_mirror` | Admission against an independent count of cells. |
| `tb_opa_nic` | Packetisation, credit stalls, receive credits, latency stamp. |
| `tb_opa_buf_port` | VL arbitration, streaming speed, grant protocol. |
| `tb_opa_input_port` | Exact SB+RT+AT header delay, routing, credits. |
| `tb_opa_mport_xbar` | Both central links, local lines, no input granted twice, path held until the tail. |
| `tb_opa_central_xbar` | Exact X+AT delay, 4-flit cycles, output-line steering. |
| `tb_opa_output_port` | Exact X+SB delay, one packet at a time on the link, credit blocking, the link never idle while a flit could go. |
| `tb_opa_router` | 8-port router: exact local and central latencies, table rewrite, delivery and ordering under random and hot-spot traffic. |
| `tb_opa_system` | 8-port system end to end. Counts that every mechanism occurred: local and central turns, both central links busy, switch conflicts, failed VA attempts, full output buffers, NIC credit stalls, VL switching, multi-packet messages. |
| `tb_opa_system_full` | Default 48-port system: exact latencies, then no-contention and uniform rounds. |
| `tb_opa_workload` | The workloads in the table above. |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/opa_pkg.sv tb/tb_opa_router.sv \
    --top-module tb_opa_router -Mdir build
./build/Vtb_opa_router
```

## Notes for changing the design

- **Latencies** live only in the ready stamps. Changing a latency parameter
  never changes the amount of logic, apart from the link shift registers.
- **Port count.** `NUM_PORTS` must be a multiple of `PORTS_PER_MPORT`. The
  central crossbar then has `NUM_PORTS / PORTS_PER_MPORT × CLINKS` buffers.
- **Speed-ups.** The crossbar speed-ups are `MPORT_SPEEDUP` and
  `CENTRAL_SPEEDUP` in `opa_pkg`. A crossbar line is `MAX_SPEEDUP` flits
  wide.
- **Assertions** check for:
  - grants without requests;
  - pops of flits that are not ready;
  - writes with no free cell;
  - downstream overflow in a credit mirror.

  Keep `--assert` on when simulating.

# Shared-queue network-on-chip router (extended RoShaQ)

Most of the area and power of a network-on-chip router goes into its input
buffers, yet at any moment most of those buffers are empty: only the inputs
whose packets collide at an output need storage. This router therefore gives
each input port only a small **dedicated queue** and puts the rest of its
storage into a pool of **shared queues** that any input can use.

A packet at the front of a dedicated queue asks for two things in the same
cycle: its output port, and a place in a shared queue.

- If it wins the output port, it **bypasses** the shared queues and leaves
  right away. At light load almost every packet does this, so latency stays
  low.
- If another packet wins the output, the loser is moved into a shared queue
  instead. It no longer blocks the packets behind it in its dedicated queue,
  and it competes for the output again from the shared queue. At heavy load
  this keeps the inputs moving and raises throughput.

The **extended** variant, which is the default here, adds a second set of
shared queues with its own allocator. A packet refused by the first set asks
the second. A packet stays in its dedicated queue only when neither set can
take it.

The RTL is a single 4-port router in SystemVerilog. It is parameterized so the
same code also builds the **conventional** router, which has one set of shared
queues (`SQ_SETS = 1`).

## Packet format

A packet is a single 8-bit word. It holds all three flits side by side and
moves through the router as one unit:

| bits  | flit | meaning                                        |
|-------|------|------------------------------------------------|
| [7:6] | head | output port this router must send it to (0..3) |
| [5:2] | body | 4-bit payload                                  |
| [1:0] | tail | input port it came from                        |

`noc_pkg::pkt_t` is the packed struct for this layout, with fields `dest`,
`body` and `src`. The field widths and their order are from the original
design. The exact bit positions are this implementation's reading of it. To
change the layout, edit only the struct.

The head flit names this router's output port directly, so the router does no
route computation. The tail flit is carried along but never examined.

## Structure

```
              +------------------ routing_complexity (load_high) ----------------+
              |                                                                  |
in[0..3] -> dedicated_queue x4 --+-------------------------------------------> output_port_allocator -> out[0..3]
              (4 entries each)   |                                         (12 requesters -> 4 ports,
                                 +-> sq_allocator (set 1) -> shared_queue x4 -->   OST + output register)
                                 |        refused                (2 entries each)  |
                                 +-> sq_allocator (set 2) -> shared_queue x4 -->---+
```

| module                  | role |
|-------------------------|------|
| `noc_pkg`               | packet struct and field widths |
| `dedicated_queue`       | per-input FIFO, 4 entries. Drops an arriving packet when it is full |
| `routing_complexity`    | raises `load_high` when two waiting head flits name the same output |
| `sq_allocator`          | matches losing heads to legal shared queues. Includes the input-to-shared-queue crossbar |
| `shared_queue`          | 2-entry FIFO with slot reservation, output-port binding and the two write stages |
| `output_port_allocator` | fixed-priority allocator per output. Includes the 12:4 crossbar and the two output pipeline registers |
| `eroshaq_router`        | top level. Wires `SQ_SETS` sets of `N` shared queues and chains the allocators |

## How a cycle is decided

Everything below happens combinationally within one cycle, among the packets at
the front of the queues. The order matters, so here it is step by step.

1. **Output port allocation.** There are 12 requesters in the default
   configuration:
   - the heads of the 8 shared queues: set 1 queues 0–3, then set 2 queues 0–3
   - then the heads of the 4 dedicated queues: input 0 to input 3

   For each output port, the requester with the **lowest index** wins.
   Packets that are already sitting in a shared queue have therefore been
   delayed once, and they beat fresh arrivals. Among the dedicated queues,
   input 0 has the highest priority. Each output passes at most one packet
   per cycle.
2. **Load detection.** `routing_complexity` compares the head flits of the
   non-empty dedicated queues. `load_high` is 1 if any two of them name the
   same output port. Shared queues are used only while `load_high` is 1. At
   low load, a head that loses its output (to a shared-queue packet) simply
   waits.
3. **Shared-queue allocation, set 1.** A dedicated-queue head requests a
   shared queue if all of these hold:
   - it is present
   - it did not win its output
   - `load_high` is 1

   Winning the output always takes precedence over a shared-queue grant.
   Requests are served in input order. A queue is **legal** for a packet if it
   has an unreserved slot and either:
   - it is empty, or
   - it already holds packets bound to the same output port.

   Because a queue never mixes packets for different outputs, a blocked output
   can never hold up another output's traffic through a shared queue. This
   keeps a network of these routers free of deadlock. Among the legal queues,
   a packet prefers a queue already bound to its port, then the lowest-numbered
   empty one. Each queue accepts at most one packet per cycle.
4. **Shared-queue allocation, set 2.** This step runs only in the extended
   router. It applies the same rule to the requests that set 1 refused.
5. **Pops.** A dedicated queue pops its head when the head won the output or
   any shared-queue grant. A shared queue pops its head when that head won the
   output.

## Pipeline and latency

Latency is counted in clock edges after the edge that samples the packet on
`in_data`.

| path | stages | output register valid after |
|------|--------|-----------------------------|
| bypass (light load)    | QW, OPA, OST, LT                 | 2 edges |
| through a shared queue | QW, SQA, SQST, SQW, OPA, OST, LT | 5 edges |

The stages are:

- **QW**: write into the dedicated queue.
- **OPA / SQA**: allocation, as described above.
- **OST**: the grant is latched at the end of the allocation cycle. The
  crossbar then moves the packet into the output register during the next
  cycle.
- **SQST / SQW**: the grant is latched, the packet crosses to the shared
  queue's write register, then it is written into the queue storage. It can
  request an output from the following cycle.
- **LT**: the output register driving the link.

A shared-queue slot is reserved at the moment of the grant. The queue's output
binding (`dest`) is also set then. So the two write stages can never overflow
a queue, and the same-output rule also covers packets still in flight.

The original design gives both stage sequences. It also says, less precisely,
that a packet granted a shared queue is "written in the next cycle". This RTL
follows the stage sequences.

## Buffering and lost packets

The router has no flow control towards the upstream side. A packet that
arrives while its dedicated queue is full is lost, and `drop[i]` pulses in
that cycle. A full queue that is being popped in the same cycle still accepts
the new packet. Downstream, outputs are never stalled.

Total storage:

| configuration | dedicated | shared | total |
|---------------|-----------|--------|-------|
| conventional  | 4 × 4     | 4 × 2  | 24 packets |
| extended      | 4 × 4     | 8 × 2  | 32 packets |

Worst case: all four inputs send to output 0 in every cycle. Four packets
arrive each cycle and one leaves, so three pile up per cycle.

- The conventional router first loses a packet in the 7th cycle of such a
  stream.
- The extended router first loses one in the 9th cycle. An 8-cycle stream
  passes it with no loss.

The original design reports first losses in cycles 8 and 10 for the
conventional router, and none for the extended one over about 11 cycles. The
exact cycle depends on allocation details it does not give.

Under uniform random traffic, the extended router saturates at about 0.86
packets per port per cycle and the conventional one at about 0.79, measured by
`tb_throughput`. That is a gain of about 9%. The original design claims 50%
higher saturation throughput but gives no traffic pattern or network for that
figure.

## Parameters (`eroshaq_router`)

| parameter  | default | meaning |
|------------|---------|---------|
| `P`        | 4 | ports. The packet format fixes 2-bit port numbers, so keep 4 |
| `N`        | 4 | shared queues per set |
| `DQ_DEPTH` | 4 | entries per dedicated queue |
| `SQ_DEPTH` | 2 | entries per shared queue |
| `SQ_SETS`  | 2 | 1 = conventional router, 2 = extended router |

All defaults are the sizes of the original design.

## Top-level interface

All ports are synchronous to `clk`. `rst` is a synchronous, active-high reset.

| port | dir | meaning |
|------|-----|---------|
| `in_valid[P]`, `in_data[P]`   | in  | packet on each input port, sampled at the rising edge |
| `out_valid[P]`, `out_data[P]` | out | registered packet on each output port |
| `drop[P]`                     | out | the packet on this input was lost (dedicated queue full) |
| `load_high`                   | out | routing-complexity flag |
| `ev_bypass[P]`                | out | this cycle, the dedicated-queue head of input *i* won its output |
| `ev_sq_write[SQ_SETS][P]`     | out | this cycle, the head of input *i* was granted a shared queue of set *s* |
| `ev_stall[P]`                 | out | this cycle, the head of input *i* got no grant |

The `ev_*` outputs are for observation only. They are combinational
functions of the current cycle's allocation.

Assertions check several rules:

- a shared queue is never written without a free slot
- a shared queue is never written with a packet for a different output
- no queue is popped when empty
- a head never takes the output and a shared queue in the same cycle

## Simulation

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=F`. From the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/noc_pkg.sv tb/tb_eroshaq_router.sv --top-module tb_eroshaq_router
./obj_dir/Vtb_eroshaq_router
```

To run another testbench, replace `tb_eroshaq_router` with its name.

| testbench | what it checks |
|-----------|----------------|
| `tb_routing_complexity`    | all 4096 combinations of heads and valid bits |
| `tb_dedicated_queue`       | random push/pop against a queue model, drops, push into a full queue while it pops |
| `tb_shared_queue`          | random traffic against a model; exactly 3 edges from grant to readable; reservation and port binding |
| `tb_sq_allocator`          | 20 000 random cases against a reference allocation, plus legality and maximality checks |
| `tb_output_port_allocator` | fixed priority per port, and the output 2 edges after the grant |
| `tb_eroshaq_router`        | the whole router at default size, described below |
| `tb_worst_case`            | the all-to-one stream on the conventional and extended routers side by side |
| `tb_throughput`            | injection-rate sweep, 10–100%, for both routers |

`tb_eroshaq_router` runs a scoreboard: every accepted packet must leave
exactly once, on the port its head names. It also checks the latency of each
packet. It runs in this order:

1. the published test conditions: four different outputs; two, three and
   four inputs to one output
2. 9000 cycles of random traffic at light, medium and heavy load

Every mechanism must occur at least once: bypass, a write to each shared-queue
set, a stall, a drop, high load and low load.

All runs take well under a second.

# Speculative virtual-channel router for a network-on-chip

A network-on-chip moves packets between IP cores through routers connected
point to point. This repository holds a five-port router for such a network,
with virtual channels (VCs) and speculative allocation.

In a classic VC router a head flit goes through four steps: route computation
(RC), VC allocation (VA), switch allocation (SA) and switch traversal (ST). VA
has to finish before SA starts, because a flit may only ask for the crossbar
once it owns a buffer at the next router. That dependency sets the pipeline
depth and the critical path. This router removes it by speculation. A head
flit asks for a downstream VC and for the crossbar in the same cycle, on the
bet that it will get the VC. When the bet fails, the flit loses one crossbar
cycle and tries again. No flit is ever sent without a VC.

Everything is synthesizable SystemVerilog-2017. Each unit has a
self-checking testbench, and one end-to-end testbench runs the router at its
default size.

## Ports, flits and packets

The router has five ports, numbered 1 to 5. They are meant to be East, West,
North, South and Local in a mesh. The RTL only uses the numbers, so it does
not depend on that order. Each port has an input link and an output link:

| signal (per port)          | dir | meaning                                          |
|----------------------------|-----|--------------------------------------------------|
| `in_valid`, `in_vc`        | in  | a flit arrives, on this VC                      |
| `in_type`, `in_flit`       | in  | its type and its 16 data bits                   |
| `credit_out_valid/_vc`     | out | one buffer slot of this VC was freed (to upstream) |
| `out_valid`, `out_vc`      | out | a flit leaves, on this downstream VC            |
| `out_type`, `out_flit`     | out | its type and data                               |
| `credit_in_valid/_vc`      | in  | downstream freed one slot of this VC            |
| `drop`                     | out | a flit of an unroutable packet was discarded at this input |

All ports are packed arrays indexed 0..4, so port *k* is index *k-1*.

**Routing is carried in the flit.** The three least significant bits of a head
flit name the output port: `001` means port 1, `010` port 2, up to `101` for
port 5. The router does no address arithmetic. The codes `000`, `110` and `111`
name no port. A packet that carries one of them is discarded, and each of its
flits pulses `drop` once.

**Packets** are a head flit, any number of body flits and a tail flit, or a
single flit that is both head and tail. The 2-bit `in_type` marks this:
bit 1 = head, bit 0 = tail (`noc_pkg::flit_type_e`). Body and tail flits follow
the head's route and VC. They can carry any data, because their low bits are
not looked at. All flits of a packet must use the same input VC, and the VC
must not start a new packet until the tail has been sent.

**Flow control is credit based.** After reset the sender holds 4 credits for
each of the 4 VCs of a link. It spends one credit per flit and gets one back
for each `credit_out` pulse. The router does the same towards downstream: it
starts with 4 credits per downstream VC and takes them back on `credit_in`.
An assertion flags a flit sent without a credit.

## The pipeline, cycle by cycle

Here is an idle router with a flit presented on input *i* in cycle *t*:

| cycle | where the flit is | what happens |
|-------|-------------------|--------------|
| t     | on the input link | sampled at the end of the cycle |
| t+1   | input register of the port | written into the FIFO of its VC at the end of the cycle |
| t+2   | head of its VC FIFO | **RC, VA request and SA request, all together** |
| t+3   | still in the FIFO, switch grant present | crosses the crossbar (ST); the FIFO slot is freed and a credit goes upstream |
| t+4   | output register | on `out_*` |

The flit spends t, t+1 and t+2 inside the input port, which is three cycles.
From input link to output link takes four cycles. The testbench checks both
numbers.

### What speculation does here

In cycle t+2 the head flit raises two requests at once:

* **VC request.** It goes to `vc_allocator` for the output that `route_compute`
  decoded. The allocator answers in the same cycle. Per output, the
  lowest-numbered requesting input gets the lowest-numbered VC that is not
  busy. At most one VC per output is handed out per cycle.
* **Switch request.** It goes to that output's `fixed_priority_arbiter`. The
  arbiter is a Moore machine, so its grant appears one clock later.

A flit moves in any cycle where two conditions hold:

1. its input holds the switch grant for the flit's output, and the input is
   still asking for that output, and
2. the flit holds a downstream VC with a credit, or is given one in that same
   cycle.

So a head flit can meet one of four outcomes:

* **It wins both.** It crosses in the next cycle. This is the four-cycle case
  above.
* **It wins the switch but no VC.** That is a mis-speculation. The crossbar
  cycle is lost: the arbiter granted an input that cannot move (the crossbar
  reports it on `in_spec_fail`). The flit asks again in the next cycle.
* **It wins a VC but not the switch.** It keeps the VC and asks for the switch
  again, now without speculating.
* **Its input already holds the switch grant for that output.** This happens
  when the previous flit from the same input went to the same output. The head
  then crosses in the very cycle its VC is allocated. This case lets one input
  send back-to-back single-flit packets to one output at one flit per clock.
  Without it, every new packet would cost an extra cycle.

Body and tail flits never speculate. Their packet already owns a VC, so they
only need the switch grant and a credit. When a tail flit crosses, its
downstream VC is freed. If a single-flit packet gets its VC and leaves in the
same cycle, the release wins, so the VC is never left busy.

### Why a grant is checked against the current request

The arbiters answer one clock late, so a grant can arrive after the input has
moved on to a flit for another output. The switch allocator therefore passes a
grant on only while the input still asks for that output (`match`). A stale
grant moves nothing. It just costs that output one idle cycle while its
arbiter moves to the next requester.

## Inside an input port

`input_port` has three parts:

* an input register,
* a VC identifier that steers each flit into one of four 4-entry FIFOs
  (`flit_fifo`),
* a read side that shows the oldest flit of every VC.

One VC at a time is offered to the crossbar (`sel_out`). Removing its flit
(`gr`) returns a credit upstream in the same cycle.

The router chooses the offered VC like this. A VC is *eligible* when its
oldest flit can make progress. That means one of three things:

* its packet owns a downstream VC that has a credit, or
* it is a head flit and its output still has a VC that nobody owns, or
* it belongs to a packet that is being dropped.

The offer stays on the same VC while that VC is eligible, so the switch grant,
which comes one clock late, still finds the same flit. After a tail flit
leaves, the offer moves round-robin to the next eligible VC. A packet that has
to wait for credits or for a free downstream VC is no longer eligible, so the
other VCs of the port pass it.

## Switch arbitration

Each output has its own fixed-priority arbiter, and they live inside the
crossbar. Each arbiter is a state machine with states IDLE and G1..G5. On
every clock it moves to the grant state of the highest-priority active
request, where input 1 is the highest and input 5 the lowest. It goes to IDLE
when no input requests. Grant *k* is high exactly while the state is G*k*.

The arbiter is pre-emptive. A request from a higher-priority input takes the
output on the next clock. This costs nothing in correctness, because flits of
different packets travel on different downstream VCs. It can starve a
high-numbered (low-priority) port under steady traffic from the ports
numbered below it.
`vc_allocator` uses the same fixed order.

## Module hierarchy

```
vc_router                       top: the five-port router
├── input_port      x5          input register, VC FIFOs, credit out
│   └── flit_fifo   x4          one VC buffer (show-ahead FIFO)
├── route_compute   x20         decodes flit[2:0] of each VC head
├── vc_allocator                VC ownership and downstream credits
└── crossbar                    5x5 switch with output register
    └── switch_allocator        per-output request vectors and grant matching
        └── fixed_priority_arbiter x5
noc_pkg                         default sizes, flit type enum, helpers
```

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `P`       | 5  | ports |
| `V`       | 4  | VCs per port (a 2-bit VC select) |
| `FLIT_W`  | 16 | flit width; the destination code is always bits [2:0] |
| `DEPTH`   | 4  | flits per VC buffer; also the credits per downstream VC |

The five ports, the 16-bit flits and the 3-bit destination code come from the
source description. The VC count and the buffer depth are this design's
choice. With these defaults the router holds 610 flip-flops plus 1,440 buffer
bits (5 ports × 4 VCs × 4 flits × 18 bits). The published design reports
1,074 registers. The difference comes from the unknown VC count and buffer
depth of that design, so reduce `V` or `DEPTH` if area matters. Sizes other
than the defaults (for example `P` other than 5 with its 3-bit code) compile
but are untested.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_vc_router \
          rtl/noc_pkg.sv tb/tb_vc_router.sv -y rtl -y tb +libext+.sv
./obj_dir/Vtb_vc_router
```

Replace `tb_vc_router` with any other testbench in `tb/`. The simulations are
two-state, so all state that is read is reset.

What the testbenches check:

* `tb_vc_router` runs the router at its defaults in three phases.
  * Five single-flit messages, one per input and each naming a different
    output, must all come out exactly four cycles later.
  * 6,000 cycles of random traffic. Packets of 1–4 flits go out on all VCs,
    with hot-spot destinations, unroutable packets, and downstream credits
    returned after random delays. Then every open packet is drained.
  * One input streams single-flit packets to one output while credits are
    returned at once. It must reach 200 flits in 200 cycles.

  A scoreboard checks the output port, the order within each packet, that a
  downstream VC carries one packet from head to tail, that no downstream
  buffer overflows, and that every packet is delivered or dropped as
  expected. The test also counts speculative wins, lost speculations, heads
  leaving in the cycle of their VC allocation, VA contention, switch
  contention, outputs with all VCs busy, credit stalls, drops and two packets
  interleaved on one link. It fails if any of these never happened.
* `tb_router_chain` joins two routers by one link, with the credit loop
  between them, and sends packets from all five inputs of the first router
  through both. Every flit must arrive in order within its packet, and the
  traffic must drain completely.
* `tb_input_port` checks the three-cycle crossing and the order, data and
  credits on all VCs under random traffic.
* `tb_fixed_priority_arbiter` checks a falling staircase of requests, where
  the grant must walk from 1 to 5, plus random requests against a model.
* `tb_switch_allocator` and `tb_crossbar` compare grants, lost grants and
  switched data every cycle against a model.
* `tb_vc_allocator` checks allocation, release (including release in the
  same cycle as allocation) and credit counting against a model.
* `tb_route_compute` checks every destination code.

## Where this design goes beyond its source

The source describes the router's structure (input ports with VC buffers,
route computation from the three low bits, VC and switch allocation in
parallel, a 5x5 crossbar with fixed-priority arbiters), the arbiter state
machine, and the three-cycle input port. The following are this design's own
choices:

* the 2-bit flit type beside the data,
* 4 VCs of 4 flits each,
* credit counters and the credit interface,
* the rule that decides which VC a port offers,
* the exact-cycle rules above (the match qualification, and using a VC in the
  cycle it is allocated),
* the output register,
* dropping packets with an invalid code,
* a synchronous active-high reset.

The source drives an idle output as high impedance. Here an idle output is
simply `out_valid = 0`.

The network interface and the processing elements behind the Local port are
not part of this design. The Local port is an ordinary router port.

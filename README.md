# Reliable Router: a wormhole mesh router in SystemVerilog

Each router chip is one node of a two-dimensional mesh. It moves packets
between its four neighbours, its local processor and a diagnostic port
reached over JTAG. Packets are cut into 77-bit flits. A packet's head flit
carries its destination, and the flits behind it follow the path the head
opened (wormhole routing). Every physical link carries five virtual
channels. Each channel has a 16-flit queue at the receiver. Routing is
adaptive, and it stays deadlock-free because one channel is kept as an
escape path that always routes in dimension order.

The router runs on one 100 MHz clock. Flits move at 50 MHz. On the
chip-to-chip links, one flit takes four 20-bit beats, one on each clock
edge.

## Block structure

```
            link_in[0..3] (24 bits, both edges)
                 |
   +-------------v--------------+          +-----------+
   | input_controller (x4)      |  bids    |           |
   |  front_end -> flit_fifo    |--------->|  arbiter  |
   |  route_logic (x5)          |<---------|  (6x6)    |
   |  ic_control -> flit_munger |  ack     +-----+-----+
   +-------------+--------------+                | select
                 | 40-bit half words             v
   proc_port_in -+----------------------->  crossbar 6x6 --> output_controller (x4) --> link_out
   diag input   -+   (processor, JTAG)           |                 (ddr_tx, 24 bits)
                                                 +--> proc_port_out --> processor
                                                 +--> diag_out_port --> JTAG
   jtag_port: TAP controller, instruction register, SETUP / DIAG_IN / DIAG_CTL / DIAG_OUT registers
```

Ports are numbered 0 = +x, 1 = −x, 2 = +y, 3 = −y, 4 = processor and
5 = diagnostic.

| file | role |
|---|---|
| `rr_pkg.sv` | sizes, flit layout, bid and route types |
| `reliable_router.sv` | top: wires everything together, makes the flit phase `ph` |
| `input_controller.sv` | network input: `front_end` + `ic_core` + credit counter of the matching output link |
| `ic_core.sv` | queues, five routers, channel selection and munger, shared by all six inputs |
| `front_end.sv` | takes four link beats and rebuilds the flit, channel, credit and parity status |
| `flit_fifo.sv` | five 16-deep queues in one memory |
| `route_logic.sv` | routing rule for one queue's front flit (combinational) |
| `ic_control.sv` | round-robin choice of the channel that bids, and the route each packet holds |
| `flit_munger.sv` | adds the output channel (80 bits) and sends it as two 40-bit halves |
| `arbiter.sv` | per-output rotating priority, busy state of the 30 output channels |
| `crossbar.sv` | 6×6 multiplexer of 40-bit buses |
| `output_controller.sv`, `ddr_tx.sv` | frame and parity, then one beat per clock edge |
| `proc_port_in.sv`, `proc_port_out.sv` | processor side, with clear-to-send flow control |
| `diag_in_port.sv`, `diag_out_port.sv` | four-flit diagnostic buffers driven through JTAG |
| `jtag_port.sv`, `jtag_tap.sv`, `jtag_scan_cell.sv`, `jtag_data_reg.sv` | IEEE 1149.1 style test port |
| `vc_credits.sv` | per-channel free-slot counters |

## Timing: the flit phase

`ph` toggles on every clock. It is 0 in the first and 1 in the second
100 MHz cycle of a flit cycle. Everything that moves once per flit (queue
pop, arbitration, busy and credit updates) changes on the rising edge at
the end of a `ph=1` cycle. The crossbar carries the low half of an 80-bit
word while `ph=0` and the high half while `ph=1`.

All routers in a network must share the clock and the reset. Then the
`ph` of neighbours agree, and the receiver knows where a frame starts.

## Link frames

A link is 24 wires. The sender changes them on both clock edges: the beat
for the high clock phase comes from a flip-flop, and the beat for the low
phase comes from a latch (`ddr_tx`). A flit is four beats. Each beat has:

| bits | beat 0 | beat 1 | beat 2 | beat 3 |
|---|---|---|---|---|
| 19:0 | word 19:0 | word 39:20 | word 59:40 | word 79:60 |
| 20 | even parity of all 24 bits | same | same | same |
| 23:21 | `1, flit_valid, credit_valid` | `0, credit_vc[1:0]` | `00, credit_vc[2]` | `000` |

Bit 23 is set only in beat 0, which marks the start of a frame. Every frame
can return one credit, whether or not it carries a flit.

The receiving `front_end` samples on both edges. It delivers the flit one
clock after the last beat. A frame with a parity error is still delivered,
and `link_parity_err` is raised for it. No retransmission is built.

The 80-bit word is `{out_vc[2:0], flit[76:0]}`. The flit layout is:

- `[76]` head
- `[75]` tail (head and tail together make a one-flit packet)
- `[74:9]` payload
- `[8]` deliver to the diagnostic port
- `[7:4]` destination y
- `[3:0]` destination x

The coordinate fields matter only in a head flit.

## Flow control

Credit-based flow control is used between routers. The credit counter for
output link *p* sits in input controller *p*, because that is where the
neighbour's credits for link *p* arrive. A grant takes a credit, and a
credit arriving on the link gives it back. A queue sends a credit upstream
every time it pops a flit.

The processor input uses clear-to-send instead of credits. `pin_cts[v]` is
high while queue *v* has at least two free slots. The processor sends a
flit as two 40-bit halves on consecutive cycles, low half first, with the
channel in bits 79:77.

The processor output has a four-word buffer and one `pout_cts` input. A
word that has started is always finished in the next cycle.

## Routing

The original description says only that the algorithm is adaptive and deadlock-free;
it does not give the algorithm. `route_logic` uses an escape-channel rule:

1. At the destination, the flit goes to the processor port, or to the
   diagnostic port if bit 8 is set. It takes the lowest free channel.
2. Otherwise, it takes any free channel 1–4 on a direction that brings it
   closer. It prefers x, then the lowest channel.
3. Otherwise, it takes channel 0 in dimension order: x first, then y.

A channel is free when no packet holds it (the arbiter's busy bit) and its
queue downstream has room. Body flits follow the route their head took.
`ic_control` picks the bidding channel in round-robin order. The arbiter
gives each output to one input with a one-hot priority register that
rotates after every grant. Any input therefore gets at least one sixth of
any output.

## Test port

The TAP controller has the standard sixteen states and an asynchronous
TRST. Data registers are chains of two-stage scan cells: a shift stage
clocked by `clockDR` and an update stage clocked by `updateDR`.
`clockDR` is TCK gated by an enable that is set on the falling edge. The
instruction register is 4 bits:

| code | register | length | use |
|---|---|---|---|
| 1 | SETUP | 8 | node x in bits 3:0, node y in bits 7:4 |
| 2 | DIAG_IN | 308 | four flits for the diagnostic input, flit 0 in bits 76:0 |
| 3 | DIAG_CTL | 4 | write: bit 0 flit-ready, bit 1 clear; capture: bit 2 input busy, bit 3 output full |
| 4 | DIAG_OUT | 320 | capture the four received 80-bit words |
| F | BYPASS | 1 | selected after reset |

To inject four flits, load DIAG_IN, then write 1 to the flit-ready bit
through DIAG_CTL. Its rising edge starts the send. The four flits enter
the diagnostic input queue on channel 0. To read, wait until the
output-full flag is set, capture DIAG_OUT, then pulse the clear bit. The
router clock samples the ready and clear bits through synchronisers.

## Where this design departs from the original chip

- **Latency.** The original chip takes 8 cycles per hop; this RTL takes
  5–6. The plesiochronous clock recovery of the original is not built.
  This RTL assumes that all nodes share one clock.
- **Not built:**
  - the link-level retransmission protocol
  - the analog simultaneous-bidirectional pad drivers (the links here are
    unidirectional 24-bit buses in each direction)
  - the JTAG boundary register over the chip pins
  - processor clocks slower than the router clock
- **Own choices, not from the original:**
  - the routing rule
  - the link frame layout
  - the flit field layout
  - the JTAG instruction codes and register layouts
  - the clear-to-send margin
  - the buffer size of the processor output

## Simulation

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -yrtl -ytb \
  --top-module tb_reliable_router rtl/rr_pkg.sv rtl/jtag_pkg.sv tb/tb_reliable_router.sv
./obj_dir/Vtb_reliable_router
```

The end-to-end test, `tb_reliable_router`, runs a 2×2 mesh of routers at
the default sizes. It does the following:

- loads the node coordinates over JTAG
- measures the latency over 0, 1 and 2 hops
- injects a parity error
- sends random traffic from all processors
- sends a hot spot with the processor blocked
- injects packets from JTAG, and reads packets back through JTAG

It counts how often these happened, and each must happen at least once:

- adaptive and escape routing
- output conflicts
- exhausted credits
- blocked heads
- clear-to-send stalls
- parity errors
- diagnostic injection and capture

It runs in well under a second. Async resets are asserted after time zero,
so that an edge exists.

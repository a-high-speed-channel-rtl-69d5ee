# Phase-adjusting channel controller for a chaos router

Two neighbouring routers share one bidirectional channel. A synchronous
controller has to move a flit across the wires and pads within one clock
cycle, and needs the two routers' clocks tightly in phase. This controller
drops both requirements. Flits are pipelined across the wires, so the wires
may take several cycles. Each side sends a half-rate copy of its clock next
to its data. At the receiver, a self-timed FIFO (the *phase adjuster*) moves
every flit from the sender's clock into the local clock. The cycle time then
depends on the logic alone. Wire delay and any fixed clock skew only add
latency.

The two controllers of a channel take turns owning it. A turn carries at most
one message. The owner gives the channel away with a *yield* bit, which rides
on the last flit of the message whenever it can. The price of pipelining is
the time it takes to turn the channel around. Under heavy load the faster
clock more than makes up for it. Under light load it does not.

Everything here is SystemVerilog (IEEE 1800-2017), checked with Verilator 5
and with the slang front end of Yosys.

## The channel

Every cycle the channel carries one flit (`flit_t` in `rtl/chaos_chan_pkg.sv`):

| field    | width  | meaning |
|----------|--------|---------|
| `data`   | 16     | payload (`DATA_W`). The width is this implementation's choice. |
| `parity` | 1      | passed through from the output frame to the far input frame |
| `nop`    | 1      | data bits invalid; a flit with `nop` set is a *nop flit* |
| `yld`    | 1      | the owner gives up the channel |
| `eom`    | 1      | last flit of a message |

The *hard-wired nop flit* (`NOP_FLIT`) is all zeros with only `nop` set.
Both data paths put it in place of real data. Next to the flit pins, each
direction has one unidirectional pin for the forwarded clock.

A message is 20 flits long (`MSG_LEN`, used only by the testbenches). The
controller itself works with messages of any length.

## Taking turns on the channel

This protocol is the heart of the design. It follows three rules:

1. **Ownership is given, never taken.** After reset, the side whose
   `init_owner` strap is 1 owns the channel. The other side becomes owner
   only when it receives a flit with `yld` set.
2. **A yield is always followed by exactly one nop flit,** and the yielding
   side drives the pads for that flit too. So every transmission, even an
   empty turn, ends with a nop on the wires. That matters for the receive
   multiplexor described below.
3. **Never yield unless the local input frame can take a whole message.** The
   far side may send a full message as soon as it owns the channel, and the
   channel cannot be stalled. Readiness is `if_td | if_leaving`: TD from the
   input frame, or its leavingSI, which shows that its current message is
   already draining. While the frame is not ready, the owner keeps the
   channel and sends nop flits.

A turn, as seen by the owner:

```
            go (far side yielded)
  ST_SENT ─────────────────────────► ST_PRESEND
     ▲                                 │   │
     │ no data, no request, frame ready│   │ first data flit
     │  (yield on a nop flit)          │   ▼
     └──────────────────────────────── │  ST_SENDING
     ▲                                 │   │
     └─────────────────────────────────┴───┘ EOM flit sent
           (yield with the EOM flit if the frame is ready;
            otherwise nop flits in ST_SENT until it is, then yield)
```

* **ST_PRESEND.** If the output frame has DV, the first flit goes out and the
  FSM moves to ST_SENDING. A one-flit message goes straight to ST_SENT. If
  there is no data but a channel request is pending, nop flits are sent
  until the data comes. The request is `of_req_chan` (reqChanSI), or one
  remembered by the *wants* register. If there is neither data nor a
  request, the controller yields at once, provided its input frame is ready.
* **ST_SENDING.** One data flit per cycle. The output frame promises not to
  leave gaps once a message has started, and an assertion checks that
  promise. The EOM flit carries the yield if the input frame is ready.
* **ST_SENT.** Inactive. If no yield has gone out during this turn, nop flits
  are sent until the input frame is ready, and then one yield. The *yielded*
  register makes sure this happens exactly once per turn. `go` moves the
  FSM back to ST_PRESEND.

`go` comes from the input control. It is a one-cycle pulse, registered, made
when an incoming flit carries `yld`. The state FSM responds to it one cycle
later. Putting `go` straight into the next-state logic would save one cycle
of turnaround, but it lengthens the critical path. This design keeps the
extra cycle.

The *drive* logic controls the pad output enable. It turns on with `go`, so
the first driven flit is a nop. It stays on while the controller is active,
for the yield flit and for the trailing nop flit, and then turns off.
`trail` remembers that the last flit carried a yield.

The *wants* register sets on reqChanSI and clears when the EOM flit of the
message has been sent. With it, a controller that gets ownership after a
request keeps the channel even if DV has not arrived yet.

### Why the two sides never drive at once

The far side sees a yield only after the wires and its own phase adjuster.
By then the yielding side has sent its trailing nop and released the pads. In
simulation at a 12 ns cycle with 1 ns of wire delay, the channel was undriven
for 5 to 11.5 ns between turns, depending on the skew between the clocks. It
never carried two drivers.

## Crossing into the local clock: the phase adjuster

### Receive multiplexor

While a controller drives the channel, its own flits are on the pins. They
are not in step with the clock that comes from the far side. So the input
data path feeds the phase adjuster the nop flit whenever the local pad
output enable is on (`input_datapath`). Because of rule 2, the multiplexor
only switches while both of its inputs show a nop flit. The phase adjuster
therefore never sees data change out of step with its clock.

### Forwarded clock

`clock_divider` toggles a flip-flop on every cycle. Each edge of the
half-rate clock, rising or falling, marks one flit. A half-rate clock pin
changes no faster than a data pin. At the receiver, `clock_doubler` turns
every edge into a high pulse of width `PULSE` (3 ns by default), which
rebuilds a full-rate clock. The pulse starts when the flit appears, so the
data is stable while that clock is high. The doubler needs a physical delay
element. It is therefore a behavioural model (`assign #PULSE`), the only
non-synthesizable part of the design.

### The self-timed FIFO

`c_element` is a Muller C-element. Its output follows its inputs when they
agree and holds when they differ. `async_register` has two transparent
latches, each opened by its own C-element:

```
 req ──►C_a──┬──► ack_out               C_a = C(req,  ~C_b)
        ▲    │ (latch 1 enable)         C_b = C(C_a,  ~ack)
        └─~──┼─C_b──┬──► req_out
             │  ▲   │ (latch 2 enable)
  d ──[L1]───┴─┼[L2]┴──► q
               └─~── ack
```

A latch is open while its C-element output is high. It can close only after
its predecessor has closed and its successor has opened, so a latch never
closes on changing data. `phase_adjuster` chains `STAGES` of these registers
(four by default). In front of the chain is a latch that is open while the
rebuilt forwarded clock is high. Behind it is a latch that is open while the
local clock is low. The request of the first register is the forwarded clock
itself. The acknowledge of the last one is the local clock. So every sender
cycle pushes one flit in, and every local cycle pulls one flit out.

Reset loads every latch with the nop flit. It also sets the eight C-element
outputs to `0000_1010` (input side first). With both clocks low, that
pattern leaves two flits in flight: the FIFO is half full. Where in the clock
cycles reset ends then moves the fill level up or down a little. With four
registers, any constant skew is absorbed, together with jitter of up to
about one cycle that changes slowly. The testbench shows this (see below).
Two registers would absorb skew but leave almost no margin for jitter.

These latches and the loop through neighbouring C-elements are the intended
circuit. Lint reports them as latches and as a combinational loop.
Simulation is zero-delay and event-driven, and it settles the loop in delta
cycles.

## Block structure and interfaces

```
channel_controller
├── output_control    state, wants, yielded and drive registers + next-flit logic
├── output_datapath   nop mux → register bank → chan_out/chan_oe; clock_divider → fclk_out
├── input_datapath    nop/pad mux (select = chan_oe); clock_doubler; phase_adjuster
│   └── phase_adjuster → async_register ×4 → c_element ×2
└── input_control     register; DV = ~nop, EOM, data, parity → input frame; yld → go
```

Ports of `channel_controller`:

| group | ports | notes |
|-------|-------|-------|
| clock/reset | `clk`, `rst`, `init_owner` | `rst` is asynchronous and active high. Apply it to both sides with clocks running. `init_owner` is a static strap: 1 on exactly one side. |
| output frame | `of_data`, `of_par`, `of_dv`, `of_eom`, `of_req_chan` in; `of_td` out | A flit moves when DV and TD are both high. reqChanSI is an early DV. |
| input frame | `if_data`, `if_par`, `if_dv`, `if_eom` out; `if_td`, `if_leaving` in | DV is never held back, so the frame must take every data flit (an assertion checks this). |
| channel | `chan_out`, `chan_oe`, `chan_in`, `fclk_out`, `fclk_in` | Connect these to the pads. The bidirectional pad cells are not part of this RTL. |
| observation | `state` | state of the output control |

Parameters: `STAGES` (phase adjuster depth, 4) and `PULSE` (doubler pulse
width, 3 ns). `DATA_W` and `MSG_LEN` are in the package.

Timing: the flit the output control picks in cycle *n* is on the pins in
cycle *n+1*. On the receiving side, the flit reaches the input frame after
the wire delay, the phase adjuster (about two cycles) and one register. The
original circuit used two-phase latch clocking. Here every register is a
single rising-edge flip-flop.

## Measured behaviour

`tb/tb_channel_controller.sv` connects two controllers, with every parameter
at its default. They run on 12 ns clocks with 5 ns of skew and 1 ns of wire
delay. Frame models in `tb/` send and check numbered 20-flit messages.

| quantity | this RTL | design analysis it was built from |
|----------|----------|-----------------------------------|
| channel latency of one flit | 3 cycles (4 at small skew) | 4 cycles |
| utilisation, heavy bidirectional | 86.3 % | 83 % |
| utilisation, heavy unidirectional | 70.4 % | 69 % |
| arbitration latency, heavy bidirectional | ≈22 cycles | 28 cycles |
| arbitration latency, heavy unidirectional | ≈5 cycles | 9 cycles |
| arbitration latency, sporadic, idle channel | ≈3.6 cycles average | 2.8 average, 7 max |
| output latency (arbitration + crossing + 20 flits), heavy bi / uni | ≈45 / ≈28 cycles (derived) | 51 / 32 cycles |

The testbench checks several things:

* every message arrives complete and in order, with correct parity;
* the two sides never drive the channel at the same time;
* the channel latency is 3 to 5 cycles;
* both heavy-traffic utilisations are within 5 points of the analysis;
* the sporadic arbitration latency averages below 7 cycles.

It also fails if any protocol mechanism never happens. Those mechanisms are:
a yield on an EOM flit, an empty-turn yield, a delayed yield, nops while
waiting for requested data, nops while the input frame is full, and `go`.

`tb/tb_phase_adjuster.sv` covers clock-domain crossing. It runs ten phase
offsets across the cycle. It then runs them again with the sender's phase
drifting by 8 ns peak to peak at a 10 ns cycle. Every value must arrive
exactly once. The latency is constant at a fixed phase, and moves by at most
one cycle while the phase drifts.

`tb/tb_channel_skew.sv` repeats the two-router test over the clock relation.
It runs heavy bidirectional traffic through six pairs of controllers. Five
pairs have constant skews of 0.5, 3, 6, 9 and 11.5 ns at a 12 ns cycle. The
sixth has 6 ns of skew, and each rising edge of its far clock also moves at
random by up to ±2 ns. In every pair, all messages must arrive intact and in
order, and the two sides must never drive the channel at once. The
two-router harness it uses, `tb/tb_chan_pair.sv`, takes the skew, the jitter
and the wire delay as parameters.

## Simulating

Every module, testbench and helper model is in a file named after it. From
the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/chaos_chan_pkg.sv tb/tb_channel_controller.sv --top-module tb_channel_controller
./obj_dir/Vtb_channel_controller
```

Every block has its own testbench, `tb/tb_<module>.sv`. Build it the same
way, with that testbench and top module. Each testbench prints
`TB_RESULT checks=N failures=M`. To lint a module:
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/chaos_chan_pkg.sv rtl/<module>.sv`.

To change the flit width, edit `DATA_W` in the package. To trade latency for
jitter margin, change `STAGES`. Keep it even, so that the half-full reset
pattern stays meaningful.

## Where this RTL differs from, or goes beyond, the original design

* **Two-phase latches become rising-edge flip-flops** in the synchronous
  parts. The output register bank and the control registers are single
  registers.
* **Input control has a register stage** between the phase adjuster and the
  input frame.
* **Latch polarities in the phase adjuster are a choice.** The published
  diagram does not give them. The output latch is open while the local clock
  is low, so that a rising-edge register can sample it safely.
* **The FIFO is four registers deep,** as the skew analysis requires. The
  published two-register diagram only illustrates how registers chain.
* **Input frame readiness is taken to be TD or leavingSI.** The frame models
  in `tb/` drop TD only while they hold a complete message that is not
  leaving.
* **Dead time between turns is shorter than claimed.** The original design
  claims at least two dead cycles between the two sides' drive periods. Here
  it is 5 to 11.5 ns (under one cycle at some skews). The reason is the
  phase adjuster's fill level after reset. The drive periods still never
  overlap.
* **Turnaround is a little faster than the analysis.** Channel latency is
  3 cycles rather than 4, so utilisation comes out a few points higher and
  arbitration latency a few cycles lower.
* **Parity is not generated or checked.** It is carried from the output
  frame to the input frame.
* **The clock doubler is behavioural,** and its pulse width is a parameter.
* **Not included:** the bidirectional pads; the router's input and output
  frames, which exist only as testbench models; and the crossbars and
  multiqueue of the surrounding router. The cycle time of 12 ns is a
  circuit-level figure and cannot be checked here.

# LUCC: a one-clock centralized controller for a 4×4 MZI optical switch

A silicon-photonic switch built from 2×2 Mach-Zehnder interferometers (MZIs)
routes light, not packets: it has no buffers and cannot inspect what passes
through it. Some electrical controller has to decide, before a transmitter
sends, which light paths may exist at the same time, set every MZI on each
path to *bar* or *cross bar*, and tell the transmitter to go. Packet-switched
traffic needs that decision fast. This design makes it in **one clock cycle**
by keeping every switch configuration in a look-up table. It resolves
contention round-robin.

A second problem is fabrication spread. Each MZI needs a slightly different
bias voltage for bar and for cross bar. Trimming each device costs heater
power. Here the controller instead drives each MZI with a pulse-width
modulated (PWM) train whose duty cycle is calibrated per MZI and per state.
A low-pass filter and a buffer turn that train into the bias voltage.

The RTL covers the electrical side of a 4-transmitter, 4-receiver prototype:

```
 start/dst/length ─► request_generator ×4 ─LinkReq,dst,Tail─► ┌──────────── lucc_fpga ───────────┐
        payload_en ◄─┘                   ◄──Ack,TailAck─────  │ lucc: route_lut + lucc_scheduler  │
                                                              │          │ mzi_state[4:0]         │
                                                              │ voltage_control (5 PWM channels)  │
                                                              └──────────┬───────────────────────┘
                                                                 pwm[4:0]│
                                                         lpf_buffer_model ×5 ─► bias_v[4:0] ─► MZI chip
```

`lucc_top` is the whole of this. `lucc_fpga` is the synthesizable part that
would sit in the FPGA. The optical chip, the lasers and the receivers are not
modelled in `rtl/`.

## The switch fabric

Five MZIs in three columns. Index *k* of every MZI vector is MZI(*k*+1).

```
TX1 ─┐        ┌──────────────────────────┐
     ├─ MZI1 ─┤                          ├─ MZI2 ─┬─ RX1
TX2 ─┘        └──┐                    ┌──┘        └─ RX2
                 ├─ MZI5 (in0, in1) ──┤
TX3 ─┐        ┌──┘                    └──┐        ┌─ RX3
     ├─ MZI3 ─┤                          ├─ MZI4 ─┤
TX4 ─┘        └──────────────────────────┘        └─ RX4
```

Waveguides: MZI1.out0→MZI2.in0, MZI1.out1→MZI5.in0, MZI3.out0→MZI5.in1,
MZI3.out1→MZI4.in1, MZI5.out0→MZI2.in1, MZI5.out1→MZI4.in0. State 0 (bar)
connects in0→out0 and in1→out1. State 1 (cross bar) swaps them.

Where TX1, TX2, RX2 and RX3 sit follows the prototype. Where TX3, TX4, RX1 and
RX4 sit is this design's choice. Every (TX, RX) pair has exactly one shortest
path: two MZIs (e.g. TX1→RX2: MZI1 bar, MZI2 cross) or three through MZI5
(e.g. TX1→RX3: MZI1 cross, MZI5 cross, MZI4 bar).

## The routing table (`route_lut`)

There is one 11-bit entry per (TX, RX) pair, 16 in all:

| field   | bits | meaning                                          |
|---------|------|--------------------------------------------------|
| `valid` | 1    | a path exists; invalid requests are never granted |
| `use_m` | 5    | MZIs the path passes through                      |
| `state` | 5    | state each used MZI must take (0 = bar)           |

Reset loads the shortest-path table (`lucc_pkg::default_route`; the comments
there list every path). The write port (`lut_wr_*`) can replace any entry, and
that is how the controller is moved to another topology or another path. Each
transmitter has its own combinational read port. All four requests are
therefore looked up in the cycle they are scheduled. The table's size, and so
the controller's scaling, is N_TX·N_RX entries of 1+2·N_MZI bits.

## Scheduling in one clock (`lucc_scheduler`)

This is the core of the design. Every cycle, for all transmitters at once:

1. **Eligible requests.** A request is eligible if LinkReq is high, Tail is
   low, the TX holds no connection, and its table entry is valid.
2. **Resources in use.** These are the receivers and MZIs of the connections
   already held, recomputed each cycle from the entries stored when they were
   granted.
3. **Round-robin sweep.** Eligible requests are visited starting at the
   priority pointer `rr_ptr`. A request is granted if its receiver is free and
   every MZI on its path is either unused or already in the state the path
   needs. Two paths can share an MZI if they agree on its state: in a fabric
   of 2×2 elements they then enter and leave it on different ports. Each grant
   claims its receiver and MZIs immediately, so later requests in the same
   sweep see them as taken.
4. **Register.** At the next rising edge, Ack of every granted TX rises and the
   new MZI states are registered. This happens on the same edge, so the switch
   is configured in the same clock as the grant.

A request that is refused does not disappear. The transmitter keeps LinkReq
high, and the request is considered again every cycle. That is the "wait in
the round-robin queue" of the flow. `contention` is high in a cycle where an
eligible request lost only to another request of the same cycle; losing to a
connection already held is not counted. Only in such a cycle does the pointer
move, to one past the first TX granted. As a result:

* after reset TX1 has priority, and it keeps it while grants are uncontested;
* when TX1 and TX2 ask for RX2 together, TX1 wins, TX2 waits, and the next
  contention goes to TX2.

MZIs that no connection uses keep their last state.

### Handshake and timing

| signal | from → to | behaviour |
|--------|-----------|-----------|
| `link_req[i]`, `req_dst[i]` | TX → controller | high from request until TailAck; destination held |
| `ack[i]` | controller → TX | rises 1 clock after LinkReq when nothing blocks; stays high for the whole connection |
| `tail[i]` | TX → controller | end of communication |
| `tail_ack[i]` | controller → TX | 1-clock pulse, 1 clock after Tail; Ack falls at the same edge |

```
clk        _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/
LinkReq[0] __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______
Ack[0]     ______/‾‾‾‾‾‾‾‾‾‾‾\___________
mzi_state  =====X=TX1→RX2 held===========
Tail[0]    ______________/‾‾‾‾‾‾‾\_______
TailAck[0] __________________/‾‾‾\_______
```

Bit *i* of each 4-bit bus is TX(*i*+1). A receiver and the MZIs freed by a
TailAck can be granted in that same TailAck cycle, so a waiting transmitter
gets Ack one clock after the holder's TailAck.

The scheduler carries assertions. Every held connection must see its MZIs in
the states its path needs, no two connections may share a receiver, and Ack
may rise only on a request.

## Bias voltages by PWM (`voltage_control`, `lpf_buffer_model`)

Each MZI has two calibration codes of 4 bits, one for each state bit. A shared
counter divides the clock into periods of 125 clocks. During a period, output
*m* is high for the first `code × 4` clocks, where `code` is MZI *m*'s code for
its current state. The filtered voltage is duty × 2.5 V, so:

* one code step is 4/125 = 3.2 % of the period, which is 80 mV;
* codes 0–15 give 0–1.2 V;
* code 12 gives 38.4 % → 0.96 V, and code 14 gives 44.8 % → 1.12 V.

These last two are the measured bar and cross-bar biases of the first MZI of
the prototype, and every MZI starts with them after reset. The measured
spread over the other MZIs (about 0.83–1.15 V) falls inside the code range.
Each MZI is meant to be recalibrated through `cal_wr_en`/`cal_mzi`/`cal_sel`/
`cal_code`.

A new state or code is taken only at the end of a period, so no pulse is ever
cut short. A state change therefore reaches the pulse train within 126
clocks. After that comes the filter's settling, a time constant of 20 µs in
the model. The clock frequency is free. The period of 125 clocks and the step
of 4 clocks are what make the 80 mV, 38.4 % and 44.8 % figures exact. With a
100 MHz clock the PWM period is 1.25 µs.

`lpf_buffer_model` is a behavioural, non-synthesizable model of the analog
RC filter and unity-gain buffer. It is event driven: at each pulse edge it
applies the exact exponential response. Its `real` output changes only at
pulse edges.

### Which logic level is bar?

Two descriptions of the prototype disagree. One maps state 0 to bar and 1 to
cross bar. The other maps the cross-bar bias (44.8 %) to a logical 0. This
design uses **0 = bar** throughout: the routing table, the scheduler and the
reset codes. Because `voltage_control` keeps an independent code for each
value of the state bit, the other convention is only a matter of writing the
calibration codes the other way round.

## Transmitter side (`request_generator`)

This is the simplest generator of the handshake. A `start` pulse latches
`dst` and `length`, and LinkReq rises the next clock. The generator then waits
for Ack, for as long as it takes. After Ack it raises `payload_en` (the enable
for optical packet generation) for `length` clocks. Then it raises Tail,
waits for TailAck, and returns to idle. Starts while busy are ignored.

## Files

| file | contents |
|------|----------|
| `rtl/lucc_pkg.sv` | sizes (4 TX, 4 RX, 5 MZI), `route_t`, default routing table |
| `rtl/route_lut.sv` | programmable routing table |
| `rtl/lucc_scheduler.sv` | one-clock scheduler |
| `rtl/lucc.sv` | table + scheduler |
| `rtl/voltage_control.sv` | 5-channel calibrated PWM |
| `rtl/lucc_fpga.sv` | lucc + voltage_control (synthesizable) |
| `rtl/request_generator.sv` | TX-side handshake |
| `rtl/lpf_buffer_model.sv` | behavioural filter/buffer model |
| `rtl/lucc_top.sv` | whole system |
| `tb/switch_fabric_pkg.sv` | light-path model of the fabric, used for checking |
| `tb/*_tb.sv` | one self-checking testbench per module |

Sizes come from `lucc_pkg` (`N_TX`, `N_RX`, `N_MZI`). The PWM numbers
(`PERIOD`/`PWM_PERIOD`, `STEP`/`PWM_STEP`, `CODE_W`) and `LPF_TAU_NS` are
module parameters. The default routing table is written for the 5-MZI fabric.
For another topology, change `N_*` and `default_route`, or load the table at
run time.

## Simulating

Verilator 5 with `--timing`, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb rtl/lucc_pkg.sv tb/switch_fabric_pkg.sv tb/lucc_top_tb.sv \
  --top-module lucc_top_tb -o sim
./obj_dir/sim
```

Swap the testbench and top module names to run another testbench. Each
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. To lint
the synthesizable part, run
`verilator --lint-only -Wall -y rtl rtl/lucc_pkg.sv rtl/lucc_fpga.sv`. The one
remaining warning (SYNCASYNCNET on `rst_n`) comes from the assertions, which
use the asynchronous reset as their disable condition.

## What the testbenches establish

* `route_lut_tb`: every default entry, applied to the fabric model with the
  unused MZIs random, carries TX to the right RX and crosses exactly the listed
  MZIs. It also checks that each entry is shortest, by exhaustive search over
  all 32 MZI settings, and tests the write port and reset.
* `lucc_scheduler_tb` has a directed part and a random part:
  * Directed: Ack after one clock; waiting on a busy receiver; TX1 winning the
    first contention; TX2 granted the clock after TX1's TailAck; the pointer
    handing the next contention to TX2; two paths sharing MZI5; two paths
    excluding each other on MZI1.
  * Random: 3000 cycles on four transmitters. Each cycle it checks that every
    held connection's light reaches its receiver, that Ack rises only on a
    request and TailAck only on Tail, and that the schedule is maximal: no
    waiting request could have been added.
* `voltage_control_tb`: period length and high time of every channel, for
  reset and random calibration codes and random states.
* `lpf_buffer_model_tb`: the settled average equals duty × 2.5 V within 10 mV.
* `lucc_tb`, `lucc_fpga_tb`: table reprogramming changes the path used;
  invalid entries are never granted; states reach the pulse trains.
* `lucc_top_tb`, at the default sizes, runs end to end:
  * It replays the prototype's demonstration: TX1→RX2 twice, then TX1 and TX2
    contending for RX2, then TX1→RX2 and TX2→RX3 held together (both need
    MZI1 in bar), then TX2→RX2.
  * It checks the settled biases: MZI1 at 0.96 V in bar and 1.12 V in cross;
    MZI2 at 1.12 V.
  * It then recalibrates MZI2, reprograms a route, and runs 20,000 cycles of
    random traffic. Every payload clock is checked to reach the requested
    receiver.
  * It counts grants, contentions, waits, shared MZIs, releases and state
    changes, and fails if any of them never happened.

Each testbench has also been shown to fail on a deliberately broken copy of
its module.

## Choices this design makes

The published description gives the structure, the signal names, the
one-clock decision, round-robin contention, the shortest-path table and the
PWM bias numbers. It leaves the following open, and this design chooses:

* **Destination.** It is passed as a 2-bit field next to each LinkReq.
* **Handshake.** Ack is a level held for the whole connection, and TailAck is a
  one-clock pulse.
* **Allocation.** A single greedy sweep (one iteration), with a single
  round-robin pointer that moves only on contention.
* **Sharing.** MZIs may be shared by paths that agree on their state.
* **Fabric ports.** The positions of TX3, TX4, RX1 and RX4.
* **PWM.** A period of 125 clocks with a 4-clock step. Four-bit codes cover
  0–1.2 V in 80 mV steps rather than the full 0–2.5 V.
* **Calibration.** The reset codes of all MZIs equal the first MZI's values;
  the others were only measured graphically.
* **Reset.** Asynchronous and active low.
* **Filter model.** The filter order and time constant.
* **Clock.** The clock frequency is not fixed; the testbenches use 100 MHz.

# Distributed timing system: master and slave timing modules

An accelerator control system spread over many networked I/O controllers
needs every controller to act on the same beam pulse and to stamp the data it
takes with the same event time. A general-purpose network cannot do that, so
this design distributes timing separately. A single **master timing module**
generates four signals:

| signal | role |
|---|---|
| system clock, 5 MHz | common time base of every node; all counting is in its 200 ns ticks |
| system trigger | the main synchronizing event; gates every user timing output |
| time tag clock | advances the time stamp counters |
| time tag reset | clears the time stamp counters |

The clock travels on one optical fibre. The other three signals share a
second fibre. Optical fanouts copy both fibres, star fashion, to a
**slave timing module** in every controller. Each module, master included,
turns the trigger into ten programmable pulse outputs and keeps a pair of
16-bit time tag counters for stamping data.

```
             +-------------------- master_timing_module ---------------------+
 clk_5m ---->| 3 x rate_divider --> signal_encoder --> fiber_data_out --+    |
             |   (falling edge)       (5-bit frames)                     |    |
             |          clk_5m ------------------------> fiber_clk_out   |    |
             |   slave_timing_module (local copy) <---------------------+    |
             +--------------------------------------------------------------+
                          |  optical fanout (outside the RTL)
                          v
   +------------------------- slave_timing_module -------------------------+
   | fiber_data -> signal_decoder -> event_sync -> time_tag_counter        |
   |              (clk_dec, 20 MHz)  (fiber_clk)  -> 2 x counter_timer_chip|
   |                                              (5 x user_timer_channel) |
   |                                              -> interrupt_ctrl        |
   +-----------------------------------------------------------------------+
```

## Getting the same trigger edge at every node

This is the part that needs the most care. The aim is that every node takes
the trigger on the *same* rising edge of its received clock, whatever the
fibre lengths, so that outputs on different nodes differ only by the fibre
delay of the clock itself. Three choices work together.

1. **The master sends on the falling edge.** The rate dividers and the
   encoder in `master_timing_module` are clocked by the inverted system
   clock. Every bit edge on the data fibre therefore sits half a period
   (100 ns) away from the rising edges that the receivers use.

2. **The decoder releases events mid-period.** `signal_decoder` does not
   run on the system clock. It samples the fibre with its own oscillator at
   OVS = 4 times the system clock (20 MHz), so its output carries up to one
   sample (50 ns) of jitter. Once a start bit is seen, it samples each data
   bit half a bit into its bit time. It releases all three event bits at
   once, four bit times after the start edge, and holds them for one bit
   time. Because the start edge came from a falling clock edge, that
   200 ns window is centred on a rising clock edge at the receiver.

3. **A two-stage rising-edge synchronizer re-times them.** `event_sync`
   samples the window on the rising edge of the received clock and then
   once more. This removes the decoder jitter and delays the event by two
   ticks (400 ns). Its output is a one-tick pulse.

Adding this up, a trigger frame that starts on master falling edge *t0*
appears as `trig_out` after the sixth rising edge following *t0* at every
node. The sampling edge sits at *t0* + 900 ns. The release window opens
between *t0* + 800 ns and *t0* + 850 ns. Relative to a node's clock fibre,
its data fibre may therefore arrive up to about 50 ns late or 100 ns early.
The system testbench uses skews from 80 ns early to 40 ns late on top of
0–300 ns link delays. If the skew leaves that window, a node takes the
trigger one tick (200 ns) early or late. It does not lose the trigger.

## The data fibre frame

The frame format belongs to this design. Each frame is five bits of one
system clock period each, and the line idles low:

| bit | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| value | start = 1 | trigger | time tag clock | time tag reset | stop = 0 |

Events of different kinds that arrive together go out in one frame. An
event that arrives while a frame is on the line is held. It goes out in the
next frame, which may follow the stop bit with no gap. A second event of the
same kind that arrives while one is still held is merged with it and pulses
`enc_overrun`. One event of each kind per 1 µs is the most the line can
carry. A frame whose stop bit is not low pulses `frame_err` at the receiver.
Its events are still delivered, because they were released before the stop
bit was checked.

## Signal generation at the master

`rate_divider` emits one pulse every `period` source events. A period of 0
stops it. There is one divider each for the trigger, the time tag clock and
the time tag reset. The trigger always counts system clock ticks. Each time
tag signal counts either ticks or the rising edges of an external input
(`tag_clk_src_ext`, `tag_rst_src_ext`), which passes a two-flop synchronizer
first. Periods are 24 bits wide (`DIV_W`), up to 3.3 s at 5 MHz.

The master also contains an ordinary receiver, fed from its own data fibre
output. Its channels and time tags therefore follow the same rules as every
slave's, with zero fibre delay.

## Time tags

`time_tag_counter` holds a 16-bit running count of time tag clocks, cleared
by the time tag reset, and a 16-bit copy latched at every trigger
(`tag_latched`). Software reads the latched value to stamp the data of that
trigger. When several events arrive in the same tick, the trigger latches the
count as it was before that tick's increment or clear, and a reset wins over
a clock. A reset pulses the counter-reset interrupt. A wrap from 0xFFFF to 0
pulses `tag_wrap`, because an overflow makes stamps ambiguous. Choose the tag
clock and reset rates so that it never happens.

## User timing channels

Each node has ten channels, in two `counter_timer_chip` groups of five. Every
channel is a retriggerable one-shot (`user_timer_channel`) programmed by a
`chan_cfg_t` (see `timing_pkg.sv`):

- `delay`, `width`: 16-bit counts of the selected source. With the system
  clock that is 200 ns resolution and up to 65535 ticks (13.1 ms) for each.
- `src`: system clock, time tag clock, time tag reset, trigger, or the
  chip's external input (rising edges, synchronized).
- `sense`: 1 for an active-high pulse, 0 for active-low.
- `evnt`: 0 or 1 accepts every trigger. N accepts every Nth trigger. The
  divider is cleared by the time tag reset, so all nodes with the same N
  fire on the same triggers.
- `enable`: a disabled channel is idle and ignores triggers.

With the system clock as source and the trigger pulse in tick *T*, the
output is active in ticks *T*+2+delay through *T*+1+delay+width. A width of
0 gives no pulse. A trigger that arrives during the delay or the pulse
restarts the delay. A pulse that must follow another channel is programmed
as one absolute delay from the trigger, computed by software. Example: 3 µs
after the trigger and 1 µs wide is delay 15, width 5.

The channel models only the mode of a multi-mode counter/timer chip that
this system uses. It does not model that chip's register interface or its
other modes.

## Interrupts

`interrupt_ctrl` latches eight event sources, and `irq` is high while an
enabled pending bit remains. Writing a 1 to a bit of `irq_clear` clears that
bit. An event that arrives in the same tick as its clear still sets the bit.

| bit | source |
|---|---|
| 0 | system trigger |
| 1 | time tag counter reset |
| 2–4 | end of pulse on channels 1–3 (chip 0, channels 0–2) |
| 5–7 | end of pulse on channels 6–8 (chip 1, channels 0–2) |

## Top level and its ports

`timing_system_top` has one master and `N_SLAVES` slaves (default 12, so 13
nodes). The optical fanouts and transceivers are not logic, so the fibres
are ports. `fiber_clk_out` and `fiber_data_out` leave the master, and
`fiber_clk_in[i]` and `fiber_data_in[i]` enter slave *i*. The board, or a
testbench, joins them with whatever delay the links have. Per-node arrays
are indexed 0 for the master and 1..N_SLAVES for the slaves. They carry:

- `clk_dec`, the node's decoder oscillator;
- `cfg`, `ext_in`, `irq_enable` and `irq_clear`, the node's programming;
- the node's outputs.

There is no bus interface: programming and status are plain ports for a
host bus wrapper to drive. All flops reset asynchronously on `rst_n` (active
low). The logic that follows the decoder runs on the node's received clock.

| parameter | default | meaning |
|---|---|---|
| `N_SLAVES` | 12 | slave nodes |
| `DIV_W` | 24 | width of the master's period registers |
| `OVS` | 4 | decoder samples per system clock period (≥ 4 keeps the timing above) |
| `CNT_W` (package) | 16 | channel and time tag counter width |
| `CH_PER_CHIP`, `CHIPS` (package) | 5, 2 | channels per chip, chips per node |

## Where this design departs from the original system, or fills gaps

Chosen here because the description is silent:

- the frame format, the decoder's oversampling ratio and its release time;
- the rate register width;
- the channel state machine, its exact latency and its divider phasing;
- the moment a channel interrupts (end of pulse);
- the interrupt latch and clear scheme;
- the master's loopback receiver.

Departs from the original:

- The original uses the decoded time tag clock and reset unsynchronized, so
  they keep the decoder's 50 ns jitter. Here they pass the same two-stage
  synchronizer as the trigger, so the time tag counters sit in the system
  clock domain. They arrive 400 ns later and without jitter.

Not built:

- the bus interface and its register map;
- the counter/timer chip's other modes;
- optical parts, oscillators and front-panel drivers.

Also left out: the planned single-shot event type, which needs an arming
signal that the frame does not carry.

## Files and tests

`rtl/` holds one module or package per file, and `timing_pkg.sv` holds the
shared types. Each `tb_<module>` in `tb/` is a self-checking testbench for the
module of the same name without the `tb_` prefix. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. `tb_timing_system_top` runs the whole 13-node system at its default
size, with modelled fibre delays and separate decoder oscillators. It covers
four modes:

- normal triggering with periodic tag resets;
- an external tag clock;
- 65 600 tag clocks, to force a counter wrap;
- a tag clock too fast for the line, to force overruns.

It checks the following:

- trigger alignment to within 1 ns after removing each node's clock delay;
- equal latched tags at every node;
- channel timing and the divide-by-2 channel;
- every interrupt source;
- the absence of frame errors.

It takes about one to two minutes.

`tb_timing_records` runs a three-node system through the original system's
example programming:

- a pulse 3 µs after the trigger, 1 µs wide;
- a pulse 3 µs after that one;
- the second pulse again, on every 2nd trigger;
- a channel at the counter limit, 13.1 ms of delay and 13.1 ms of width;
- an active-low copy of the first pulse.

It uses a 100 kHz time tag clock and triggers 30 ms apart. At every node it
checks start times, widths and the spacing of the latched time tags.

To simulate with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/timing_pkg.sv tb/tb_timing_system_top.sv --top-module tb_timing_system_top
./obj_dir/Vtb_timing_system_top
```

Substitute any other testbench name. The design is synthesizable. It has
two clock inputs per node: the received system clock and the decoder
oscillator. Only the decoder-to-synchronizer path crosses between them.

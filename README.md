# A distributed-FIFO link between independent clock domains

In a network on chip, each switch or IP block may run on its own clock, with
no fixed frequency or phase relation to its neighbours. A word sent from one
switch to the next must then cross a clock boundary without being lost,
duplicated or caught mid-change. The usual answers are two-flop synchronizers,
which add cycles of latency, or dual-clock FIFOs with gray-coded pointers and
full/empty detectors.

This design takes another route. The link between two switches is a short
chain of **self-timed FIFO stages**. Each stage fires a local enable pulse that
loads one word, and it fires only when both of these hold:

- the stage before it offers a word;
- its own buffer is empty.

The pulse that loads a word is also the request to the next stage and the
"you are empty now" event for the stage before. So every word travels through
the link together with its own clock pulse. The sender's clock edge starts the
chain and the receiver's clock edge drains it. Neither clock ever samples data
that was launched by the other clock's flip-flops. The two clocks may have any
ratio, and they may drift.

```
 clk_send                                                        clk_recv
    |                                                                |
 +--v-----------+  req   +--------------+  enable0  +--------------+ |
 | sender       |------->| control cell |---------->| control cell |<+ empty
 | interface    |<-------|   stage 0    |<----------|   stage 1    |
 | (out latch)  | ready  +------+-------+  enable1  +------+-------+
 +------+-------+               | enable0                  | enable1
        | data_q         +------v-------+           +------v-------+   +-----------+
        +--------------->| buffer cell  |---------->| buffer cell  |-->| receiver  |
                         +--------------+           +--------------+   | interface |
                                                                       +-----------+
```

Default configuration: 32-bit words, two stages, 40 ps inverter delay.

## Files

| file | module | kind |
|---|---|---|
| `rtl/mcd_sync_pkg.sv` | shared default constants | package |
| `rtl/mcd_sync_link.sv` | **top**: sender interface, `STAGES` relay stations, receiver interface | synthesizable structure |
| `rtl/relay_station.sv` | one stage = control cell + buffer cell | structure |
| `rtl/fifo_control_cell.sv` | self-timed controller of one stage | **behavioural model with delays** |
| `rtl/buffer_cell.sv` | one-word latch loaded by the enable pulse | synthesizable |
| `rtl/sender_interface.sv` | output latch, gated sender clock as request, back-pressure | synthesizable |
| `rtl/receiver_interface.sv` | input register, gated receiver clock as empty event | synthesizable |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mcd_sync_link_stages` for other stage counts | simulation |
| `tb/link_stage_check.sv` | harness used by `tb_mcd_sync_link_stages` | simulation |

## The control cell: how a stage decides to fire

This is the heart of the design. It is also the one part that is not ordinary
clocked logic. In silicon it is a dozen transistors. Its state lives on two
nodes:

- **request latch** (a cross-coupled inverter pair, called A / A_bar). The
  rising edge of `req_clk` sets it. `req_clk` is the gated sender clock for
  stage 0, or the enable of the previous stage for the other stages.
- **empty node** (C). The rising edge of `empty_clk` sets it. `empty_clk` is
  the enable of the next stage, or the gated receiver clock for the last stage.

When both nodes are set, a pull-down path discharges an internal node, and its
inverted value is `enable`. The enable pulse then clears both nodes again:

- the request has been served;
- the buffer is now full.

After that, enable falls.

The cell waits for whichever event comes **last**:

- **Sender clock faster than the receiver's:** the request waits in the latch
  until the receiver's edge empties the stage.
- **Receiver faster:** the stage sits empty, and the sender's edge fires it
  at once.

So the same circuit works for equal clocks, clocks of equal frequency but
different phase, and any ratio.

Timing model used in `fifo_control_cell.sv` (all parameters):

| quantity | default | meaning |
|---|---|---|
| `T_INV_PS` | 40 ps | one inverter delay. This is a fan-out-of-4 delay in 90 nm, where 15 FO4 makes a 1.67 GHz cycle |
| `FIRE_INV` | 4 | inverter delays from the later event's clock edge to the rising edge of enable |
| `PULSE_INV` | 2 | width of the enable pulse in inverter delays |

Each event is registered one inverter delay after its clock edge. So logic
that samples the cell on that same edge always sees the state from before the
edge. The other three inverter delays lead to enable.

Because the cell's behaviour rests on gate delays, `fifo_control_cell.sv` is a
**behavioural model**. It uses `#` delays and event-driven processes, and
synthesis tools cannot map it. To build the link in silicon, replace it with a
full-custom or standard-cell self-timed implementation that meets the same
timing contract:

- enable fires only when a request and an empty flag are both present;
- the pulse clears both flags;
- the pulse is shorter than the time the neighbouring stages need to fire in
  response.

The cell also has an `overrun` output. It is a sticky flag, set if a second
request arrives while one is still pending. In a correctly connected link this
cannot happen, and the testbenches check that it never rises.

## The buffer cell and why the pulse width matters

Each buffer cell is a level-sensitive latch: pass gates opened by `enable`.
While enable is high, the latch is transparent. Its input must therefore hold
still for the whole pulse:

- **Inside the chain:** the previous stage can only reload its buffer after
  this stage's enable has emptied it. That takes 1 + 3 inverter delays, which
  is longer than the 2-inverter pulse. Keep `PULSE_INV < FIRE_INV` if you
  change the timing.
- **At the sender:** the request latch clears at the *rising* edge of enable,
  and the first buffer is still open at that moment. So the sender interface
  holds `send_ready` low until the first stage's enable has fallen as well
  (`first_enable` input). Without that, a fast sender could overwrite its
  output latch while stage 0 is still copying it.

## The two ends

**Sender interface** (`clk_send` domain): the sender offers a word with
`send_valid`/`send_data`. It is accepted on a rising edge while `send_ready`
is high. On that same edge:

- the word goes into the output latch `data_q`;
- the edge itself passes through a clock gate and becomes `req_clk` of
  stage 0.

Clock edges without a word never reach the controller.

Two values are captured together in a latch that is open while `clk_send` is
low:

- `send_ready = not (req_pending or first_enable)`;
- `send_valid`.

The gated clock, the data register and the sender therefore all judge a cycle
by one sample of the asynchronous flags.

**Receiver interface** (`clk_recv` domain): the receiver asks with
`recv_ready`. In the clock low phase, a latch samples `recv_ready` and the
last stage's full flag together. If both are set, then on the next rising
edge:

- `recv_data` loads the last buffer;
- `recv_valid` is high for that cycle;
- the same edge is passed to the last control cell as its empty event.

The receiver clock is gated with the take decision. Without the gate, a word
that fills the last stage just after a receiver edge could be marked empty
without ever being read.

## Timing

With the default parameters:

- **Latency into an empty link:** `STAGES x FIRE_INV x T_INV_PS`, which is
  2 x 4 x 40 = **320 ps** from the sender's clock edge until the word sits in
  the last buffer. The receiver takes it on its next rising edge. For
  comparison, circuit simulations of the transistor-level cell in 90 nm gave
  about 300-340 ps over a 3 mm link between neighbouring mesh switches, about
  470-480 ps over a 6 mm folded-torus link, and about 820-890 ps over a 10 mm
  tree link split into two stages. Those figures include the wire, which this
  model leaves out.
- **Throughput:** one word per cycle of the slower clock. This holds as long
  as the controller is faster than both clocks, which needs roughly a half
  period above 160 ps, i.e. clocks below about 3 GHz with these delays.
- **Back-pressure:** when the receiver is slower, the stages fill and
  `send_ready` drops. With two stages the link holds up to three words: one in
  each buffer and one in the sender latch.

Wire delay is not modelled. On a real link, the delay of each wire segment
adds to the stage latency, and data and request must be routed so that they
keep their relative timing (bundled data). To cover a wire longer than one
segment, raise `STAGES`: one relay station per segment.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Using plain Verilator 5 (`--timing` is required for the delay model):

```
verilator --binary --timing --assert --top-module tb_mcd_sync_link \
    -Irtl rtl/mcd_sync_pkg.sv tb/tb_mcd_sync_link.sv -Wno-fatal
./obj_dir/Vtb_mcd_sync_link
```

Swap the name for any other testbench. Verilator finds the modules in
`rtl/` through `-Irtl` (add `-y rtl` if your version needs it).

What the testbenches cover:

| testbench | what it checks |
|---|---|
| `tb_fifo_control_cell` | enable exactly 4 inverter delays after the later event; pulse width; a request queued behind a full buffer; an empty cell waiting for a request; the overrun flag; reset |
| `tb_buffer_cell` | transparency, hold, reset |
| `tb_relay_station` | 300 words through one stage in both event orders; firing time; the loaded word |
| `tb_sender_interface` | request edge only for accepted words; `send_ready` against its own model of the cell; the output latch |
| `tb_receiver_interface` | empty edge only for taken words; in-order delivery; idle cycles |
| `tb_mcd_sync_link` | see below |
| `tb_mcd_sync_link_stages` | links of 1, 3 and 4 stages at 1.66/0.66 GHz, each in a `link_stage_check` harness: latency `STAGES x 160 ps`, capacity `STAGES + 1` words, in-order delivery of random traffic |

`tb_mcd_sync_link` runs the top at its default parameters with four clock
pairs:

- 1.0/1.0 GHz in phase;
- 1.0/1.0 GHz with a 370 ps phase offset;
- 1.66/0.66 GHz;
- 0.66/1.66 GHz.

For each pair it checks:

- the 320 ps latency;
- in-order, loss-free delivery of 2000 random-traffic words against a
  scoreboard;
- one word per slower-clock cycle when both ends stream.

It also counts the link's mechanisms and requires each at least once: sender
stalled, request queued behind a full stage, empty stage waiting for a
request, receiver waiting on an empty link, all stages full.

## What is specified, what is chosen

The following come from the design as specified:

- the chain of control cells and buffer cells;
- the firing rule (request pending and buffer empty);
- the sender's and receiver's clock edges as the events at the two ends;
- the four-inverter path to enable;
- the rule that the sender may not issue its next clock to the link until the
  enable pulse has ended;
- 32-bit words;
- two stages.

These are choices of this implementation:

- **Inverter delay of 40 ps.** Derived from a 90 nm FO4 delay.
- **Enable pulse width of 2 inverter delays.**
- **The chain inside the link.** Stage k's enable is the request of stage k+1
  and the empty event of stage k-1.
- **Valid/ready signals at both ends.** This includes the clock-gating latches
  that turn the two clocks into request and empty events only when a word
  really moves.
- **The receiver-side gating.** In the reference circuit, the receiver clock
  restores the empty node directly. Here it does so only on edges that take a
  word.
- **Reset.** An asynchronous active-low reset that empties every stage.
- **The `overrun` flag and the status outputs.**

## Limits

- **Metastability is not handled.** The sender samples the first stage's
  pending flag, and the receiver samples the last stage's full flag, each in a
  latch open during its clock's low phase. Both flags change asynchronously to
  that clock. In a two-state simulator they resolve at once. In silicon these
  two points need a resolution margin or a synchronizer, which the design does
  not provide.
- **The control cell is a delay model**, not a netlist (see above).
- **Not modelled:** wire delay, energy, and clock generation and distribution.
- **The network around the link is not included.** That is the switches and
  the mesh, folded-torus or fat-tree fabric built from them. Each link of such
  a fabric would be one `mcd_sync_link` per direction.

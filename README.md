# Silicon-tracker layer readout: front-end chips and controller chips

A tracker layer is a row of 25 front-end (FE) chips with 64 channels each,
1600 silicon-strip channels in all. A readout controller chip sits at each
end of the row. Both controllers can do the same work, and every FE chip
can be told which of the two it reports to. If a controller or a chip
fails, the layer is split at another point and read from both ends. The
chips pass their data along the row in one long shift register. An empty
chip adds a single bit to that stream; a chip with hits adds 65. The
controllers turn the stream into a list of hit addresses. They then send
it to the tower controller as a packet on a token daisy chain that runs
through all 16 layers of a tower side. Triggers run the other way: every
channel above threshold takes part in a layer-wide OR that reaches the
controllers.

This repository is synthesizable SystemVerilog for that system:

- the digital part of the FE chip;
- the controller chip;
- a layer made of 25 FE chips and two controllers;
- a 16-layer tower side (`tracker_tower`, the top).

It also has a behavioural model of the analog front end and a
self-checking testbench for every module. Everything runs on one clock,
20 MHz in the target system.

## A layer and its two directions

```
        token/data up                                   token/data up
             |                                               |
   +--------------+   +----+   +----+       +----+   +--------------+
   |  controller  |<->| FE |<->| FE |  ...  | FE |<->|  controller  |
   |   (side 0)   |   |  0 |   |  1 |       | 24 |   |   (side 1)   |
   +--------------+   +----+   +----+       +----+   +--------------+
     cmd, clk-en, trg-ack bussed to all 25 chips from each controller
```

Each FE chip has data and trigger connections to both neighbours. Bit 0 of
its control register, the left/right bit, decides:

- which way its output shift register moves data: its input comes from the
  neighbour away from the chosen controller, and its output goes towards it;
- which controller's commands it obeys for anything except "load control
  register" and "reset chip", which it takes from either side so that
  either controller can take it over;
- which controller's clock enable and trigger acknowledge it uses.

The trigger is not switched. Each chip ORs its 64 masked discriminators. It
sends that OR, combined with what arrives from the left, to the right, and
combined with what arrives from the right, to the left. Both controllers
therefore see the OR of the whole layer.

For a split readout, the first k chips are set to "left" and the rest to
"right". The left controller's chip count is then set to k and the right
one's to 25 − k. A hit address is `chip_position × 64 + channel`, an
11-bit number. The right controller counts positions from its own end, so
the addresses from both sides agree.

## Command frames

The tower controller talks to the controllers, and each controller to its
FE chips, with the same serial frame. All bits are sent most significant
first:

```
1  a a a a a  c c c  d d d ...
^  address    code   data (length fixed by the code)
```

The frame starts with a start bit. The address is a chip position (FE) or
a layer number (controller). Address 31 reaches every chip on the line.

| code | FE chip command       | data bits | controller command          | data bits |
|------|-----------------------|-----------|-----------------------------|-----------|
| 0    | load control register | 207       | load control register       | 10        |
| 1    | read event            | 0         | clear event                 | 0         |
| 2    | end read event        | 0         | read event                  | 0         |
| 3    | clear event           | 0         | load FE control register    | 5 + 207   |
| 4    | calibration strobe    | 0         | FE clock on/off             | 1         |
| 5    | reset chip            | 0         | calibration strobe (to FEs) | 0         |
| 6    | reset FIFO            | 0         | reset FE chips              | 0         |
| 7    | —                     |           | reset controller            | 0         |

**FE control register, 207 bits** (MSB first):
- calibration mask (64);
- trigger mask (64);
- data mask (64);
- calibration DAC (7);
- threshold DAC (7);
- left/right (1, 1 = right).

**Controller control register, 10 bits** (MSB first):
- number of chips to read (5);
- check-sum enable (1);
- x-y coincidence (1);
- require a trigger from this layer (1);
- spare (2).

The controller turns "load FE control register" into an FE "load control
register" addressed to the given chip. Its clear, calibration and reset
commands become FE clear event, calibration strobe and reset chip,
broadcast to the FE chips. "Reset controller" also empties the FE FIFOs.

## From trigger to packet

1. **Trigger.** Charge on a channel crosses threshold. The layer OR reaches
   both controllers. Each one synchronises it in its gate (two flops) and
   drives it out as the layer trigger. On the rising edge its ToT counter
   starts to count clocks while the trigger is high, saturating at 511.
2. **Acknowledge.** The tower controller answers with a trigger
   acknowledge. The controller passes it to its FE chips one clock later.
   - *FE chip:* from the first discriminator firing until the acknowledge,
     it collects its hits in a sticky latch. On the acknowledge it pushes
     the latch OR'd with the current discriminators, masked by the data
     mask, into its 8-deep event FIFO. A latch with no acknowledge within
     32 clocks is dropped.
   - *Controller:* it writes {trigger seen, ToT} into its own 8-deep ToT
     FIFO. If no acknowledge comes within 32 clocks (1.6 µs), the
     measurement is abandoned. An acknowledge that arrives with no trigger
     from this layer still writes an entry, {0, 0}. This keeps the ToT
     FIFO in step with the FE FIFOs.
3. **Read event.** The controller sends an FE "read event". Each chip moves
   its oldest FIFO entry into its output shift register: a 1 and the 64 hit
   bits, channel 63 first, or a single 0 if the event is empty. The
   controller keeps the FE clock running and clocks the stream in, one bit
   per clock, nearest chip first. The hit counter writes each hit address
   into the free event buffer. The ToT entry goes into the header.
4. **End read.** When the set number of chips has been read, the event
   buffer is marked full. The controller then sends "end read event".
5. **Token.** When the token arrives from below, the controller sends the
   oldest full buffer as a packet downwards and passes the token up. A
   token that arrives before any event is ready is held until one is. One
   token therefore collects exactly one packet from every layer. The
   tower controller should send a token only after a read event (or
   control-register load) has reached all layers. Otherwise the token
   waits at the first layer with nothing to send.
   While it is not sending, the controller repeats, one clock late, what
   arrives from the layer above. The packets of all layers therefore reach
   the tower controller in layer order.

While one event waits for the token, the next one can already be read
into the second event buffer. Triggers and acknowledges can go on all the
time.

### Truncation and stalls

- **New read event.** If a read event arrives while the previous event is
  still being clocked in, that readout stops. Its event is stored with
  the *truncated* control bit and the hits it has so far. Then the new
  read begins.
- **63 hits.** An event is also cut short, and marked truncated, when a
  64th hit arrives. The packet's hit count is 6 bits, so 63 is the most it
  can describe.
- **Stall.** A read event that arrives while both event buffers are still
  waiting for the token is held, and the `stalled` status is raised. It
  proceeds as soon as a packet has been sent.

Even so, the tower controller is expected to keep count of the buffers
itself:

- 8 FE events;
- 2 controller events;
- read commands and tokens sent against packets received.

### Packet format

```
start bit 1
word 0 : layer address (5) | hit count n (6)
word 1 : control bit 1 (1) | control bit 2 (1) | ToT (9)
words 2 .. n+1 : hit addresses (11 bits each)
optional word : check-sum = XOR of all preceding words
```

- Control bit 1 marks a control-register packet. One is queued each time
  the controller register is loaded. It has n = 1, and its word holds the
  10-bit register.
- Control bit 2 marks a truncated event.
- An event with no hits still produces a two-word packet.

## Modules

| module | what it is |
|---|---|
| `trk_pkg` | sizes, command codes, register and header structs |
| `serial_cmd_rx`, `serial_cmd_tx` | frame receiver and transmitter |
| `sync_fifo` | show-ahead FIFO (FE event FIFO, ToT FIFO) |
| `fe_trigger` | masked 64-input OR and the two neighbour ORs |
| `fe_out_shreg` | FE output register, 65 or 1 bit long |
| `fe_chip` | FE digital part: two receivers, control register, hit latch, FIFO, output register, calibration strobe |
| `fe_analog_model` | behavioural amplifier/discriminator model (not synthesizable logic in the real chip) |
| `trig_gate` | trigger synchroniser and edge detector |
| `tot_counter` | time-over-threshold measurement and 1.6 µs timeout |
| `hit_counter` | FE stream decoder, hit-address writer, truncation |
| `event_buffer` | one of the two event buffers |
| `io_control` | packet sender, token handling, data forwarding |
| `ctrl_cmd_decode` | controller commands, control register, FE command and clock sequencing |
| `controller_chip` | the controller, all of the above wired together |
| `tracker_layer` | 25 FE chips + analog models + two controllers |
| `tracker_tower` | 16 layers; commands bussed, trigger/ack per layer, token/data chained |

`tracker_tower` parameters are `N_LAYERS = 16` and `N_FE = 25`. The tower
controller is not part of the design; its lines are the top's ports. The
analog input is an 8-bit pulse height per channel (`amp`). In the model a
channel fires while `amp` exceeds the threshold DAC. During a calibration
strobe, masked-in channels get `cal_dac` added.

## What comes from the architecture and what was chosen here

These follow the architecture:
- the layer structure and redundancy;
- the chip counts;
- the 207-bit FE and 10-bit controller register contents;
- the command lists;
- the frame layout;
- the 1/65-bit chip records;
- the packet layout;
- 8 FE buffers and 2 controller buffers;
- the 1.6 µs ToT limit;
- truncation on a new read event;
- the token chain.

These were chosen here:
- command code numbers and field order inside the registers;
- bit order (MSB first) and the broadcast address 31;
- reset values: FE masks all on, threshold 32, readout to the left;
  controller reads 25 chips, options off;
- the 32-clock hit-latch window in the FE chip;
- clear event drops the oldest FE/ToT entry;
- hit address numbering and the right side's reversed count;
- XOR check-sum;
- control-register packet contents;
- read-event stall;
- calibration strobe length, 8 clocks.

Known departures and gaps:
- **63, not 64.** The source asks for truncation at 64 hits per layer, but
  its 6-bit hit count cannot say 64. This design keeps the 6-bit field and
  stores at most 63.
- **x-y coincidence.** This control bit is stored but does nothing. What
  the coincidence would be taken with is not defined.
- **FE register read-back.** There is no read-back of the FE control
  register. The FE chip has a control-register output, but how it is read
  is not described.
- **Not modelled.** Differential line drivers and receivers, cables,
  hybrids and the tower controller are not modelled. The FE clock is a
  clock enable rather than a gated clock.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M`, and it stops itself through a watchdog if
something hangs. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_controller_chip \
    -y rtl -y tb +libext+.sv -Irtl rtl/trk_pkg.sv tb/tb_controller_chip.sv
./obj_dir/Vtb_controller_chip
```

The same command works for any `tb_*` module; the package must be named
first. Helper modules in `tb/` are found through `-y tb`:

- `cc_cmd_drv` sends commands;
- `pkt_mon` decodes and checks packets;
- `fe_cmd_mon` decodes FE frames.

Notable testbenches:

- **`tb_tracker_tower`** — three layers of four chips with the layer split
  between the two controllers. It runs random events through many rounds
  and counts each mechanism, failing if one never occurs:
  - trigger and ToT;
  - ToT timeout;
  - acknowledge without local trigger;
  - split readout;
  - calibration;
  - forwarding;
  - token waiting;
  - stall;
  - both kinds of truncation;
  - check-sum;
  - control-register packets;
  - clear, FE clock and reset.
- **`tb_tracker_tower_full`** — the top at its default size: 16 layers ×
  25 chips × 64 channels. It configures every layer with a 12/13 split,
  puts a random event in every layer, acknowledges and reads it, and
  checks all 32 packets hit by hit. It takes about two minutes with
  Verilator.
- **`tb_tracker_layer`** — a full 25-chip layer, including calibration.
- **`tb_layer_buffering`** — a full 25-chip layer.
  - It acknowledges eight triggers before any readout; a ninth is lost in
    every FIFO alike.
  - It then reads the eight events back in order, with their ToT values.
  - One event has 80 hits and must come out truncated at 63.
- **`tb_tower_31_layers`** — the largest chain the 5-bit layer address
  allows: 31 layers of 2 chips.
  - A command to one layer reaches only that layer.
  - One token per side returns 31 packets in order.

The simulator is two-state. Every register that is read has a reset.

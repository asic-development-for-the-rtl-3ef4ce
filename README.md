# GLAST tracker tower readout in SystemVerilog

A GLAST tracker tower is a stack of silicon-strip detector layers. Each layer
has 1600 strips read by 25 front-end chips of 64 channels (GTFE64). A readout
controller chip (GTRC) sits at each end of the row of chips. The front-end
chips amplify and discriminate every strip and keep up to eight triggered hit
patterns each. Together they form one 1600-bit shift register that either
controller can clock out, and that register skips chips with no hits. Any
chip can be pointed toward either end, so one dead chip costs only its own
64 strips. The controllers turn the serial hit stream into lists of hit-strip
addresses and measure how long each layer's fast trigger (Fast-OR) stays
high. They then pass the events down the tower, one layer after another,
under a token.

This RTL models that readout: the digital logic of both chips, behavioural
models of the analog channel and DACs, and a tower top that connects
`NUM_LAYERS` layers (16 by default) of `NUM_FE` chips (25 by default). A
20 MHz clock is assumed throughout.

## Tower and layer structure

`glast_tower` instantiates `NUM_LAYERS` copies of `glast_layer`. A layer is
`NUM_FE` `gtfe64` chips between two `gtrc` controllers.

- **Columns.** The left controllers of all layers form one column and the
  right controllers form another. Within a column, the tower's command line
  (`cmd_in[s]`) and trigger-acknowledge line (`tack_in[s]`) go to every
  layer. A command therefore reaches the same chip position in every layer.
- **Data chain.** Chip *i*'s left output feeds chip *i−1*'s left input, and
  chip *i*'s right output feeds chip *i+1*'s right input. The chips at the
  ends connect to the controllers, and the unused inputs at the far ends are
  tied low.
- **Fast-OR chain.** Built the same way as the data chain. A chip's trigger
  output toward a side is its own masked OR combined with whatever arrives
  from the other side: `to_left = left_en & (local | from_right)`.
- **Readout direction.** Each chip's `read_right` control bit picks the output
  register it loads. The chips are split at any point, with those left of the
  split read by the left controller and the rest by the right one. Each
  controller is told how many chips it reads (`nchips`). A dead chip is
  skipped by pointing the chips on each side of it away from it.

## Front-end chip (GTFE64)

Per channel, the charge (in units of 0.01 fC) is compared with the threshold
(`gtfe_analog_fe`, a behavioural model). The model uses a gain of 125 mV/fC
and fires when `q·125/100 > threshold_mV`. The discriminator outputs go two
ways:

- **Trigger path.** Trigger mask → 64-input OR → the two 2-input ORs of the
  Fast-OR chain.
- **Data path.** On a trigger acknowledge, the discriminator outputs pass
  through the data mask into an 8-deep FIFO (`sync_fifo`, first-word
  fall-through). If the FIFO is full, the event is dropped.

The chip also has two `gtfe_dac` models, each a 6-bit code plus a range bit
(6 mV or 24 mV per step). One sets the threshold. The other sets the
calibration level, which injects `mV·42/10` (a 42 fF capacitor) into the
channels in the calibration mask for 20 clocks after a calibration strobe.

### Command frames

Each chip has two decoders (`gtfe_cmd_decoder`). Decoder A listens to the left
controller and decoder B to the right one. A frame is sent MSB first on a line
that idles at 0:

```
1 | code[2:0] | address[4:0] | (code 001 only) 210 control-register bits
```

Address 1F selects every chip. The codes are:

| Code | Command |
|------|---------|
| 000 | no-op |
| 001 | load control register |
| 010 | read-event |
| 011 | calibration strobe |
| 100 | clear first event from FIFO |
| 101 | reset chip (FIFO and control register) |
| 110 | reset FIFO |
| 111 | end-read-event |

Either decoder may load the control register. Every other command, and the
trigger acknowledge, is taken only from the side that the control register's
`dec_sel` bit selects.

### Control register

`gtfe_ctrl_reg` is a 210-bit serial register, filled MSB first. Its MSB is
the read-back output (`ctrl_reg_out`), so loading a new value shifts the old
one out. The layout (`ctrl_reg_t` in `glast_pkg`), first bit sent first:

| Field | Bits | Meaning |
|---|---|---|
| `dec_sel` | 1 | 0 = decoder A (left), 1 = decoder B (right) |
| `read_right` | 1 | 0 = shift data left, 1 = shift data right |
| `trig_left_en`, `trig_right_en` | 1 + 1 | drive the Fast-OR toward each side |
| `thr_dac`, `cal_dac` | 7 + 7 | `{range, code[5:0]}` |
| `cal_mask`, `data_mask`, `trig_mask` | 64 × 3 | bit *n* = channel *n*; 1 enables the channel |

### Output shift register and empty-chip bypass

The output register is `gtfe_out_shift`, with one copy per direction.
Read-event copies the oldest FIFO entry into the register of the selected
direction. From then on the chain shifts one place per clock until
end-read-event.

Each chip first presents a flag bit: 1 if its event has any hit. A chip with
hits then presents its 64 channel bits, channel 0 first. A chip with no hits
presents only its 0 flag and then acts as a single flip-flop that passes its
neighbours' data through. A controller reading *n* chips, *h* of which have
hits, therefore reads `n + 64·h` bits.

Timing: a command's last address bit is sampled at edge E, and the chip acts
at E+1. After read-event, the first flag is on the data line from E+1, and
the chain shifts from E+2.

## Readout controller (GTRC)

`gtrc` follows the controller block diagram: a gate, a TOT counter and a TOT
FIFO, global control and command decoding, a hit counter, two event buffers,
and I/O control.

### Command forwarding and the readout sequence

`gtrc_control` passes tower commands and trigger acknowledges to its chips,
each through one flip-flop. It counts the acknowledged triggers that have not
yet been read. It starts a readout once all three hold: an event is waiting,
an event buffer is free, and no tower command frame is in progress. The
readout runs by itself:

1. Send read-event to address 1F.
2. Start the hit counter on the edge that samples the first flag (`READ_LAT`
   = 2, so 3 edges after the last command bit is driven).
3. Wait until the hit counter has seen `nchips` flags.
4. Send end-read-event, then clear-first-event.
5. Commit the event buffer, with the oldest TOT from the TOT FIFO (0 if the
   FIFO is empty), and switch to the other buffer.

`busy` is high while events are waiting or being read. **The tower
electronics must not send commands while `busy` is high.** Bits that arrive
during a readout are dropped. One readout takes 9 + 3 + (*n* + 64*h*) + 18 + a few
clocks. A layer whose 25 chips are all hit takes 1658 clocks (82.9 µs), which
is within the 100 µs between triggers at 10 kHz. Triggers that arrive during
a readout wait in the 8-deep chip FIFOs, so dead time only begins when eight
are pending.

### Hit counter and event buffers

`gtrc_hit_counter` turns the stream into strip addresses, `chip·64 +
channel`. Here `chip` is counted from the left end of the layer: the right
controller's *k*-th chip is `NUM_FE−1−k`. Addresses are 11 bits (0–1599).

There are two `gtrc_event_buffer`s, each holding up to 64 addresses, a 7-bit
count, the TOT and an overflow flag. Hits beyond 64 are dropped and set the
overflow flag. One buffer can be filled while the other waits to be sent.

### Trigger gate and time over threshold

`gtrc_tot` passes the layer's Fast-OR to `trig_out` when `trig_en` is set. It
counts the high time of the gated trigger in clocks, starting at 1 and
saturating at 255. It reports the count one clock after the falling edge, and
the count goes into an 8-deep TOT FIFO (`sync_fifo`).

### Token protocol and event record

`gtrc_io_control` works as follows:

- A one-clock pulse on `token_in` from the layer below (nearer the tower
  electronics) lets the controller send its oldest complete event. If no
  event is ready, it waits for one.
- After sending, it frees the buffer and pulses `token_out` to the layer
  above.
- Records from the layer above arrive on `data_in` and are forwarded through
  one flip-flop. The two sources never overlap, so `data_out` is their OR.
- One token pulse sent up a column collects one event from each layer, layer
  0 first. It returns on `token_done`.

Record, MSB first, one bit per clock; the line idles at 0:

```
1 | layer[3:0] | count[6:0] | overflow | tot[7:0] | count × addr[10:0]
```

The header is 21 bits, so a record is `21 + 11·count` clocks long.

## Departures from the source description, and choices made here

- **Layer count.** The tower diagram shows "2 of 16 layers", and the top
  follows that with `NUM_LAYERS = 16`. The quoted total of 1.3 million channels
  in a 5×5 array of towers, however, implies 32 readout planes of 1600 strips
  per tower, which is two per x,y layer pair. For that configuration, set
  `NUM_LAYERS = 32` and widen `LAYER_W` in `glast_pkg` to 5.
- **Choices of this design:**
  - the command bit order;
  - the control-register layout and mask polarity;
  - the flag-based bypass encoding;
  - the controller's readout sequence and timing;
  - the event-buffer depth and overflow rule;
  - the TOT units;
  - the record format and the token pulse.

  The source names the controller's functions but not these details. The
  controller's own configuration (`nchips`, `trig_en`, layer id) is on pins,
  because no controller command set is defined.
- **Decoder implementation.** Each decoder is a three-state machine with a
  bit counter, not the original chip's 11-bit hand-designed state machine.
  Its behaviour at the frame level is the same.
- **Test pads.** The chip's test pads are not modelled. This includes the
  external calibration pulse input, which backs up the internal strobe. The
  reset pin is modelled, as the asynchronous `rst_n`.
- **Clock.** One clock is shared. The separate left and right clock inputs
  of the chip are not modelled.
- **Analog behaviour.** The analog models are ideal: there is no pulse
  shaping, peaking time, noise or threshold spread. A discriminator follows
  its input charge in the same clock.
- **Physical parts not modelled.** Differential drivers and receivers, N-well
  resistors, pads, hybrids, flex circuits, cables and the tower electronics
  have no RTL. Their signals appear as plain single-ended ports.

## Files

- `rtl/glast_pkg.sv`: shared constants, command codes, and the control
  register struct.
- Front-end chip: `gtfe64` with `gtfe_cmd_decoder`, `gtfe_ctrl_reg`,
  `gtfe_out_shift`, `gtfe_fast_or`, `sync_fifo`, `gtfe_analog_fe` and
  `gtfe_dac`.
- Controller: `gtrc` with `gtrc_control`, `gtrc_hit_counter`,
  `gtrc_event_buffer`, `gtrc_io_control`, `gtrc_tot` and `sync_fifo`.
- Structure: `glast_layer` and `glast_tower` (the top).

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` at the end.

- `tb_glast_tower` runs a 3-layer, 5-chip tower through these cases, and
  checks every record against a reference model:
  - split and dead-chip readout;
  - FIFO stacking;
  - buffer stalls;
  - overflow;
  - calibration;
  - closed trigger gates.
- `tb_glast_tower_full` runs the default 16 × 25 tower. It includes the
  worst-case full-layer readout time check.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl rtl/glast_pkg.sv \
    tb/tb_glast_tower.sv --top-module tb_glast_tower -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one. The full-size tower
testbench takes about two minutes to build and half a minute to run.

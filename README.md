# Drift-chamber front-end readout with feature extraction in the readout FPGA

This is SystemVerilog RTL for the readout of one Front End Assembly (FEA) of
the BABAR drift chamber, in the upgraded form. In that form the readout
board's FPGA does the feature extraction (FEX) itself. Before the upgrade,
every hit wire sent its full 32-byte waveform off the detector, and software
in the readout modules reduced it there. With more triggers and more
background, that data volume became the readout bottleneck.

Here the FPGA turns each waveform into a few 16-bit words: a status word, a
charge and a list of TDC hits. Channels without a TDC hit are dropped. The
words can also be Huffman-coded byte by byte. The reduced data then flows
over the same 2-bit, 30 MHz link as before.

The same FPGA also holds the rest of the readout board:

* the readout controllers for the digitizer chips;
* the command decoder;
* the trigger-data serializer;
* a JTAG programmer, so new firmware can be uploaded into a second PROM;
* a continuous check of the FPGA's configuration for radiation upsets.

Some small parts on the board are modelled as well: the latch that picks the
PROM and the reset IC.

```
 per channel:  FADC/TDC ──► ELEFANT chip (8 ch) ──8-bit bus──► ADB unit ──┐
 (analog,       latency buffer 180 samples       readout ctrl            │
  not here)     4 event buffers, SRAM2           FEX engine ─► FEX RAM   │ x3 ADBs
                trigger byte ─┐                  wf assembler ─► Wf RAM  │ (2 chips each)
                              │                  chip headers ─► Hdr RAM │
                              │                  4 event slots           │
                              ▼                                          ▼
                  trigger_interface ──1 bit 60 MHz──►        data_mux (round robin per chip,
                                                              padding) ─► data_encoder
 commands ──► command_decoder ──► settings, constants RAM,     ──2 bit 30 MHz──► link
                                  encoding table, chunk RAM
              prom_programmer ──JTAG──► upload PROM
              config_check ◄── read-back / PROM streams  ──► status bit in every chip header
              image_select + reset_ic (board) ──► PROG, PROM select
```

## Clocking and rates

Everything runs on a single clock, `clk`. At 60 MHz, the strobes that the
top level divides from it give the system's rates:

* samples are taken at 15 MHz (`SAMP_DIV = 4`);
* the chip readout bus moves one byte per 15 MHz strobe (`BUS_DIV = 4`);
* the output link moves one 2-bit symbol per 30 MHz strobe (`OUT_DIV = 2`);
* the trigger link sends one bit per clock.

All registers use an asynchronous active-low reset, `rst_n`. The only
exception is `reset_ic`, which models a power-on part and has no reset.

## The ELEFANT digitizer chip (`elefant_chip`)

Each chip serves eight channels. At every sample, an input multiplexer
chooses what each channel stores:

* the TDC word, if the discriminator fired. Bit 7 is set, and bits 6:0 hold
  the fine time.
* the FADC byte otherwise, clipped to 0..127 with bit 7 clear.

This encoding is how the rest of the design tells a TDC hit from an
amplitude. The eight bytes form one row of a circular latency buffer of 180
rows, which is 12 µs at 15 MHz.

A trigger copies a 32-row window from the latency buffer into a free event
buffer, out of four. The window starts `LATENCY` = 160 samples back, and the
copy takes one row per clock. The trigger also stores a 24-bit SRAM2 word,
`{hit mask, ancillary[15:0]}`. The hit mask marks the enabled channels that
had a TDC word in the window.

On `rd_start_i` the oldest event leaves on the 8-bit bus, one byte per bus
strobe:

1. the three SRAM2 bytes;
2. channel 0 samples 0..31, then channel 1, and so on up to channel 7.

That is 259 bytes in all. While a chip is not sending, its `dout_o` is zero,
so chips on one board share the bus through an OR.

A trigger that finds all four buffers full, or a copy still running, is not
stored. `trig_ready_o` says in advance whether a trigger would be stored.
The top level uses it to send a trigger to all chips or to none
(`trig_lost_o`). Without that, one chip could drop an event that its
neighbour kept, and the event streams of the two chips would no longer
match.

## Event buffering on the readout board (`adb_unit`, `adb_readout_ctrl`, `adb_buffer`)

Each amplifier/digitizer board (ADB) gets an `adb_unit`. Its readout
controller takes one event from chip 0 and then chip 1, and sends the bytes
to three places:

* the header bytes go to the Chip Header RAM;
* each sample byte goes to the FEX engine;
* each sample byte also goes to the waveform path. `waveform_assembler`
  packs it into 16-bit words, after `half_sampler` in half-sampling mode.

The buffer (`adb_buffer`) has four event slots, the same depth as the chips'
event buffers. Each slot holds, per chip, a FEX region of up to 272 words, a
waveform region of 128 words and two header words.

The controller starts the next event as soon as the previous one is
committed and a slot is free. It does not wait for the output to drain. This
is the point of the block: in the old system the boards' buffers held one
event, and every board waited for the slowest one. When all four slots are
full, the controller waits, and `adb_stalled_o` shows it.

## Feature extraction (`fex_engine`)

This is the core of the data reduction. Per channel, from 32 samples:

1. **Scan.** List the TDC words. The first one is the *leading edge* `lead`.
   A channel with no TDC word produces no output.
2. **Integrate.** Add up the samples from `lead` to sample 31. In the sum, a
   TDC sample has no amplitude of its own, so it is replaced by an
   interpolated value:
   * the mean of its left and right neighbours, if both are FADC samples;
   * the one neighbour that is an FADC sample, if only one is;
   * otherwise, the last FADC value seen.

   FADC samples at full scale (127) count as saturated (`nsat`).
3. **Correct.** With `n` the number of summed samples:

       charge = clamp( ((sum − n·(ped + drift) + nsat·sat_corr) · gain) >> 8 , 0, 65535 )

   * `ped` is the channel's pedestal and `gain` is its gain in 8.8 fixed
     point. Both come from `fex_const_ram`, one entry per channel, addressed
     `{adb, chip, channel}`.
   * `drift` is a global pedestal drift (signed 8 bits), and `sat_corr` is a
     global correction per saturated sample. The host sets both.
4. **Emit** these words:
   * the status word `{sat, ch[2:0], ntdc[5:0], lead[4:0], 1}`;
   * the charge;
   * one word `{4'b0, sample[4:0], fine[6:0]}` per TDC hit.

A whole channel is captured into one of two buffers while the other one is
processed. Processing takes at most 2·32 + ntdc + 4 clocks. That is less than
the 128 clocks the next channel needs to arrive at 15 MHz, so the engine
never stalls the bus. If it ever fell behind, `overrun` would show it.

The algorithm's steps are those of the original software. The exact formula,
the interpolation rule, the integration window (to the end of the waveform)
and the word layouts are this implementation's own. Change them in
`fex_engine.sv`, and change the reference model in `tb/tb_fex_engine.sv` and
`tb/tb_fea_top.sv` to match.

## Output stream (`data_mux`, `data_encoder`)

The multiplexer sends one *chip block* at a time. After each block it moves
on to the next ADB that has data, in round-robin order, so ADBs interleave
chip by chip. A block is made of:

| word | contents |
|------|----------|
| H0 | `{4'hC, seu_flag, mode[1:0], adb[1:0], chip[1:0], 5'b0}` |
| H1 | ancillary data = `{adb, chip, trigger number[11:0]}` |
| H2 | `{hit mask, 8'h00}` |
| H3 | number of body words |
| body | FEX words (mode 0), waveform words (mode 1 full, mode 2 half-sampled) |

When no buffer has data, a padding word is sent, so the link never starves.

The encoder turns each word into a frame, sent MSB first, two bits per
30 MHz strobe:

* raw: `10` followed by the 16 bits;
* coded: `11` followed by the codes of the high and the low byte, then one
  `0` if needed to make the length even;
* padding: `00`. The link also carries `00` when idle.

The codes come from a 256-entry table RAM, with entries `{len−1[3:0],
code[15:0]}` and the code right-aligned. To get decodable frames, load a
prefix-free (Huffman) code into the table.

## Trigger link (`trigger_interface`)

Each chip puts out a trigger byte every sample: bit c is set when channel c's
sample is a TDC word. The interface ORs the bytes of all six chips over a
64-clock period. It then sends a start bit `1`, followed by the six bytes,
MSB first, on the 1-bit link.

## Commands (`command_decoder`)

A command is `{cmd_op, cmd_addr[15:0], cmd_data[23:0]}`, valid for one
clock. The opcodes are in `dch_pkg::cmd_op_e`:

| op | name | action |
|----|------|--------|
| 1 | `CMD_L1` | level-1 trigger |
| 2 | `CMD_MODE` | data[1:0] readout mode, data[2] Huffman on; change only with buffers empty |
| 3 | `CMD_GLOBAL` | data[7:0] drift, data[15:8] saturation correction |
| 4 / 5 | `CMD_CONST_WR` / `CMD_CONST_RD` | write / read back `{gain, ped}` of channel `addr` |
| 6 | `CMD_ENC_WR` | table entry `addr[7:0]`; with addr[15] set, read it back instead |
| 7 | `CMD_CHUNK_WR` | word `addr` of the programmer's chunk RAM |
| 8 | `CMD_PROG_START` | run the chunk |
| 9 | `CMD_STATUS_RD` | `{error, done, busy, 0, TAP state[3:0], upset count[15:0]}` |
| A | `CMD_IMG_SEL` | SEL = data[0], then LE high for 4 clocks |
| B | `CMD_RELOAD` | raise RELOAD (the FPGA is reconfigured) |
| C | `CMD_CHEN` | hit-mask channel enable |
| D | `CMD_SEU_CLR` | clear the upset counter and flag |

Read-backs appear on `rd_valid`/`rd_data` two clocks after the command.

## Firmware upload and image switch (`prom_programmer`, `image_select`, `reset_ic`)

New firmware is written as SVF, converted off-line into binary chunks, and
sent down as commands into the chunk RAM, which holds 1024 words. The
programmer then replays the chunk on the JTAG port of the second PROM. Chunk
format:

    opcode word  {op[3:0], end_state[3:0], has_tdo, has_mask, 6'b0}
    op 1 SIR / 2 SDR : length in bits, then ceil(len/16) TDI words,
                       [expected-TDO words], [mask words]; bit i = word i/16, bit i%16
    op 3 STATE       : go to end_state
    op 4 RUNTEST     : count word; count TCKs in Run-Test/Idle, then go to end_state
    op 0             : end of chunk

The end state folds in the SVF ENDIR/ENDDR setting. The programmer follows
the 16-state TAP controller (`dch_pkg::tap_state_e`, `tap_next`). It moves
between states on the shortest path (`tap_step_tms`) and compares TDO under
the mask. On a mismatch it stops with `error` set. The host polls the status
and decides whether to send the next chunk or start over. One TCK period is
4 clocks, plus a few clocks of decoding between bits.

The board logic works as follows:

* `prog_req` = RST or RELOAD. It drives `reset_ic`, which holds PROG low for
  100 ms (6,000,000 clocks at 60 MHz) after the request ends, and also at
  power-up.
* A transparent latch selects the PROM. It is enabled by LE or RST, and its
  input is SEL forced low by RST.
* So a reset always comes back to PROM 0, the stable image.
* SEL, then LE, selects PROM 1, and a following RELOAD loads the new image.

`image_select` is a real level-sensitive latch on purpose, because the board
uses a D latch.

## Configuration upset check (`config_check`)

Two bit streams arrive together:

* the configuration read back from the FPGA;
* the original configuration from the PROM.

They are compared bit for bit, and each also goes through a CRC-16-CCITT, in
frames of 1024 bits. A frame where either test differs counts one upset.
`seu_count` increments, and the sticky `seu_flag` appears in every chip
header (H0 bit 11) until it is cleared. The logic that reads the two streams
out of the FPGA and the PROM depends on the FPGA family and is not included.
The streams are ports of the top level.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `fea_top` | `NADB`, `NCHIP` | 3, 2 | ADBs, chips per ADB |
| | `LB_DEPTH`, `LATENCY` | 180, 160 | latency buffer rows, trigger latency (samples) |
| | `SAMP_DIV`, `BUS_DIV`, `OUT_DIV` | 4, 4, 2 | strobe dividers of `clk` |
| | `TRIG_PERIOD` | 64 | trigger-link frame period (≥ 1 + 8·chips) |
| | `CHUNK_WORDS`, `FRAME_BITS` | 1024, 1024 | chunk RAM size, upset-check frame |
| | `RESET_HOLD` | 6,000,000 | PROG hold in clocks |
| `adb_unit` | `NSLOT` | 4 | event slots per ADB |

Sizes that come from the readout system itself:

* eight channels per chip;
* 32 samples per trigger;
* four event buffers;
* three ADBs with two chips each;
* a 12 µs latency buffer;
* the link widths and rates;
* the 100 ms PROG hold.

Everything else is a choice of this implementation:

* the latency of 160;
* the word and frame formats;
* the command encoding;
* the CRC;
* the chunk format;
* the trigger-link frame.

## Where this design departs from the original system

The original system is described only at the level of blocks, rates and
algorithm steps. The points below are where this RTL makes a choice or
departs from that description. Weigh them before you trust the design for a
particular use.

* **ADB bus rate.** The original chips fed the readout board over an 8-bit
  bus at 7.5 MHz. The upgraded readout is described as three 15 MHz ADB
  readouts, and this design follows the upgrade: one byte per 15 MHz strobe.
  The bus rate is set by the parameter `BUS_DIV`.
* **Event read.** The old system started the chip readout with a separate
  event-read command. Here it starts on its own, as soon as a chip holds an
  event and the ADB buffer has a free slot. This is the "start sooner"
  behaviour that the deeper buffers exist for.
* **Trigger acceptance.** A trigger goes to all chips or to none
  (`trig_lost_o`). The original chips drop a trigger individually when their
  four buffers are full.
* **Trigger link.** One byte per chip per 15 MHz sample, for six chips, is
  720 Mb/s, far more than one 60 MHz serial line. This design sends one
  frame of 49 bits every 64 clocks, with the hit bytes ORed in between. The
  hit pattern therefore reaches the trigger at 1/16 of the sample rate. The
  original uses several links and its own frame format, which is not
  reproduced here. The chip's trigger byte is taken from the TDC hit flags
  only.
* **Feature extraction details.** The status-word layout, the interpolation
  rule, the integration window, the 8-bit pedestal and 8.8 gain, and the
  saturation threshold (full scale) are all this design's own. The original
  is only known to list TDC hits, take the first as the leading edge,
  integrate from it with interpolation over TDC samples, correct for
  saturation and pedestal drift, and apply a gain.
* **Formats.** These are all this design's own:
  * the chip header;
  * the link frames, including padding;
  * the encoding-table entry;
  * the command opcodes;
  * the SVF chunk format;
  * the ancillary data;
  * the CRC.

  None of them is compatible with the original readout software.
* **Commands left out.** The original command set also configures the
  amplifier and digitizer chips and controls calibration. Those commands are
  not implemented, because their contents are not known.
* **Configuration read-back.** The upset check compares two bit streams that
  arrive as inputs. Driving the FPGA's JTAG read-back and the PROM's serial
  line to produce those streams is not included. Redundancy schemes (dual or
  triple modular redundancy, scrubbing) are not included either.
* **Reset IC.** It is built as a counter on the system clock. It holds PROG
  for exactly `RESET_HOLD` clocks, where the real part holds it for at least
  100 ms.

## What is not here

These parts are not modelled. Their signals are ports of `fea_top`.

* The analog parts: the amplifier/shaper chips, and the FADC and TDC inside
  the ELEFANT. The top takes their digitized outputs.
* The flash PROMs.
* The data and trigger I/O modules that carry the links off the detector, and
  the readout modules that receive them.
* The high-voltage distribution.

## Simulating

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/dch_pkg.sv rtl/*.sv tb/tb_fea_top.sv \
              --top-module tb_fea_top -Mdir obj && obj/Vtb_fea_top

`tb_fea_top` runs the whole FEA at the default sizes. It sets up:

* a repeating pulse with TDC hits on every channel, with one dead channel;
* the constants, the global corrections and a prefix-free table.

It then triggers events in four phases:

1. FEX records with raw framing;
2. FEX records with Huffman coding;
3. a burst of full waveforms that fills every buffer, so readout stalls and
   triggers are lost;
4. half-sampled waveforms after an injected configuration upset.

It decodes the 2-bit link and compares every chip block with a reference
built from the stimulus. It also runs a JTAG chunk and the image switch and
reload, including the 100 ms PROG hold. It counts these mechanisms and
requires each to happen: padding, round-robin switching between ADBs, all
three modes, coded frames, dropped channels, stalls, lost triggers, the
upset bit, and trigger-link frames. It checks that no FEX engine ever falls
behind the 15 MHz byte stream (`fex_overrun_o`). It also measures the link bits per chip
block in each mode, and requires two reductions against full waveforms: about
2× for half sampling and at least 4× for FEX. On its stimulus these are 1.94×
and 5.7×. It takes about half a minute.

The per-block testbenches (`tb_<module>`) compare each block with values
computed in the testbench. `tb_fex_engine` and `tb_fea_top` contain an
independent model of the feature extraction. `tb_prom_programmer` contains a
behavioural TAP with an ID register.

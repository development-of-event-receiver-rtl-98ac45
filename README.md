# Event receiver: receive path for an event timing link

An accelerator timing system can send its timing as a stream of *events*.
An event generator sends one 16-bit frame on every cycle of the event clock
(114.24 MHz, the 2856 MHz RF divided by 25, in the system this was written
for). The frames are 8b10b-encoded, so the serial link runs at 2.28 Gb/s. Each
frame has two bytes:

| byte | carries |
|------|---------|
| first  | an event code (or the K28.5 comma when it is used for synchronisation) |
| second | distributed bus bits and data buffer bytes, in alternate frames |

An event receiver recovers the clock, finds the frame boundaries and splits the
stream into three outputs: event codes, an 8-bit distributed bus, and a *data
buffer*. The data buffer is a block of up to 2 Kbytes that the generator sends
one byte per two frames. It is framed by two control characters: K28.2 (0x5C)
starts it and K28.1 (0x3C) ends it.

This RTL is the receive logic behind the serial transceiver. The transceiver
(a multi-gigabit transceiver of the FPGA, with its 8b10b decoder) and the
reference-clock synthesizer are outside it. The transceiver hands over two
decoded bytes per event clock, each with a flag that says whether it is a K
(control) character.

```
 transceiver           evr_top
 rx_data[15:0]  +-------------+   +-------------- event_stream_decoder -----------+
 rx_charisk[1:0]| comma_align |-->| sync_fifo --> split --> event_valid/event_code |
 ------------->|  (K28.5)    |   |                     --> dbus/dbus_update       |
                +-------------+   |                     --> data buffer bytes ---+ |
                                  +-----------------------------------------------|-+
                                  +------------- data_buffer_decoder -------------v-+
                                  | sync_fifo --> K28.2 ... K28.1 --> dbuf_ram (2 KB)|
                                  +-------------------------------- rd_clk/rd_addr --+
```

All logic runs on the event clock `clk` except the read port of the buffer
RAM, which has its own clock `rd_clk` for the processor side.

## Finding the frames: `comma_align`

The transceiver delivers 16-bit words, first received byte in `[7:0]`, but it
does not know where a frame starts. A frame may begin in the low byte
(aligned) or in the high byte, in which case each frame is split across two
consecutive words.

The generator puts a K28.5 comma (0xBC) in the event byte regularly (every
fourth frame on the link this was written for). `comma_align` watches both
byte lanes:

* comma in the low byte: frames are aligned, `byte_offset = 0`, a frame is the
  current word;
* comma in the high byte: `byte_offset = 1`, a frame is the saved high byte of
  the previous word plus the low byte of the current word.

The frame built in the clock the alignment moves to the high byte mixes two
frames and is dropped. Frames that arrive misaligned before the next comma are
passed on as they are (they cannot be recognised as wrong).

`synced` rises on the first comma and falls after `SYNC_TIMEOUT` (256) words
without one. Only frames received while synced are passed on. The timeout is
well above the comma interval so that an event code sent in a comma slot now
and then does not drop the link.

One register stage: the frame completed by the word at edge *n* is on `frame`
after edge *n*.

## Splitting the frame: `event_stream_decoder`

The aligned frames go through a FIFO (block RAM) and are read one per clock.
For each frame:

* **Event code.** The first byte is an event when it is not a K character and
  not the null code 0x00. `event_valid` strobes for one clock with
  `event_code`.
* **Distributed bus or data buffer.** Which frames carry which is decided by
  counting frames from the last frame that carried K28.5 in its event byte.
  That frame and every second frame after it carry bus bits: `dbus` is loaded
  and `dbus_update` strobes (a K character in that slot leaves `dbus`
  unchanged). The frames in between carry the data buffer channel: the byte and
  its K flag go to the data buffer decoder.

Restarting the count at every comma means a lost frame upsets the split only
until the next comma.

Latency: outputs appear three clocks after the frame enters (FIFO write, FIFO
read, output register).

## Collecting the data buffer: `data_buffer_decoder` and `dbuf_ram`

The data buffer channel bytes pass through a second FIFO into a two-state
machine:

* **idle:** everything is ignored until K28.2;
* **receive:** each data byte is written to `dbuf_ram` at addresses 0, 1, 2, ...;
  K28.1 ends the buffer, strobes `rx_done` and reports `rx_size`.

Rules for the corner cases:

* other K characters inside a buffer are skipped;
* a second K28.2 restarts the buffer at address 0;
* bytes past the RAM size (2048) are dropped and `rx_overflow` is set for
  that buffer;
* a finished buffer stays in the RAM until the next K28.2 starts to
  overwrite it.

`dbuf_ram` is a simple dual-port RAM: write port on the event clock, read
port on `rd_clk`, one clock of read latency. It maps onto block RAM. Software
should read a buffer after `dbuf_done` and before the next one starts. There is
no double buffering.

A byte reaches the RAM three clocks after it leaves the event stream decoder.
`rx_done` comes three clocks after the K28.1 byte.

## Top level: `evr_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | event clock recovered by the transceiver |
| `rst` | in | 1 | synchronous reset, active high |
| `rx_data` | in | 16 | decoded bytes, first byte in `[7:0]` |
| `rx_charisk` | in | 2 | K flag per byte |
| `link_synced` | out | 1 | comma alignment locked |
| `link_offset` | out | 1 | frames straddle two words |
| `link_comma` | out | 1 | frame with K28.5 received |
| `event_valid`, `event_code` | out | 1, 8 | event strobe and code |
| `dbus`, `dbus_update` | out | 8, 1 | distributed bus and its load strobe |
| `dbuf_busy` | out | 1 | data buffer being received |
| `dbuf_done` | out | 1 | strobe: buffer complete |
| `dbuf_size` | out | 12 | bytes stored in the last buffer |
| `dbuf_overflow` | out | 1 | last buffer was longer than the RAM |
| `ev_fifo_overflow`, `db_fifo_overflow` | out | 1 | sticky FIFO overflow flags |
| `rd_clk`, `rd_addr`, `rd_data` | in, in, out | 1, 11, 8 | buffer RAM read port |

From transceiver word to event, bus or data buffer output: four event clocks.
The receiver takes one frame per clock with no back-pressure. Both FIFOs are
read on every clock they hold data, so they cannot overflow at the link rate.
The overflow flags are there to catch a misuse of the blocks.

Parameters of `evr_top`:

| parameter | default | meaning |
|-----------|---------|---------|
| `DBUF_BYTES` | 2048 | buffer RAM size, the largest data buffer of the link |
| `EV_FIFO_DEPTH` | 16 | frame FIFO depth |
| `DB_FIFO_DEPTH` | 16 | data buffer byte FIFO depth |
| `SYNC_TIMEOUT` | 256 | words without a comma before sync is lost |

Shared constants (K-character values, null event code) and the frame and byte
structs are in `evr_pkg`.

## What is fixed by the link and what is a choice of this RTL

These points are taken from the receiver's description:

* the frame layout: event code first, then bus bits and data buffer bytes in
  alternate frames;
* comma alignment on K28.5;
* a block-RAM FIFO in front of the splitter;
* a FIFO in front of the data buffer store;
* the data buffer framed by K28.2 (0x5C) and K28.1 (0x3C);
* a 2 KB dual-port block RAM;
* one event clock for both decoders.

These are choices of this RTL. Change them if your generator differs:

* **Byte order.** The first byte is in `[7:0]` of the transceiver word.
* **Bus/buffer phase.** The bus sits in the comma frame and every second
  frame after it. This is the least certain point. If your generator uses the
  opposite phase, invert `phase_cur` in `event_stream_decoder`.
* **Null event and K bytes.** Event code 0x00 is no event. A K character in
  the event or bus slot is ignored.
* **Sync rule.** The sync timeout and the dropping of the frame at a
  realignment.
* **Data buffer rules.** All the corner-case rules of the data buffer state
  machine, and its status outputs.
* **Sizes and reset.** The FIFO depths, the separate read clock of the RAM,
  and synchronous active-high reset.

Not included:

* the transceiver, its clocking and its 8b10b decoder;
* the reference clock synthesizer;
* the processor bus interface (the RAM read port is bare);
* timing outputs (pulse generators driven by events);
* data buffer checksums and segmented buffers of newer protocol versions.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/evr_pkg.sv tb/tb_evr_top.sv \
          --top-module tb_evr_top -o sim && ./obj_dir/sim
```

Replace `tb_evr_top` with any testbench below. The `-Irtl` lets Verilator find
the modules by file name.

| testbench | what it covers |
|-----------|----------------|
| `tb_evr_top` | whole receiver at default sizes. An event generator model sends random events, bus bytes and four data buffers (10, 37, 2048 and 2053 bytes), first aligned, then with a one-byte slip. Checks every event, bus byte and buffer byte (read back on a separate clock), the overflow cut at 2048, and loss of sync when commas stop. Counts each mechanism and fails if one never happened. |
| `tb_evr_single_buffer` | the basic operation: one event and a one-byte buffer holding 0x03 between K28.2 and K28.1 |
| `tb_comma_align` | lock latency, exact timeout, aligned / slipped / re-slipped streams |
| `tb_event_stream_decoder` | three-clock latency; random streams with irregular comma spacing against a reference model |
| `tb_data_buffer_decoder` | 64-byte RAM: empty, short, full, oversized and restarted buffers, stray K characters, `rx_done` latency |
| `tb_sync_fifo` | random traffic against a queue model, full/empty/level/overflow |
| `tb_dbuf_ram` | full write and read-back on two unrelated clocks |

The full-size test (`tb_evr_top`) simulates about 120 µs of link time in well
under a second.

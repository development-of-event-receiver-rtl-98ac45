// evr_top: receive logic of an event receiver for an event timing link.
//
// An event generator sends a continuous stream of 16-bit frames, one per
// event clock (114.24 MHz, the RF clock divided down, in the target system),
// 8b10b-encoded at 2.28 Gb/s. A multi-gigabit transceiver outside this
// module recovers the event clock, decodes 8b10b and hands over two bytes
// per clock with K-character flags. This module takes it from there:
//
//   comma_align           byte-aligns the words on the K28.5 comma
//   event_stream_decoder  FIFO, then splits each frame into event code,
//                         distributed bus bits and data buffer bytes
//   data_buffer_decoder   FIFO, then stores the bytes between K28.2 and
//                         K28.1 in a 2 KB dual-port RAM
//
// Everything runs on the event clock 'clk' except the RAM read port, which
// has its own clock for the processor side. The transceiver, the reference
// clock synthesizer and the processor are outside this module; their
// signals are the ports below.
//
// Latency from the transceiver word to the event/bus/data buffer outputs is
// four event clocks (alignment register, FIFO write, FIFO read, output
// register); a data buffer byte reaches the RAM three clocks later.
module evr_top
  import evr_pkg::*;
#(
  parameter int DBUF_BYTES    = 2048,
  parameter int EV_FIFO_DEPTH = 16,
  parameter int DB_FIFO_DEPTH = 16,
  parameter int SYNC_TIMEOUT  = 256
) (
  input  logic                          clk,          // event clock from the transceiver
  input  logic                          rst,
  input  logic [15:0]                   rx_data,      // decoded bytes, first byte in [7:0]
  input  logic [1:0]                    rx_charisk,   // K flag per byte
  // link status
  output logic                          link_synced,
  output logic                          link_offset,  // frames straddle two words
  output logic                          link_comma,   // K28.5 frame received
  output logic                          ev_fifo_overflow,
  // event code
  output logic                          event_valid,
  output logic [7:0]                    event_code,
  // distributed bus
  output logic [7:0]                    dbus,
  output logic                          dbus_update,
  // data buffer
  output logic                          dbuf_busy,
  output logic                          dbuf_done,
  output logic [$clog2(DBUF_BYTES):0]   dbuf_size,
  output logic                          dbuf_overflow,
  output logic                          db_fifo_overflow,
  input  logic                          rd_clk,
  input  logic [$clog2(DBUF_BYTES)-1:0] rd_addr,
  output logic [7:0]                    rd_data
);

  evr_frame_t frame;
  logic       frame_valid;
  logic       db_valid;
  evr_byte_t  db_byte;

  comma_align #(.SYNC_TIMEOUT(SYNC_TIMEOUT)) u_align (
    .clk         (clk),
    .rst         (rst),
    .rx_data     (rx_data),
    .rx_charisk  (rx_charisk),
    .frame       (frame),
    .frame_valid (frame_valid),
    .synced      (link_synced),
    .byte_offset (link_offset),
    .comma_seen  (link_comma)
  );

  event_stream_decoder #(.FIFO_DEPTH(EV_FIFO_DEPTH)) u_evdec (
    .clk              (clk),
    .rst              (rst),
    .frame_valid      (frame_valid),
    .frame            (frame),
    .event_valid      (event_valid),
    .event_code       (event_code),
    .dbus             (dbus),
    .dbus_update      (dbus_update),
    .db_valid         (db_valid),
    .db_byte          (db_byte),
    .ev_fifo_overflow (ev_fifo_overflow)
  );

  data_buffer_decoder #(.DBUF_BYTES(DBUF_BYTES), .FIFO_DEPTH(DB_FIFO_DEPTH)) u_dbdec (
    .clk              (clk),
    .rst              (rst),
    .in_valid         (db_valid),
    .in_byte          (db_byte),
    .rx_busy          (dbuf_busy),
    .rx_done          (dbuf_done),
    .rx_size          (dbuf_size),
    .rx_overflow      (dbuf_overflow),
    .db_fifo_overflow (db_fifo_overflow),
    .rd_clk           (rd_clk),
    .rd_addr          (rd_addr),
    .rd_data          (rd_data)
  );

endmodule

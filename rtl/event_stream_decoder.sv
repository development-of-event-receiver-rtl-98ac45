// event_stream_decoder: splits the received frames into event codes,
// distributed bus bits and data buffer bytes.
//
// Aligned frames are first written into a FIFO in block RAM, then read out
// one per clock and distributed: the first byte of a frame is the event
// code, the second byte carries distributed bus bits and data buffer bytes
// in alternate frames. This follows the receiver's block diagram.
//
// Choices of this design: the alternation is counted from the frame that
// carries the K28.5 comma in its event byte. That frame and every second one
// after it carry distributed bus bits; the frames in between carry data
// buffer bytes. A distributed bus byte that is a K character leaves the bus
// unchanged. An event code byte that is a K character or the null code 0x00
// produces no event.
//
// Interface and timing: the decoder accepts one frame per clock on
// frame_valid/frame. Event, bus and data buffer outputs appear three clocks
// after the frame was presented (FIFO write, FIFO read, output register).
// event_valid and db_valid are one-clock strobes; dbus holds its value and
// dbus_update strobes when it was loaded. ev_fifo_overflow is sticky.
module event_stream_decoder
  import evr_pkg::*;
#(
  parameter int FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       frame_valid,
  input  evr_frame_t frame,
  output logic       event_valid,
  output logic [7:0] event_code,
  output logic [7:0] dbus,
  output logic       dbus_update,
  output logic       db_valid,
  output evr_byte_t  db_byte,
  output logic       ev_fifo_overflow
);

  localparam int FW = $bits(evr_frame_t);

  logic       fifo_empty, rd_valid;
  logic [FW-1:0] rd_word;
  evr_frame_t f;
  logic       is_comma, phase_cur, phase_last;

  sync_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk      (clk),
    .rst      (rst),
    .wr_en    (frame_valid),
    .wr_data  (frame),
    .rd_en    (!fifo_empty),
    .rd_data  (rd_word),
    .rd_valid (rd_valid),
    .empty    (fifo_empty),
    .full     (),
    .level    (),
    .overflow (ev_fifo_overflow)
  );

  assign f = evr_frame_t'(rd_word);
  assign is_comma  = f.ev_k && (f.ev == K28_5);
  // phase 0: distributed bus frame, phase 1: data buffer frame
  assign phase_cur = is_comma ? 1'b0 : !phase_last;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_last  <= 1'b1;
      event_valid <= 1'b0;
      event_code  <= '0;
      dbus        <= '0;
      dbus_update <= 1'b0;
      db_valid    <= 1'b0;
      db_byte     <= '0;
    end else begin
      event_valid <= 1'b0;
      dbus_update <= 1'b0;
      db_valid    <= 1'b0;
      if (rd_valid) begin
        phase_last <= phase_cur;
        if (!f.ev_k && f.ev != NULL_EVENT) begin
          event_valid <= 1'b1;
          event_code  <= f.ev;
        end
        if (!phase_cur) begin
          if (!f.dat_k) begin
            dbus        <= f.dat;
            dbus_update <= 1'b1;
          end
        end else begin
          db_valid <= 1'b1;
          db_byte  <= '{data: f.dat, k: f.dat_k};
        end
      end
    end
  end

endmodule

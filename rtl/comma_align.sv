// comma_align: byte alignment of the received 16-bit words on the K28.5 comma.
//
// The transceiver delivers two 8b10b-decoded bytes per event clock with a K
// flag for each, the first received byte in bits [7:0]. The transmitter sends
// the K28.5 comma in the event code byte at regular intervals (every 4 frames
// on the link this receiver was written for). When a K28.5 shows up in the
// low byte, frames are already aligned; when it shows up in the high byte,
// each frame starts in the high byte of one word and ends in the low byte of
// the next, and the block re-assembles them from the saved high byte.
//
// Link synchronisation: 'synced' rises on the first comma and falls when no
// comma has been seen for SYNC_TIMEOUT consecutive words. Frames are marked
// valid only while synced. The timeout value and the loss-of-sync rule are
// this design's choices.
//
// Timing: one registered stage; the frame completed by the word on the inputs
// at edge n is on 'frame' after edge n. 'comma_seen' pulses with the frame
// that holds the comma.
module comma_align
  import evr_pkg::*;
#(
  parameter int SYNC_TIMEOUT = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] rx_data,
  input  logic [1:0]  rx_charisk,
  output evr_frame_t  frame,
  output logic        frame_valid,
  output logic        synced,
  output logic        byte_offset,   // 1: frames straddle two words
  output logic        comma_seen
);

  localparam int CW = $clog2(SYNC_TIMEOUT + 1);

  logic          comma_lo, comma_hi;
  logic          offset_nxt;
  logic [7:0]    prev_hi;
  logic          prev_hi_k;
  logic          prev_comma_hi;
  logic [CW-1:0] silent;
  evr_frame_t    frame_nxt;

  assign comma_lo = rx_charisk[0] && (rx_data[7:0]  == K28_5);
  assign comma_hi = rx_charisk[1] && (rx_data[15:8] == K28_5);

  always_comb begin
    offset_nxt = byte_offset;
    if (comma_lo)      offset_nxt = 1'b0;
    else if (comma_hi) offset_nxt = 1'b1;

    if (!offset_nxt)
      frame_nxt = '{ev: rx_data[7:0], ev_k: rx_charisk[0],
                    dat: rx_data[15:8], dat_k: rx_charisk[1]};
    else
      frame_nxt = '{ev: prev_hi, ev_k: prev_hi_k,
                    dat: rx_data[7:0], dat_k: rx_charisk[0]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      byte_offset   <= 1'b0;
      prev_hi       <= '0;
      prev_hi_k     <= 1'b0;
      prev_comma_hi <= 1'b0;
      silent        <= '0;
      synced        <= 1'b0;
      frame         <= '0;
      frame_valid   <= 1'b0;
      comma_seen    <= 1'b0;
    end else begin
      byte_offset   <= offset_nxt;
      prev_hi       <= rx_data[15:8];
      prev_hi_k     <= rx_charisk[1];
      prev_comma_hi <= comma_hi;
      frame         <= frame_nxt;
      if (comma_lo || comma_hi) begin
        silent <= '0;
        synced <= 1'b1;
      end else if (silent == CW'(SYNC_TIMEOUT - 1)) begin
        silent <= '0;
        synced <= 1'b0;
      end else begin
        silent <= silent + 1'b1;
      end
      // The frame assembled in the cycle the alignment moves to the high
      // byte mixes two frames and is dropped.
      frame_valid <= !(offset_nxt && !byte_offset) && (synced || comma_lo);
      comma_seen  <= offset_nxt ? prev_comma_hi : comma_lo;
    end
  end

endmodule

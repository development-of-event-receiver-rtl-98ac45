// evr_pkg: shared constants and types of the event receiver.
//
// The event link carries one 16-bit frame per event clock cycle (114.24 MHz
// in the target system). The first byte of a frame is the event code, the
// second byte alternates between distributed bus bits and data buffer bytes.
// Every byte comes with a K flag from the 8b10b decoder in the transceiver
// that says whether it is a control (K) character.
//
// K28.2 (0x5C, data buffer start) and K28.1 (0x3C, data buffer end) are the
// values used by the receiver's data buffer logic. K28.5 (0xBC) is the comma
// used for alignment; its byte value is the standard 8b10b one.
package evr_pkg;

  localparam logic [7:0] K28_5 = 8'hBC;  // comma / synchronisation character
  localparam logic [7:0] K28_2 = 8'h5C;  // start of data buffer
  localparam logic [7:0] K28_1 = 8'h3C;  // end of data buffer

  localparam logic [7:0] NULL_EVENT = 8'h00;  // event code that carries no event

  // One received 16-bit frame after byte alignment.
  typedef struct packed {
    logic [7:0] ev;     // first byte: event code
    logic       ev_k;   // first byte is a K character
    logic [7:0] dat;    // second byte: distributed bus or data buffer
    logic       dat_k;  // second byte is a K character
  } evr_frame_t;

  // One byte of the data buffer channel.
  typedef struct packed {
    logic [7:0] data;
    logic       k;
  } evr_byte_t;

endpackage

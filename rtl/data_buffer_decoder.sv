// data_buffer_decoder: extracts a data buffer from the data buffer byte
// stream and stores it in a dual-port RAM.
//
// The bytes that the event stream decoder sorts out as data buffer bytes
// pass through a FIFO. A small state machine then looks for K28.2 (0x5C),
// the start of a data buffer. From the byte after it, every data byte is
// written into the dual-port RAM at consecutive addresses from 0, until
// K28.1 (0x3C) ends the buffer. The RAM holds the largest buffer the link
// can carry, 2 Kbytes. Its second port is read by the processor.
//
// Choices of this design: other K characters inside a buffer are skipped; a
// K28.2 inside a buffer restarts it at address 0; bytes beyond the RAM size
// are dropped and flag the buffer as overflowed. A finished buffer stays in
// the RAM until the next K28.2 starts overwriting it.
//
// Interface and timing: one byte per clock at most on in_valid/in_byte.
// The RAM write of a byte happens three clocks after it is presented (FIFO
// write, FIFO read, state machine). rx_done strobes for one clock when K28.1
// is processed, with rx_size (number of bytes stored) and rx_overflow valid
// from then until the next buffer starts. rx_busy is high while a buffer is
// being received. rd_addr/rd_data is the RAM's read port on rd_clk, one
// clock of read latency.
module data_buffer_decoder
  import evr_pkg::*;
#(
  parameter int DBUF_BYTES = 2048,
  parameter int FIFO_DEPTH = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          in_valid,
  input  evr_byte_t                     in_byte,
  output logic                          rx_busy,
  output logic                          rx_done,
  output logic [$clog2(DBUF_BYTES):0]   rx_size,
  output logic                          rx_overflow,
  output logic                          db_fifo_overflow,
  input  logic                          rd_clk,
  input  logic [$clog2(DBUF_BYTES)-1:0] rd_addr,
  output logic [7:0]                    rd_data
);

  localparam int AW = $clog2(DBUF_BYTES);
  localparam int BW = $bits(evr_byte_t);

  typedef enum logic [0:0] {S_IDLE, S_RECV} state_t;

  state_t      state;
  logic        fifo_empty, rd_valid;
  logic [BW-1:0] fifo_word;
  evr_byte_t   b;
  logic [AW:0] count;
  logic        we;
  logic [AW-1:0] waddr;
  logic [7:0]  wdata;

  sync_fifo #(.WIDTH(BW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk      (clk),
    .rst      (rst),
    .wr_en    (in_valid),
    .wr_data  (in_byte),
    .rd_en    (!fifo_empty),
    .rd_data  (fifo_word),
    .rd_valid (rd_valid),
    .empty    (fifo_empty),
    .full     (),
    .level    (),
    .overflow (db_fifo_overflow)
  );

  assign b = evr_byte_t'(fifo_word);

  // RAM write: a data byte while receiving and the buffer is not full.
  assign we    = rd_valid && state == S_RECV && !b.k && count < (AW+1)'(DBUF_BYTES);
  assign waddr = count[AW-1:0];
  assign wdata = b.data;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      count       <= '0;
      rx_done     <= 1'b0;
      rx_size     <= '0;
      rx_overflow <= 1'b0;
    end else begin
      rx_done <= 1'b0;
      if (rd_valid) begin
        if (b.k && b.data == K28_2) begin
          state       <= S_RECV;
          count       <= '0;
          rx_overflow <= 1'b0;
        end else if (state == S_RECV) begin
          if (b.k && b.data == K28_1) begin
            state   <= S_IDLE;
            rx_done <= 1'b1;
            rx_size <= count;
          end else if (!b.k) begin
            if (we) count <= count + 1'b1;
            else    rx_overflow <= 1'b1;
          end
        end
      end
    end
  end

  assign rx_busy = (state == S_RECV);

  dbuf_ram #(.DEPTH(DBUF_BYTES), .WIDTH(8)) u_ram (
    .clk_a  (clk),
    .we_a   (we),
    .addr_a (waddr),
    .din_a  (wdata),
    .clk_b  (rd_clk),
    .addr_b (rd_addr),
    .dout_b (rd_data)
  );

endmodule

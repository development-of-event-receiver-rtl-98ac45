// sync_fifo: first-in first-out buffer on a single clock.
//
// Used twice in the receiver: once for the aligned 16-bit frames (event
// stream decoder) and once for the data buffer bytes (data buffer decoder).
// The storage is an array with a registered read port, so it maps onto block
// RAM as on the original board. Both FIFOs run on the event clock, as in the
// receiver's block diagram; depth, width and the overflow policy are choices
// of this design.
//
// Interface and timing:
//   wr_en/wr_data  write one word at the clock edge; dropped while full,
//                  which sets the sticky overflow flag until reset.
//   rd_en          read one word; rd_data and rd_valid appear one cycle later
//                  (block RAM read latency). Ignored while empty.
//   empty, full, level are registered and describe the state after the
//   previous edge, so a word written at edge n can be read from edge n+1.
// Reset is synchronous and active high.
module sync_fifo #(
  parameter int WIDTH = 18,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] level,
  output logic             overflow
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign empty = (level == '0);
  assign full  = (level == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
    if (do_rd) rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      level    <= '0;
      rd_valid <= 1'b0;
      overflow <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      level <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  a_level_bound: assert property (@(posedge clk) disable iff (rst) level <= (AW+1)'(DEPTH));

endmodule

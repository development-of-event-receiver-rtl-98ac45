// dbuf_ram: dual-port RAM that holds the received data buffer.
//
// The data buffer of the event link is at most 2 Kbytes, so the default size
// is 2048 bytes, reserved in block RAM as the receiver design prescribes.
// Port A is the write port used by the data buffer decoder on the event
// clock; port B is a read port on its own clock for the processor that
// collects the buffer. Both ports are synchronous: a read returns the data
// one port-B clock after the address. Reading an address on port B in the
// same cycle it is written on port A returns old or new data, depending on
// the two clocks, as in block RAM. The separate read clock is this design's
// choice.
module dbuf_ram #(
  parameter int DEPTH = 2048,
  parameter int WIDTH = 8
) (
  input  logic                     clk_a,
  input  logic                     we_a,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [WIDTH-1:0]         din_a,
  input  logic                     clk_b,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  output logic [WIDTH-1:0]         dout_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_a) begin
    if (we_a) mem[addr_a] <= din_a;
  end

  always_ff @(posedge clk_b) begin
    dout_b <= mem[addr_b];
  end

endmodule

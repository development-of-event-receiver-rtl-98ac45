// tb_evr_single_buffer: the basic receiver operation at default sizes.
// An event generator model sends an aligned frame stream with K28.5 commas,
// one event code and a one-byte data buffer: K28.2, the value 0x03, K28.1.
// The receiver must lock, deliver the event code, report a buffer of one
// byte and hold 0x03 at address 0 of the buffer RAM. The frames run back to
// back at one frame per event clock, the rate of the link.
module tb_evr_single_buffer;
  import evr_pkg::*;

  logic        clk = 1'b0, rd_clk = 1'b0, rst;
  logic [15:0] rx_data;
  logic [1:0]  rx_charisk;
  logic        link_synced, link_offset, link_comma, ev_fifo_overflow;
  logic        event_valid, dbus_update, dbuf_busy, dbuf_done, dbuf_overflow, db_fifo_overflow;
  logic [7:0]  event_code, dbus, rd_data;
  logic [11:0] dbuf_size;
  logic [10:0] rd_addr;

  always #4 clk = ~clk;
  always #5 rd_clk = ~rd_clk;

  evr_top dut (.*);

  int checks = 0, failures = 0;
  int n_ev = 0, n_done = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (event_valid) begin
      n_ev++;
      check(event_code == 8'h7E, "event code");
    end
    if (dbuf_done) begin
      n_done++;
      check(dbuf_size == 12'd1 && !dbuf_overflow, "one-byte buffer");
    end
  end

  // frame: {second byte, K}, {event byte, K}; first byte in [7:0]
  task automatic frame(input logic [7:0] ev, input bit evk, input logic [7:0] d, input bit dk);
    @(negedge clk);
    rx_data = {d, ev};
    rx_charisk = {dk, evk};
  endtask

  initial begin
    rst = 1; rx_data = '0; rx_charisk = '0; rd_addr = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // frames 0..: comma every fourth frame; odd frames carry the data buffer
    frame(K28_5, 1, 8'h11, 0);   // 0 bus
    frame(8'h00, 0, 8'h00, 0);   // 1 data buffer idle
    frame(8'h7E, 0, 8'h12, 0);   // 2 bus, event 0x7E
    frame(8'h00, 0, K28_2, 1);   // 3 data buffer start
    frame(K28_5, 1, 8'h13, 0);   // 4 bus
    frame(8'h00, 0, 8'h03, 0);   // 5 data buffer value 0x03
    frame(8'h00, 0, 8'h14, 0);   // 6 bus
    frame(8'h00, 0, K28_1, 1);   // 7 data buffer end
    repeat (4) frame(K28_5, 1, 8'h15, 0);
    repeat (6) @(posedge clk);
    check(link_synced && !link_offset, "locked, aligned");
    check(n_ev == 1, "one event");
    check(n_done == 1, "one buffer");
    check(dbus == 8'h15, "bus holds the last value");
    @(negedge rd_clk) rd_addr = '0;
    @(posedge rd_clk) #1;
    check(rd_data == 8'h03, "buffer byte 0 is 0x03");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

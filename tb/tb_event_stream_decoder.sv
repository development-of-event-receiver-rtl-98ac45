// tb_event_stream_decoder: splitting of frames into event code, distributed
// bus and data buffer bytes.
// A directed frame checks the three-clock latency from frame to event
// output. Then random frames with a K28.5 comma in every fourth frame,
// random and null event codes and random K characters in the second byte
// are sent with random gaps; a reference model applies the rules (bus in
// frames at even distance from the last comma, data buffer in the others,
// K bus bytes and null/K event bytes ignored) and all three output streams
// are compared in order. Frame numbers are skipped now and then, so the
// alternation must be restarted by the comma frames.
module tb_event_stream_decoder;
  import evr_pkg::*;

  logic clk = 1'b0, rst;
  logic frame_valid;
  evr_frame_t frame;
  logic event_valid, dbus_update, db_valid, ev_fifo_overflow;
  logic [7:0] event_code, dbus;
  evr_byte_t db_byte;

  always #5 clk = ~clk;

  event_stream_decoder #(.FIFO_DEPTH(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte unsigned exp_ev[$], got_ev[$], exp_bus[$], got_bus[$];
  evr_byte_t exp_db[$], got_db[$];
  bit mon = 0;

  always @(posedge clk) if (mon) begin
    if (event_valid) got_ev.push_back(event_code);
    if (dbus_update) got_bus.push_back(dbus);
    if (db_valid) got_db.push_back(db_byte);
  end

  initial begin
    int fno, since;
    rst = 1; frame_valid = 0; frame = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // latency: comma frame with a bus byte, then an event frame
    @(negedge clk) begin frame_valid = 1; frame = '{ev: K28_5, ev_k: 1, dat: 8'hA5, dat_k: 0}; end
    @(negedge clk) begin frame = '{ev: 8'h21, ev_k: 0, dat: 8'h03, dat_k: 0}; end
    @(negedge clk) frame_valid = 0;
    // the comma frame was sampled 2 edges ago: nothing yet
    check(!dbus_update, "no output before three clocks");
    @(posedge clk) #1;
    check(dbus_update && dbus == 8'hA5, "bus byte three clocks after its frame");
    @(posedge clk) #1;
    check(event_valid && event_code == 8'h21, "event three clocks after its frame");
    check(db_valid && db_byte.data == 8'h03 && !db_byte.k, "data buffer byte in the frame after the comma");
    repeat (3) @(negedge clk);

    // random stream
    mon = 1;
    fno = 0;
    since = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) frame_valid = 0;
      else begin
        evr_frame_t f;
        bit ph;
        f.ev_k = (fno % 4 == 0);
        f.ev = f.ev_k ? K28_5 : (($urandom_range(0, 3) == 0) ? NULL_EVENT : 8'($urandom));
        f.dat_k = ($urandom_range(0, 9) == 0);
        f.dat = f.dat_k ? (($urandom_range(0, 1) == 1) ? K28_2 : K28_1) : 8'($urandom);
        if (!f.ev_k && f.ev != NULL_EVENT) exp_ev.push_back(f.ev);
        since = f.ev_k ? 0 : since + 1;
        ph = since[0];
        if (!ph) begin if (!f.dat_k) exp_bus.push_back(f.dat); end
        else exp_db.push_back('{data: f.dat, k: f.dat_k});
        frame_valid = 1;
        frame = f;
        fno++;
        // now and then a frame number is skipped, as after a lost frame:
        // the bus/data buffer alternation must restart at the next comma
        if ($urandom_range(0, 40) == 0) fno++;
      end
    end
    @(negedge clk) frame_valid = 0;
    repeat (6) @(negedge clk);
    check(got_ev.size() == exp_ev.size(), $sformatf("events %0d expected %0d", got_ev.size(), exp_ev.size()));
    foreach (exp_ev[i]) if (i < got_ev.size()) check(got_ev[i] == exp_ev[i], $sformatf("event %0d", i));
    check(got_bus.size() == exp_bus.size(), $sformatf("bus %0d expected %0d", got_bus.size(), exp_bus.size()));
    foreach (exp_bus[i]) if (i < got_bus.size()) check(got_bus[i] == exp_bus[i], $sformatf("bus %0d", i));
    check(got_db.size() == exp_db.size(), $sformatf("db %0d expected %0d", got_db.size(), exp_db.size()));
    foreach (exp_db[i]) if (i < got_db.size()) check(got_db[i] == exp_db[i], $sformatf("db %0d", i));
    check(!ev_fifo_overflow, "no FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

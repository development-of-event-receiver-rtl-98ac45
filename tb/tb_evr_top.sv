// tb_evr_top: end-to-end test of the event receiver at its default sizes.
//
// A model of the event generator builds a stream of 16-bit frames: a K28.5
// comma in the event byte of every fourth frame, random event codes (the
// null code 0x00 included) in the others, distributed bus bytes in the frames
// at even distance from the comma and the data buffer channel in the others.
// Data buffers are framed by K28.2 and K28.1. The frames are cut into 16-bit
// transceiver words, first byte in [7:0], starting aligned; later one extra
// byte is slipped in so that every frame straddles two words.
//
// The test checks the order and values of all event codes and bus bytes, the
// size and every byte of each data buffer read back through the RAM read
// port (on a clock of its own), a buffer of exactly 2048 bytes, an oversized
// buffer that must be flagged and cut at 2048 bytes, and loss of sync when
// commas stop. Each of these mechanisms is counted and must occur.
module tb_evr_top;
  import evr_pkg::*;

  localparam int DBUF = 2048;

  logic        clk = 1'b0, rd_clk = 1'b0, rst;
  logic [15:0] rx_data;
  logic [1:0]  rx_charisk;
  logic        link_synced, link_offset, link_comma, ev_fifo_overflow;
  logic        event_valid, dbus_update, dbuf_busy, dbuf_done, dbuf_overflow, db_fifo_overflow;
  logic [7:0]  event_code, dbus, rd_data;
  logic [$clog2(DBUF):0]   dbuf_size;
  logic [$clog2(DBUF)-1:0] rd_addr;

  always #4 clk = ~clk;          // event clock
  always #5 rd_clk = ~rd_clk;    // processor side clock, unrelated to clk

  evr_top dut (.*);

  int checks = 0, failures = 0;
  int n_lock = 0, n_offset1 = 0, n_events = 0, n_dbus = 0, n_buffers = 0;
  int n_full_buf = 0, n_overflow = 0, n_sync_lost = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- event generator model ----------------
  byte unsigned byte_q[$];   // bytes waiting to be sent
  bit           k_q[$];
  int           frame_no = 0;
  byte unsigned exp_ev[$], exp_dbus[$], got_ev[$], got_dbus[$];
  byte unsigned payload[$];  // data buffer bytes still to send
  int           db_state = 0; // 0 idle, 1 start sent / sending, 2 end pending
  bit           send_commas = 1'b1;

  function automatic void push_byte(byte unsigned b, bit k);
    byte_q.push_back(b);
    k_q.push_back(k);
  endfunction

  function automatic void gen_frame();
    byte unsigned ev, d;
    bit dk;
    if (frame_no % 4 == 0 && send_commas) begin
      push_byte(K28_5, 1'b1);
    end else begin
      ev = byte'($urandom_range(0, 255));
      if ($urandom_range(0, 3) == 0) ev = NULL_EVENT;
      push_byte(ev, 1'b0);
      if (ev != NULL_EVENT) exp_ev.push_back(ev);
    end
    if (frame_no % 2 == 0) begin
      d = byte'($urandom);
      push_byte(d, 1'b0);
      exp_dbus.push_back(d);
    end else begin
      dk = 1'b0;
      d  = 8'h00;
      if (db_state == 1) begin
        if (payload.size() > 0) d = payload.pop_front();
        else begin d = K28_1; dk = 1'b1; db_state = 0; end
      end else if (db_state == 2) begin
        d = K28_2; dk = 1'b1; db_state = 1;
      end
      push_byte(d, dk);
    end
    frame_no++;
  endfunction

  // Drive one transceiver word per clock from the byte queue.
  task automatic send_words(input int n);
    repeat (n) begin
      while (byte_q.size() < 2) gen_frame();
      @(negedge clk);
      rx_data[7:0]  = byte_q.pop_front();
      rx_charisk[0] = k_q.pop_front();
      rx_data[15:8] = byte_q.pop_front();
      rx_charisk[1] = k_q.pop_front();
    end
  endtask

  // ---------------- monitors ----------------
  int last_size;
  bit last_ovf;
  int dones = 0;
  bit rd_busy = 1'b0;
  bit prev_sync = 1'b0;
  always @(posedge clk) begin
    if (!rst) begin
      if (event_valid) got_ev.push_back(event_code);
      if (dbus_update) got_dbus.push_back(dbus);
      if (dbuf_done) begin
        dones++;
        last_size = int'(dbuf_size);
        last_ovf  = dbuf_overflow;
      end
      if (link_synced && !prev_sync) n_lock++;
      if (!link_synced && prev_sync) n_sync_lost++;
      if (link_synced && link_offset && link_comma) n_offset1++;
      prev_sync <= link_synced;
    end
  end

  // Send one data buffer and check it through the read port.
  task automatic run_buffer(input int len);
    byte unsigned ref_q[$];
    int d0, stored;
    for (int i = 0; i < len; i++) begin
      byte unsigned v;
      v = (i == 0) ? 8'h03 : byte'($urandom);
      ref_q.push_back(v);
      payload.push_back(v);
    end
    d0 = dones;
    db_state = 2;
    while (dones == d0) send_words(1);
    stored = (len > DBUF) ? DBUF : len;
    check(last_size == stored, $sformatf("buffer size %0d, expected %0d", last_size, stored));
    check(last_ovf == (len > DBUF), "buffer overflow flag");
    if (len > DBUF) n_overflow++;
    if (stored == DBUF) n_full_buf++;
    n_buffers++;
    // read back on the processor clock while idle frames keep coming
    rd_busy = 1'b1;
    fork
      while (rd_busy) send_words(1);
      begin
        for (int a = 0; a < stored; a++) begin
          @(negedge rd_clk) rd_addr = ($clog2(DBUF))'(a);
          @(posedge rd_clk) #1;
          check(rd_data == ref_q[a], $sformatf("buffer byte %0d: %02x, expected %02x", a, rd_data, ref_q[a]));
        end
        rd_busy = 1'b0;
      end
    join
  endtask

  // Compare the first n_ev / n_db expected values (frames that have surely
  // left the pipeline) with what came out, in order.
  task automatic compare_streams(input int n_ev, input int n_db);
    check(got_ev.size() >= n_ev, $sformatf("event count %0d, expected at least %0d", got_ev.size(), n_ev));
    for (int i = 0; i < n_ev && i < got_ev.size(); i++)
      check(got_ev[i] == exp_ev[i], $sformatf("event %0d: %02x, expected %02x", i, got_ev[i], exp_ev[i]));
    check(got_dbus.size() >= n_db, $sformatf("dbus count %0d, expected at least %0d", got_dbus.size(), n_db));
    for (int i = 0; i < n_db && i < got_dbus.size(); i++)
      check(got_dbus[i] == exp_dbus[i], $sformatf("dbus %0d: %02x, expected %02x", i, got_dbus[i], exp_dbus[i]));
    n_events += n_ev;
    n_dbus   += n_db;
  endtask

  initial begin
    rst = 1'b1;
    rx_data = '0;
    rx_charisk = '0;
    rd_addr = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    // idle link without commas: no sync, nothing decoded
    repeat (20) @(negedge clk);
    check(!link_synced, "no sync without comma");
    check(got_ev.size() == 0 && got_dbus.size() == 0, "nothing decoded before sync");

    // aligned link
    send_words(40);
    check(link_synced, "synced on aligned link");
    check(!link_offset, "aligned offset");
    run_buffer(10);
    send_words(40);

    // slip one byte just ahead of a comma frame: frames now straddle two words
    while (frame_no % 4 != 0) gen_frame();
    push_byte(8'h00, 1'b0);
    send_words(40);
    check(link_synced && link_offset, "realigned to the high byte");
    run_buffer(37);
    run_buffer(DBUF);
    run_buffer(DBUF + 5);
    send_words(40);

    // everything generated so far has left the pipeline after a few more words
    begin
      int n_ev, n_db;
      n_ev = exp_ev.size();
      n_db = exp_dbus.size();
      send_words(12);
      compare_streams(n_ev, n_db);
    end

    // stop commas: the link must lose sync
    send_commas = 1'b0;
    begin
      int guard;
      guard = 0;
      while (link_synced && guard < 400) begin
        send_words(1);
        guard++;
      end
      check(guard >= 250, "sync held until the timeout");
      send_words(2);
    end
    check(!link_synced, "sync lost without commas");

    check(n_lock >= 1, "lock happened");
    check(n_offset1 >= 1, "high-byte alignment happened");
    check(n_sync_lost >= 1, "sync loss happened");
    check(n_events > 0, "events decoded");
    check(n_dbus > 0, "bus bytes decoded");
    check(n_buffers == 4, "four buffers received");
    check(n_full_buf >= 1, "a full 2 KB buffer was received");
    check(n_overflow >= 1, "an oversized buffer was flagged");
    check(!ev_fifo_overflow && !db_fifo_overflow, "no FIFO overflow at one frame per clock");
    $display("mechanisms: lock=%0d offset1=%0d sync_lost=%0d events=%0d dbus=%0d buffers=%0d full=%0d overflow=%0d",
             n_lock, n_offset1, n_sync_lost, n_events, n_dbus, n_buffers, n_full_buf, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

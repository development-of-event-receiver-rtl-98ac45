// tb_comma_align: byte alignment on K28.5 and link sync.
// Directed part: a comma in the low byte produces an aligned frame one clock
// later with synced and comma_seen set; sync falls after exactly
// SYNC_TIMEOUT words without a comma. Random part: a frame stream with a
// comma every fourth frame is sent aligned, then shifted by one byte, then
// shifted back; every frame after each realignment must come out intact and
// in order, and the byte offset must follow the shift.
module tb_comma_align;
  import evr_pkg::*;
  localparam int TO = 16;

  logic clk = 1'b0, rst;
  logic [15:0] rx_data;
  logic [1:0]  rx_charisk;
  evr_frame_t  frame;
  logic        frame_valid, synced, byte_offset, comma_seen;

  always #5 clk = ~clk;

  comma_align #(.SYNC_TIMEOUT(TO)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte unsigned bq[$];
  bit kq[$];
  evr_frame_t exp_q[$], got_q[$];
  int fno = 0;
  bit capture = 0;

  function automatic void gen_frame(bit record);
    evr_frame_t f;
    f.ev_k  = (fno % 4 == 0);
    f.ev    = f.ev_k ? K28_5 : 8'($urandom);
    f.dat_k = ($urandom_range(0, 7) == 0);
    f.dat   = f.dat_k ? K28_2 : 8'($urandom);
    bq.push_back(f.ev);  kq.push_back(f.ev_k);
    bq.push_back(f.dat); kq.push_back(f.dat_k);
    if (record) exp_q.push_back(f);
    fno++;
  endfunction

  task automatic send_word();
    @(negedge clk);
    rx_data = {bq[1], bq[0]};
    rx_charisk = {kq[1], kq[0]};
    void'(bq.pop_front()); void'(bq.pop_front());
    void'(kq.pop_front()); void'(kq.pop_front());
  endtask

  always @(posedge clk) if (capture && frame_valid) got_q.push_back(frame);

  // send n frames, recording them for comparison
  task automatic run(input int n);
    exp_q.delete(); got_q.delete();
    while (fno % 4 != 0) begin gen_frame(0); end
    for (int i = 0; i < n; i++) gen_frame(1);
    while (bq.size() >= 2) send_word();
  endtask

  initial begin
    rst = 1; rx_data = '0; rx_charisk = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // directed: comma in the low byte
    @(negedge clk) begin rx_data = {8'h5A, K28_5}; rx_charisk = 2'b01; end
    @(posedge clk) #1;
    check(frame_valid && synced && comma_seen && !byte_offset, "lock on low-byte comma after one clock");
    check(frame.ev == K28_5 && frame.ev_k && frame.dat == 8'h5A && !frame.dat_k, "aligned frame content");
    // no commas: sync must fall after TO words
    for (int i = 1; i <= TO + 1; i++) begin
      @(negedge clk) begin rx_data = 16'(i); rx_charisk = 2'b00; end
      @(posedge clk) #1;
      if (i < TO) check(synced, $sformatf("still synced after %0d words", i));
      else if (i == TO) check(!synced, "sync lost after timeout");
      else check(!frame_valid, "no frames without sync");
    end

    // aligned stream
    capture = 1;
    run(200);
    repeat (3) send_word_idle();
    check(!byte_offset, "offset 0 on aligned stream");
    compare();
    // one byte slipped ahead of a comma frame
    bq.push_back(8'h00); kq.push_back(1'b0);
    run(200);
    repeat (3) send_word_idle();
    check(byte_offset, "offset 1 after slip");
    compare_tail();
    // slip back: drop one byte at a comma boundary
    bq.push_back(8'h00); kq.push_back(1'b0);
    run(200);
    repeat (3) send_word_idle();
    check(!byte_offset, "offset 0 after second slip");
    compare_tail();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // keep the word stream going with no new frames (repeat a comma-free pad)
  task automatic send_word_idle();
    @(negedge clk) begin rx_data = 16'h0000; rx_charisk = 2'b00; end
  endtask

  task automatic compare();
    int n;
    n = (got_q.size() < exp_q.size()) ? got_q.size() : exp_q.size();
    check(got_q.size() >= exp_q.size(), $sformatf("got %0d frames, expected %0d", got_q.size(), exp_q.size()));
    for (int i = 0; i < n; i++)
      check(got_q[i] == exp_q[i], $sformatf("frame %0d: %h expected %h", i, got_q[i], exp_q[i]));
  endtask

  // after a slip the first received frame may be a padding frame; align the
  // two lists on the first expected frame
  task automatic compare_tail();
    int off;
    off = -1;
    for (int i = 0; i < 4 && i < got_q.size(); i++)
      if (got_q[i] == exp_q[0]) begin off = i; break; end
    check(off >= 0, "first frame after realignment found");
    if (off >= 0) begin
      // with frames straddling words the last frame's second byte is still
      // waiting in the queue, so the last frame is not compared
      for (int i = 0; i < exp_q.size() - 1; i++) begin
        if (off + i >= got_q.size()) begin check(0, "frame missing"); break; end
        check(got_q[off+i] == exp_q[i], $sformatf("frame %0d: %h expected %h", i, got_q[off+i], exp_q[i]));
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sync_fifo: random writes and reads against a queue model.
// Checks data order, the one-clock read latency (rd_valid the clock after
// rd_en), empty/full/level after every clock, that writes to a full FIFO are
// dropped and set the sticky overflow flag, and that reset clears it.
module tb_sync_fifo;
  localparam int W = 18, D = 16;

  logic clk = 1'b0, rst;
  logic wr_en, rd_en, rd_valid, empty, full, overflow;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] level;

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  logic [W-1:0] pending;
  bit pend_valid, exp_ovf;
  int n_full = 0, n_drop = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1'b1; wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    pend_valid = 0; exp_ovf = 0;
    for (int i = 0; i < 3000; i++) begin
      // phases: mostly writing, mostly reading, balanced
      int pw;
      pw = (i % 600 < 200) ? 90 : (i % 600 < 400) ? 20 : 50;
      @(negedge clk);
      wr_en = ($urandom_range(0, 99) < pw);
      rd_en = ($urandom_range(0, 99) < 100 - pw);
      wr_data = W'($urandom);
      @(posedge clk);
      // model update with the values seen at this edge
      // a write to a full FIFO is dropped even if a read frees a slot
      pend_valid = 0;
      begin
        bit was_full;
        was_full = (model.size() == D);
        if (rd_en && model.size() > 0) begin pending = model.pop_front(); pend_valid = 1; end
        if (wr_en) begin
          if (!was_full) model.push_back(wr_data);
          else begin exp_ovf = 1; n_drop++; end
        end
      end
      #1;
      check(rd_valid == pend_valid, "rd_valid");
      if (pend_valid) check(rd_data == pending, $sformatf("data %h expected %h", rd_data, pending));
      check(int'(level) == model.size(), $sformatf("level %0d expected %0d", level, model.size()));
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(overflow == exp_ovf, "overflow flag");
      if (full) n_full++;
    end
    check(n_full > 0 && n_drop > 0, "full and overflow were exercised");
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check(!overflow && empty, "reset clears state");
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

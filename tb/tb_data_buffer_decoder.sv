// tb_data_buffer_decoder: data buffer reception into the dual-port RAM,
// with the RAM reduced to 64 bytes so that overflow is quick to reach.
// Buffers of random length (empty, short, exactly full, oversized) are sent
// between idle bytes, with stray K characters inside and one restarted
// buffer. For each, rx_done must come three clocks after the K28.1 byte,
// with the right size and overflow flag, rx_busy must be high in between,
// and every stored byte is read back on the read port (own clock).
module tb_data_buffer_decoder;
  import evr_pkg::*;
  localparam int N = 64;

  logic clk = 1'b0, rd_clk = 1'b0, rst;
  logic in_valid;
  evr_byte_t in_byte;
  logic rx_busy, rx_done, rx_overflow, db_fifo_overflow;
  logic [$clog2(N):0] rx_size;
  logic [$clog2(N)-1:0] rd_addr;
  logic [7:0] rd_data;

  always #5 clk = ~clk;
  always #6 rd_clk = ~rd_clk;

  data_buffer_decoder #(.DBUF_BYTES(N), .FIFO_DEPTH(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_full = 0, n_ovf = 0;

  task automatic put(input byte unsigned d, input bit k);
    @(negedge clk);
    in_valid = 1; in_byte = '{data: d, k: k};
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'($urandom_range(0, 1));
      in_byte = '{data: 8'($urandom), k: 1'b0};
    end
    @(negedge clk) in_valid = 0;
  endtask

  task automatic buffer(input int len, input bit restart);
    byte unsigned ref_q[$];
    int stored, lat;
    if (restart) begin
      // a first, abandoned start with a few bytes
      put(K28_2, 1);
      repeat (5) put(8'($urandom), 0);
    end
    put(K28_2, 1);
    for (int i = 0; i < len; i++) begin
      byte unsigned v;
      if ($urandom_range(0, 9) == 0) put(K28_5, 1);   // stray K character, skipped
      v = 8'($urandom);
      ref_q.push_back(v);
      put(v, 0);
    end
    put(K28_1, 1);
    @(negedge clk) in_valid = 0;
    if (len > 0) check(rx_busy, "busy while receiving");
    // K28.1 was sampled one edge ago; done must come on the third edge
    lat = 1;
    while (!rx_done && lat < 10) begin @(posedge clk) #1; lat++; end
    check(lat == 3, $sformatf("rx_done latency %0d, expected 3", lat));
    stored = (len > N) ? N : len;
    check(int'(rx_size) == stored, $sformatf("size %0d expected %0d", rx_size, stored));
    check(rx_overflow == (len > N), "overflow flag");
    @(posedge clk) #1;
    check(!rx_busy && !rx_done, "idle after end, done is one clock");
    if (stored == N) n_full++;
    if (len > N) n_ovf++;
    for (int a = 0; a < stored; a++) begin
      @(negedge rd_clk) rd_addr = ($clog2(N))'(a);
      @(posedge rd_clk) #1;
      check(rd_data == ref_q[a], $sformatf("byte %0d: %02x expected %02x", a, rd_data, ref_q[a]));
    end
  endtask

  initial begin
    rst = 1; in_valid = 0; in_byte = '0; rd_addr = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    idle(10);
    check(!rx_busy && !rx_done, "idle bytes start nothing");
    buffer(1, 0);
    idle(5);
    buffer(0, 0);
    buffer(20, 1);
    idle(7);
    buffer(N, 0);
    buffer(N + 9, 0);
    idle(3);
    for (int i = 0; i < 10; i++) begin
      buffer(int'($urandom_range(0, N + 4)), 1'($urandom_range(0, 1)));
      idle($urandom_range(0, 5));
    end
    check(n_full > 0 && n_ovf > 0, "full and oversized buffers exercised");
    check(!db_fifo_overflow, "no FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dbuf_ram: fills the full 2048-byte RAM through port A on one clock and
// reads it back through port B on an unrelated clock, then overwrites part
// of it and checks that only those addresses changed. Port B has one clock
// of read latency.
module tb_dbuf_ram;
  localparam int D = 2048;

  logic clk_a = 1'b0, clk_b = 1'b0;
  logic we_a;
  logic [$clog2(D)-1:0] addr_a, addr_b;
  logic [7:0] din_a, dout_b;

  always #4 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;

  dbuf_ram #(.DEPTH(D), .WIDTH(8)) dut (.*);

  int checks = 0, failures = 0;
  byte unsigned ref_mem[D];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic read_all();
    for (int a = 0; a < D; a++) begin
      @(negedge clk_b) addr_b = ($clog2(D))'(a);
      @(posedge clk_b) #1;
      check(dout_b == ref_mem[a], $sformatf("addr %0d: %02x expected %02x", a, dout_b, ref_mem[a]));
    end
  endtask

  initial begin
    we_a = 0; addr_a = '0; din_a = '0; addr_b = '0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk_a);
      we_a = 1; addr_a = ($clog2(D))'(a); din_a = 8'($urandom); ref_mem[a] = din_a;
    end
    @(negedge clk_a) we_a = 0;
    read_all();
    for (int i = 0; i < 300; i++) begin
      @(negedge clk_a);
      we_a = ($urandom_range(0, 1) == 1); addr_a = ($clog2(D))'($urandom); din_a = 8'($urandom);
      if (we_a) ref_mem[addr_a] = din_a;
    end
    @(negedge clk_a) we_a = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_a);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

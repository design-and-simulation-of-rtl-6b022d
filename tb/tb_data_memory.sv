// tb_data_memory: repeats the original module test (write 0x123456 to word
// 4, read word 5, read word 4) and then checks the read latency for a
// request at every counter phase: a read made when the counter is c must
// see ready exactly (8 - c) cycles later, for one cycle, with busy high
// until then.
module tb_data_memory;
  import ss_pkg::*;

  logic clk = 0, rst = 1, en = 0, rnw = 0, ready, busy;
  logic [9:0] addr = '0;
  word_t wdata = '0, rdata;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  data_memory dut (.clk, .rst, .en, .rnw, .addr, .wdata, .rdata, .ready, .busy);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d (%h) expected %0d (%h)", what, got, got, exp, exp); end
  endtask

  // Issue a read at the current cycle, return cycles until ready.
  task automatic do_read(input int a, output int lat, output word_t d);
    en = 1; rnw = 1; addr = 10'(a);
    @(posedge clk); #1;
    en = 0;
    lat = 1;
    while (!ready && lat < 20) begin
      chk("busy while waiting", busy, 1);
      @(posedge clk); #1;
      lat++;
    end
    d = rdata;
    @(posedge clk); #1;
    chk("ready is one pulse", ready, 0);
    chk("busy falls", busy, 0);
  endtask

  int lat, phase;
  word_t d;

  initial begin
    @(posedge clk); #1; rst = 0;
    phase = 0;
    // original test: write at counter 3
    repeat (3) begin @(posedge clk); #1; end
    chk("counter phase 3", dut.count, 3);
    en = 1; rnw = 0; addr = 10'd4; wdata = 32'h123456;
    @(posedge clk); #1;
    en = 0;
    do_read(5, lat, d);
    chk("read word 5 (power-up value)", d, 5);
    do_read(4, lat, d);
    chk("read word 4 after write", d, 32'h123456);
    // latency at every phase
    for (int c = 0; c < 8; c++) begin
      while (dut.count != 3'(c)) begin @(posedge clk); #1; end
      do_read(100 + c, lat, d);
      chk($sformatf("latency from phase %0d", c), lat, 8 - c);
      chk("data", d, 100 + c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

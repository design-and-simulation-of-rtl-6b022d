// tb_colouring: drives the renaming unit with a short instruction stream.
// Checks that untouched registers are read from the architectural file,
// that a renamed register is read from its physical register, that sources
// are looked up before the destination is renamed, lowest-first allocation,
// the reverse lookup, freeing of the previous live range at retirement (and
// no freeing for a first live range), exhaustion of the free list, and that
// a flush restores the initial state.
module tb_colouring;
  import ss_pkg::*;

  logic clk = 0, rst = 1, flush = 0, write = 0, ret_en = 0, ok;
  dec_t din;
  col_t cout;
  preg_t ret_pd = '0;
  areg_t rev_arch;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  colouring dut (.clk, .rst, .flush, .din, .cout, .ok, .write, .ret_en, .ret_pd, .rev_arch);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  task automatic set(input int rd, input int rn, input int rm, input logic wr);
    din = '0;
    din.cls = CLS_ALU;
    din.rd = 4'(rd); din.rn = 4'(rn); din.rm = 4'(rm);
    din.rn_used = 1; din.rm_used = 1; din.rd_write = wr;
    #1;
  endtask

  task automatic step();
    write = 1; @(posedge clk); #1; write = 0;
  endtask

  initial begin
    din = '0;
    @(posedge clk); #1; rst = 0;
    set(1, 1, 2, 1);                         // ADD R1,R1,R2
    chk("o1 arch", cout.o1.arch, 1);
    chk("o1 num", cout.o1.num, 1);
    chk("o2 arch", cout.o2.arch, 1);
    chk("o2 num", cout.o2.num, 2);
    chk("pd", cout.pd, 1);
    chk("ok", ok, 1);
    step();
    set(3, 1, 1, 1);                         // ADD R3,R1,R1
    chk("renamed o1 phys", cout.o1.arch, 0);
    chk("renamed o1 num", cout.o1.num, 1);
    chk("pd 2", cout.pd, 2);
    step();
    set(1, 1, 3, 1);                         // ADD R1,R1,R3
    chk("src before dst", cout.o1.num, 1);
    chk("o2 is P2", cout.o2.num, 2);
    chk("pd 3", cout.pd, 3);
    step();
    // retire the first writer of R1 (P1): first live range, nothing freed
    ret_pd = 1; #1;
    chk("reverse lookup P1", rev_arch, 1);
    ret_en = 1; @(posedge clk); #1; ret_en = 0;
    set(4, 0, 0, 1);
    chk("nothing freed", cout.pd, 4);
    // retire P3 (second R1 range): frees P1
    ret_pd = 3; #1;
    chk("reverse lookup P3", rev_arch, 1);
    ret_en = 1; @(posedge clk); #1; ret_en = 0;
    set(4, 0, 0, 1);
    chk("P1 reused", cout.pd, 1);
    // exhaust: P1 and P4..P63 = 61 allocations
    for (int i = 0; i < 61; i++) begin set(5, 0, 0, 1); step(); end
    set(6, 0, 0, 1);
    chk("exhausted", ok, 0);
    set(6, 0, 0, 0);
    chk("no destination still ok", ok, 1);
    set(0, 5, 1, 1);
    chk("R5 newest", cout.o1.num, 63);
    chk("R1 newest", cout.o2.num, 3);
    // flush
    flush = 1; @(posedge clk); #1; flush = 0;
    set(2, 5, 1, 1);
    chk("flush: arch again", cout.o1.arch, 1);
    chk("flush: arch num", cout.o1.num, 5);
    chk("flush: free again", cout.pd, 1);
    chk("flush: ok", ok, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

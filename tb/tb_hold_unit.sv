// tb_hold_unit: feeds decoded instructions, renamed by the colouring unit,
// into the holding unit with the data memory attached, without a feeder.
// Checks the committed registers after a dependent/independent ALU mix and
// loads; that the pool fills behind a slow load at the head and the feed
// stalls (write low while an instruction waits) without losing anything;
// that a wrongly predicted branch flushes every slot and reports its
// alternative address; and that instructions retire in order.
module tb_hold_unit;
  import ss_pkg::*;

  logic clk = 0, rst = 1;
  dec_t fd;
  logic fd_valid = 0, write, ok, free_en, flush, fb_en, fb_taken, halted, dump, retire_en;
  col_t cd;
  preg_t free_pd;
  areg_t rev_arch;
  word_t redirect, fb_pc, dm_wdata, dm_rdata;
  logic dm_en, dm_rnw, dm_ready, dm_busy;
  logic [9:0] dm_addr;
  word_t arch_regs [NARCH];
  flags_t flags;
  int checks = 0, failures = 0, stalls = 0, flushes = 0;

  always #5 clk = !clk;

  colouring u_col (.clk, .rst, .flush, .din(fd), .cout(cd), .ok, .write,
                   .ret_en(free_en), .ret_pd(free_pd), .rev_arch);
  hold_unit dut (.clk, .rst, .din(cd), .din_valid(fd_valid), .din_ok(ok), .write,
                 .free_en, .free_pd, .rev_arch, .flush, .redirect, .fb_en, .fb_pc, .fb_taken,
                 .dm_en, .dm_rnw, .dm_addr, .dm_wdata, .dm_rdata, .dm_ready,
                 .arch_regs, .flags, .halted, .dump, .retire_en);
  data_memory u_dm (.clk, .rst, .en(dm_en), .rnw(dm_rnw), .addr(dm_addr), .wdata(dm_wdata),
                    .rdata(dm_rdata), .ready(dm_ready), .busy(dm_busy));

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d (%h) expected %0d (%h)", what, got, got, exp, exp); end
  endtask

  function automatic dec_t alui(input alu_op_t op, input int rd, input int rn, input int imm);
    dec_t d;
    d = '0;
    d.cls = CLS_ALU; d.op = op; d.rd = 4'(rd); d.rn = 4'(rn); d.use_imm = 1; d.imm = word_t'(imm);
    d.rn_used = !(op inside {OP_MOV, OP_MVN}); d.rd_write = 1;
    return d;
  endfunction

  function automatic dec_t alur(input alu_op_t op, input int rd, input int rn, input int rm);
    dec_t d;
    d = alui(op, rd, rn, 0);
    d.use_imm = 0; d.rm = 4'(rm); d.rm_used = 1;
    return d;
  endfunction

  function automatic dec_t ld(input int rd, input int off);
    dec_t d;
    d = '0;
    d.cls = CLS_LS; d.ls_load = 1; d.ls_up = 1; d.rd = 4'(rd); d.rn = 0; d.rn_used = 1;
    d.imm = word_t'(off); d.rd_write = 1;
    return d;
  endfunction

  // Feed one instruction, waiting while the unit stalls.
  task automatic feed(input dec_t d);
    fd = d; fd_valid = 1;
    #1;
    while (!write) begin
      stalls++;
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
    fd_valid = 0;
  endtask

  always @(posedge clk) if (flush) flushes++;

  initial begin
    fd = '0;
    @(posedge clk); #1; rst = 0;
    // dependent and independent ALU work
    feed(alui(OP_MOV, 1, 0, 7));          // R1 = 7
    feed(alur(OP_ADD, 2, 1, 1));          // R2 = 14
    feed(alui(OP_MOV, 3, 0, 100));        // R3 = 100
    feed(alur(OP_SUB, 4, 3, 2));          // R4 = 86
    feed(alui(OP_ADD, 1, 1, 1));          // R1 = 8 (rename of R1)
    // slow loads at the head, then more than a pool of ALU work
    for (int i = 0; i < 10; i++) feed(ld(5 + i % 3, 16 + 4 * i));  // words 4..13
    for (int i = 0; i < 70; i++) feed(alui(OP_ADD, 8 + i % 2, 8 + i % 2, 1));
    feed(alur(OP_ADD, 10, 5, 7));         // R10 = 25
    // mispredicted branch: BEQ predicted taken while Z is clear
    begin
      dec_t br;
      br = '0; br.cls = CLS_BR; br.cond = 4'h0; br.pred_taken = 1;
      br.pc = 32'h300; br.altaddr = 32'h304;
      feed(br);
    end
    feed(alui(OP_MOV, 11, 0, 99));        // wrong path: must not commit
    repeat (300) @(posedge clk);
    #1;
    // work fed after the flush must commit
    feed(alui(OP_MOV, 12, 0, 42));
    feed(alur(OP_ADD, 13, 12, 1));
    repeat (20) @(posedge clk);
    #1;
    chk("R12 after flush", arch_regs[12], 42);
    chk("R13 after flush", arch_regs[13], 50);
    chk("R1", arch_regs[1], 8);
    chk("R2", arch_regs[2], 14);
    chk("R3", arch_regs[3], 100);
    chk("R4", arch_regs[4], 86);
    chk("R5", arch_regs[5], 13);
    chk("R6", arch_regs[6], 11);
    chk("R7", arch_regs[7], 12);
    chk("R8", arch_regs[8], 35);
    chk("R9", arch_regs[9], 35);
    chk("R10", arch_regs[10], 25);
    chk("wrong path not committed", arch_regs[11], 0);
    chk("one flush", flushes, 1);
    chk("feed stalled", stalls > 0, 1);
    for (int i = 0; i < NSLOTS; i++) chk($sformatf("slot %0d empty", i), dut.views[i].empty, 1);
    $display("stalls=%0d flushes=%0d", stalls, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the redirect reported with the flush
  always @(posedge clk) if (flush) begin
    checks++;
    if (redirect != 32'h304) begin failures++; $display("FAIL redirect %h", redirect); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

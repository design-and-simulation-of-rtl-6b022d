// tb_exec_regs: dispatches instructions straight into the execution and
// register unit, with the data memory attached. Checks both ALUs working
// in one cycle with notify and done reports, operands from architectural
// and physical registers and immediates, the valid bits, the copy to the
// architectural file, flags and flag masks, carry-in, a store completing at
// once, and a load that holds the unit busy until the memory answers.
module tb_exec_regs;
  import ss_pkg::*;

  logic clk = 0, rst = 1;
  logic alu0_en = 0, alu1_en = 0, ls_en = 0, cin = 0, ls_idle;
  slot_t alu0_slot = '0, alu1_slot = '0, ls_slot = '0;
  col_t alu0_ins, alu1_ins, ls_ins;
  notify_t [NEXEC-1:0] notify;
  compl_t [NEXEC-1:0] done;
  logic [NPREG-1:0] preg_valid;
  logic alloc_en = 0, copy_en = 0;
  preg_t alloc_pd = '0, copy_pd = '0;
  areg_t copy_arch = '0;
  word_t arch_regs [NARCH];
  logic dm_en, dm_rnw, dm_ready, dm_busy;
  logic [9:0] dm_addr;
  word_t dm_wdata, dm_rdata;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  exec_regs dut (.clk, .rst, .alu0_en, .alu0_slot, .alu0_ins, .alu1_en, .alu1_slot, .alu1_ins,
                 .ls_en, .ls_slot, .ls_ins, .cin, .ls_idle, .notify, .done, .preg_valid,
                 .alloc_en, .alloc_pd, .copy_en, .copy_pd, .copy_arch, .arch_regs,
                 .dm_en, .dm_rnw, .dm_addr, .dm_wdata, .dm_rdata, .dm_ready);
  data_memory u_dm (.clk, .rst, .en(dm_en), .rnw(dm_rnw), .addr(dm_addr), .wdata(dm_wdata),
                    .rdata(dm_rdata), .ready(dm_ready), .busy(dm_busy));

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d (%h) expected %0d (%h)", what, got, got, exp, exp); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  function automatic col_t alu_i(input alu_op_t op, input logic s, input int pd,
                                 input int p1, input logic a1, input logic u1,
                                 input logic imm, input int v2, input logic a2);
    col_t x;
    x = '0;
    x.d.cls = CLS_ALU; x.d.op = op; x.d.s = s; x.d.use_imm = imm;
    x.d.imm = word_t'(v2);
    x.o1 = '{num: preg_t'(p1), arch: a1, used: u1};
    x.o2 = '{num: preg_t'(v2), arch: a2, used: !imm};
    x.pd = preg_t'(pd); x.pd_valid = !(op inside {OP_CMP, OP_CMN, OP_TST, OP_TEQ});
    return x;
  endfunction

  task automatic copy(input int p, input int a);
    copy_en = 1; copy_pd = preg_t'(p); copy_arch = areg_t'(a); tick(); copy_en = 0;
  endtask

  int lat;

  initial begin
    alu0_ins = '0; alu1_ins = '0; ls_ins = '0;
    tick(); rst = 0;
    // two ALUs at once: P1 = 10 ; P2 = A0 + 3
    alu0_en = 1; alu0_slot = 6'd4; alu0_ins = alu_i(OP_MOV, 0, 1, 0, 0, 0, 1, 10, 0);
    alu1_en = 1; alu1_slot = 6'd5; alu1_ins = alu_i(OP_ADD, 0, 2, 0, 1, 1, 1, 3, 0);
    #1;
    chk("notify0", {notify[0].en, notify[0].num}, {1'b1, 6'd1});
    chk("notify1", {notify[1].en, notify[1].num}, {1'b1, 6'd2});
    chk("done0", {done[0].en, done[0].slot}, {1'b1, 6'd4});
    chk("done1", {done[1].en, done[1].slot}, {1'b1, 6'd5});
    chk("no S no mask", done[0].fmask, 0);
    tick(); alu0_en = 0; alu1_en = 0;
    chk("valid P1 P2", preg_valid[2:1], 2'b11);
    copy(1, 5); copy(2, 6);
    chk("A5 = 10", arch_regs[5], 10);
    chk("A6 = 3", arch_regs[6], 3);
    // SUBS P3 = P2 - P1 = -7 : N set, C clear
    alu0_en = 1; alu0_slot = 6'd7; alu0_ins = alu_i(OP_SUB, 1, 3, 2, 0, 1, 0, 1, 0);
    #1;
    chk("SUBS flags", done[0].flags, 4'b1000);
    chk("SUBS mask", done[0].fmask, 4'b1111);
    tick(); alu0_en = 0;
    copy(3, 7);
    chk("A7 = -7", arch_regs[7], 32'hfffffff9);
    // ADC with carry in, register from the architectural file (A5)
    cin = 1;
    alu1_en = 1; alu1_slot = 6'd1; alu1_ins = alu_i(OP_ADC, 0, 4, 5, 1, 1, 0, 6, 1);
    tick(); alu1_en = 0; cin = 0;
    copy(4, 8);
    chk("ADC A5+A6+1", arch_regs[8], 14);
    // logical op with S: only N and Z
    alu0_en = 1; alu0_ins = alu_i(OP_AND, 1, 5, 1, 0, 1, 1, 0, 0);
    #1;
    chk("AND mask", done[0].fmask, 4'b1100);
    chk("AND Z", done[0].flags[2], 1);
    tick(); alu0_en = 0;
    // allocation clears the valid bit
    alloc_en = 1; alloc_pd = 6'd1; tick(); alloc_en = 0;
    chk("valid cleared", preg_valid[1], 0);
    // store A5 (10) to A6 + 5 = byte 8, word 2
    ls_ins = '0; ls_ins.d.cls = CLS_LS; ls_ins.d.ls_load = 0; ls_ins.d.ls_up = 1; ls_ins.d.imm = 5;
    ls_ins.o1 = '{num: 6'd6, arch: 1'b1, used: 1'b1};
    ls_ins.o2 = '{num: 6'd5, arch: 1'b1, used: 1'b1};
    ls_en = 1; ls_slot = 6'd9; #1;
    chk("store done at once", {done[2].en, done[2].slot}, {1'b1, 6'd9});
    chk("store addr", dm_addr, 2);
    tick(); ls_en = 0;
    chk("stored", u_dm.mem[2], 10);
    // load word 2 into P6 via base P3 (-7) + 15 = 8
    ls_ins.d.ls_load = 1; ls_ins.d.imm = 15;
    ls_ins.o1 = '{num: 6'd3, arch: 1'b0, used: 1'b1};
    ls_ins.o2 = '0;
    ls_ins.pd = 6'd6; ls_ins.pd_valid = 1;
    ls_en = 1; ls_slot = 6'd10; #1;
    chk("load not done at once", done[2].en, 0);
    tick(); ls_en = 0;
    lat = 1;
    while (!notify[2].en && lat < 20) begin
      chk("busy", ls_idle, 0);
      tick(); lat++;
    end
    chk("load done slot", {done[2].en, done[2].slot}, {1'b1, 6'd10});
    chk("load notify", notify[2].num, 6);
    chk("latency within period", lat <= 8, 1);
    tick();
    chk("idle again", ls_idle, 1);
    copy(6, 9);
    chk("A9 loaded", arch_regs[9], 10);
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

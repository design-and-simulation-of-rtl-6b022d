// tb_feeder: runs the feeder against a small program held in the
// testbench. Checks the decoded fields of ALU, load, store, branch and
// special instructions; that a stall (accept low) holds the output and the
// PC; that a predicted-taken backward branch is followed at once, with the
// fall-through as alternative; and that a flush empties the output and
// restarts fetching at the redirect address.
module tb_feeder;
  import ss_pkg::*;
  import arm_asm_pkg::*;

  logic clk = 0, rst = 1, accept = 0, flush = 0, fb_en = 0, fb_taken = 0;
  word_t imem_addr, imem_data, redirect = '0, fb_pc = '0;
  dec_t out;
  logic out_valid;
  word_t prog [64];
  int checks = 0, failures = 0;

  always #5 clk = !clk;
  assign imem_data = prog[imem_addr[7:2]];

  feeder dut (.clk, .rst, .imem_addr, .imem_data, .out, .out_valid, .accept,
              .flush, .redirect, .fb_en, .fb_pc, .fb_taken);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) prog[i] = nop();
    prog[0] = dpi(SUB, 1, 3, 4, 7);          // SUBS R3,R4,#7
    prog[1] = dpr(MOV, 0, 5, 0, 6);          // MOV R5,R6
    prog[2] = ldr(7, 8, 12);                 // LDR R7,[R8,#12]
    prog[3] = str(9, 10, 4);                 // STR R9,[R10,#4]
    prog[4] = dpr(CMP, 1, 0, 1, 2);          // CMP R1,R2
    prog[5] = b(NE, 5, 1);                   // BNE 1 (backward, predicted taken)
    prog[6] = hlt();
    @(posedge clk); #1; rst = 0;
    @(posedge clk); #1;
    chk("valid after reset", out_valid, 1);
    chk("pc0", out.pc, 0);
    chk("SUBS class", out.cls, CLS_ALU);
    chk("SUBS op", out.op, OP_SUB);
    chk("SUBS s", out.s, 1);
    chk("SUBS rd", out.rd, 3);
    chk("SUBS rn", out.rn, 4);
    chk("SUBS imm", out.imm, 7);
    chk("SUBS use_imm", out.use_imm, 1);
    chk("SUBS rm_used", out.rm_used, 0);
    chk("SUBS rd_write", out.rd_write, 1);
    // stall: hold for 3 cycles
    repeat (3) begin @(posedge clk); #1; end
    chk("stalled pc", out.pc, 0);
    accept = 1;
    @(posedge clk); #1;
    chk("MOV pc", out.pc, 4);
    chk("MOV rn_used", out.rn_used, 0);
    chk("MOV rm", out.rm, 6);
    chk("MOV rm_used", out.rm_used, 1);
    @(posedge clk); #1;
    chk("LDR class", out.cls, CLS_LS);
    chk("LDR load", out.ls_load, 1);
    chk("LDR rd", out.rd, 7);
    chk("LDR rd_write", out.rd_write, 1);
    chk("LDR base", out.rn, 8);
    chk("LDR off", out.imm, 12);
    @(posedge clk); #1;
    chk("STR load", out.ls_load, 0);
    chk("STR data reg", out.rm, 9);
    chk("STR rm_used", out.rm_used, 1);
    chk("STR rd_write", out.rd_write, 0);
    @(posedge clk); #1;
    chk("CMP rd_write", out.rd_write, 0);
    @(posedge clk); #1;
    chk("B class", out.cls, CLS_BR);
    chk("B cond", out.cond, NE);
    chk("B predicted", out.pred_taken, 1);
    chk("B alt", out.altaddr, 24);
    @(posedge clk); #1;
    chk("followed prediction", out.pc, 4);
    // flush to HLT at 24
    flush = 1; redirect = 24;
    @(posedge clk); #1;
    flush = 0;
    chk("flush empties", out_valid, 0);
    @(posedge clk); #1;
    chk("redirected", out.pc, 24);
    chk("HLT class", out.cls, CLS_SPEC);
    chk("HLT code", out.special, SPEC_HLT);
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

// tb_retire: presents slot contents to the retirement unit directly. Checks
// that nothing retires until the head slot is complete, that the counter
// advances, P->A copy and register freeing, the flag update under the flag
// mask, a correctly predicted branch (feedback only), a wrongly predicted
// one (flush, redirect, counter back to 0), REG and HLT.
module tb_retire;
  import ss_pkg::*;

  logic clk = 0, rst = 1;
  slot_t head;
  slot_view_t hv;
  logic retire_en, copy_en, free_en, flush, fb_en, fb_taken, halted, dump;
  preg_t copy_pd, free_pd;
  word_t redirect, fb_pc;
  flags_t flags;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  retire dut (.clk, .rst, .head, .hv, .retire_en, .copy_en, .copy_pd, .free_en, .free_pd,
              .flush, .redirect, .fb_en, .fb_pc, .fb_taken, .flags, .halted, .dump);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d (%h) expected %0d (%h)", what, got, got, exp, exp); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  function automatic slot_view_t mk(input iclass_t c, input logic comp);
    slot_view_t v;
    v = '0;
    v.ins.d.cls = c;
    v.complete = comp;
    return v;
  endfunction

  initial begin
    hv = '0; hv.empty = 1;
    tick(); rst = 0;
    chk("empty: no retire", retire_en, 0);
    hv = mk(CLS_ALU, 0); #1;
    chk("incomplete: no retire", retire_en, 0);
    // complete ALU with destination and flags (SUBS giving Z and C)
    hv.complete = 1; hv.ins.pd = 6'd12; hv.ins.pd_valid = 1;
    hv.flags = 4'b0110; hv.fmask = 4'b1111; #1;
    chk("retire", retire_en, 1);
    chk("copy", {copy_en, copy_pd}, {1'b1, 6'd12});
    chk("free", {free_en, free_pd}, {1'b1, 6'd12});
    tick();
    chk("head advanced", head, 1);
    chk("flags committed", flags, 4'b0110);
    // logical op with S: only N/Z may change
    hv.flags = 4'b1001; hv.fmask = 4'b1100; tick();
    chk("masked flags", flags, 4'b1010);
    // branch BNE predicted not taken, Z clear -> should be taken: mispredict
    hv = mk(CLS_BR, 1); hv.ins.d.cond = 4'h1; hv.ins.d.pred_taken = 0;
    hv.ins.d.pc = 32'h40; hv.ins.d.altaddr = 32'h80; #1;
    chk("fb", {fb_en, fb_taken}, 2'b11);
    chk("fb pc", fb_pc, 32'h40);
    chk("mispredict flush", flush, 1);
    chk("redirect", redirect, 32'h80);
    chk("no copy for branch", copy_en, 0);
    tick();
    chk("head reset", head, 0);
    // BNE predicted taken, correct
    hv.ins.d.pred_taken = 1; #1;
    chk("correct: no flush", flush, 0);
    chk("correct: feedback", fb_en, 1);
    tick();
    chk("head 1", head, 1);
    // set Z, then BEQ predicted not taken is wrong
    hv = mk(CLS_ALU, 1); hv.flags = 4'b0100; hv.fmask = 4'b1111; tick();
    hv = mk(CLS_BR, 1); hv.ins.d.cond = 4'h0; hv.ins.d.pred_taken = 0; #1;
    chk("BEQ taken", fb_taken, 1);
    chk("BEQ flush", flush, 1);
    tick();
    // REG and HLT
    hv = mk(CLS_SPEC, 1); hv.ins.d.special = SPEC_REG; #1;
    chk("dump", dump, 1);
    tick();
    hv.ins.d.special = SPEC_HLT; tick();
    chk("halted", halted, 1);
    hv = mk(CLS_ALU, 1); #1;
    chk("nothing after HLT", retire_en, 0);
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

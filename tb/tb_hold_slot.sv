// tb_hold_slot: loads instructions into one slot and checks its flags.
// An ALU instruction waiting on two physical registers becomes ready only
// after both are notified; an operand already valid, or notified in the
// loading cycle, is available at once; an architectural operand never
// waits. Completion stores the flags and drops ready; mark_empty and flush
// empty the slot; branches are complete on entry; a load/store raises
// ready_ls, not ready.
module tb_hold_slot;
  import ss_pkg::*;

  logic clk = 0, rst = 1, flush = 0, write = 0, done = 0, mark_empty = 0;
  col_t din;
  logic [NPREG-1:0] preg_valid = '0;
  notify_t [NEXEC-1:0] notify;
  flags_t done_flags = '0, done_fmask = '0;
  slot_view_t view;
  logic ready, ready_ls;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  hold_slot dut (.clk, .rst, .flush, .write, .din, .preg_valid, .notify, .done,
                 .done_flags, .done_fmask, .mark_empty, .view, .ready, .ready_ls);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  function automatic col_t mk(input iclass_t c, input int p1, input logic a1, input int p2, input logic a2);
    col_t x;
    x = '0;
    x.d.cls = c;
    x.o1 = '{num: preg_t'(p1), arch: a1, used: 1'b1};
    x.o2 = '{num: preg_t'(p2), arch: a2, used: 1'b1};
    x.pd = 6'd9; x.pd_valid = 1'b1;
    return x;
  endfunction

  initial begin
    notify = '0;
    din = '0;
    tick(); rst = 0;
    chk("empty after reset", view.empty, 1);
    // ALU waiting on P5 and P6
    din = mk(CLS_ALU, 5, 0, 6, 0); write = 1; tick(); write = 0;
    chk("full", view.empty, 0);
    chk("not ready", ready, 0);
    notify[0] = '{en: 1'b1, num: 6'd6}; tick(); notify = '0;
    chk("one operand", ready, 0);
    notify[2] = '{en: 1'b1, num: 6'd5}; tick(); notify = '0;
    chk("ready", ready, 1);
    chk("not ready_ls", ready_ls, 0);
    done = 1; done_flags = 4'b0110; done_fmask = 4'b1111; tick(); done = 0;
    chk("complete", view.complete, 1);
    chk("ready drops", ready, 0);
    chk("flags", view.flags, 4'b0110);
    mark_empty = 1; tick(); mark_empty = 0;
    chk("marked empty", view.empty, 1);
    // operand valid already / notified while loading / architectural
    preg_valid[7] = 1;
    notify[1] = '{en: 1'b1, num: 6'd8};
    din = mk(CLS_ALU, 7, 0, 8, 0); write = 1; tick(); write = 0; notify = '0;
    chk("ready at once", ready, 1);
    flush = 1; tick(); flush = 0;
    chk("flushed", view.empty, 1);
    chk("flushed not ready", ready, 0);
    din = mk(CLS_LS, 3, 1, 40, 0); write = 1; tick(); write = 0;
    chk("LS waits", ready_ls, 0);
    notify[1] = '{en: 1'b1, num: 6'd40}; tick(); notify = '0;
    chk("LS ready", ready_ls, 1);
    chk("LS not ALU-ready", ready, 0);
    mark_empty = 1; tick(); mark_empty = 0;
    din = mk(CLS_BR, 0, 0, 0, 0); write = 1; tick(); write = 0;
    chk("branch complete on entry", view.complete, 1);
    chk("branch not ready", ready, 0);
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

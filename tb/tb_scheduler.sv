// tb_scheduler: random ready patterns; checks the three dispatch choices
// against a reference search for the lowest-numbered candidates, and that
// the two ALU choices never coincide.
module tb_scheduler;
  import ss_pkg::*;

  logic [NSLOTS-1:0] ready, ready_ls;
  logic ls_idle, a0e, a1e, lse;
  slot_t a0, a1, ls;
  int checks = 0, failures = 0;

  scheduler dut (.ready, .ready_ls, .ls_idle, .alu0_en(a0e), .alu0_slot(a0),
                 .alu1_en(a1e), .alu1_slot(a1), .ls_en(lse), .ls_slot(ls));

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int e0, e1, el, cnt;
      ready    = {$urandom, $urandom};
      ready_ls = {$urandom, $urandom};
      // sparse patterns too
      if (t % 3 == 0) ready = ready & {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      if (t % 4 == 0) ready_ls = ready_ls & {$urandom, $urandom} & {$urandom, $urandom};
      if (t % 50 == 0) ready = '0;
      ls_idle = $urandom_range(0, 3) != 0;
      #1;
      e0 = -1; e1 = -1; el = -1; cnt = 0;
      for (int i = 0; i < NSLOTS; i++) begin
        if (ready[i]) begin
          if (cnt == 0) e0 = i; else if (cnt == 1) e1 = i;
          cnt++;
        end
        if (ready_ls[i] && el < 0) el = i;
      end
      if (!ls_idle) el = -1;
      checks++;
      if (a0e !== (e0 >= 0) || (e0 >= 0 && a0 != slot_t'(e0)) ||
          a1e !== (e1 >= 0) || (e1 >= 0 && a1 != slot_t'(e1)) ||
          lse !== (el >= 0) || (el >= 0 && ls != slot_t'(el)) ||
          (a0e && a1e && a0 == a1)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d: %b/%0d %b/%0d %b/%0d exp %0d %0d %0d", t, a0e, a0, a1e, a1, lse, ls, e0, e1, el);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ss_cpu: end-to-end test of the superscalar core at its default sizes.
//
// Runs four programs, each loaded through the program-memory port while the
// core is held in reset, and compares the committed registers at HLT with
// values computed here: 5! and 12! by repeated addition, the "infrequent
// branch" loop (twelve passes over twelve rarely taken branches), and a
// memory program that stores, reloads and chains eight loads ahead of a
// long run of ALU work so that the pool and the free-register list fill.
// It counts how often each mechanism of the core happens (feed stall,
// correct and wrong predictions with flush, dual ALU issue, out-of-order
// issue, operands read from the architectural file, register freeing,
// loads waiting on memory, stores, REG dump) and fails any that never does.
// Cycle counts are printed and checked against the schedule-independent bound
// of one retirement per cycle and a generous upper limit.
module tb_ss_cpu;
  import ss_pkg::*;
  import arm_asm_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic load_en = 1'b0;
  logic [9:0] load_addr = '0;
  word_t load_data = '0;
  word_t arch_regs [NARCH];
  flags_t flags;
  logic halted, dump, retire_en, flush, feed_stall;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  ss_cpu dut (
    .clk, .rst, .load_en, .load_addr, .load_data,
    .arch_regs, .flags, .halted, .dump, .retire_en, .flush, .feed_stall
  );

  // Mechanism counters
  int n_stall, n_flush, n_good_pred, n_dual, n_ooo, n_arch_op, n_free, n_ldwait,
      n_store, n_dump, n_retired;

  always @(posedge clk) if (!rst) begin
    if (feed_stall) n_stall++;
    if (flush) n_flush++;
    if (dut.u_hold.fb_en && !flush) n_good_pred++;
    if (dut.u_hold.alu0_en && dut.u_hold.alu1_en) n_dual++;
    if (dut.u_hold.alu0_en && dut.u_hold.alu0_slot != dut.u_hold.head &&
        !dut.u_hold.views[dut.u_hold.head].empty &&
        !dut.u_hold.views[dut.u_hold.head].complete) n_ooo++;
    if (dut.u_hold.write && ((dut.cd.o1.used && dut.cd.o1.arch) ||
                             (dut.cd.o2.used && dut.cd.o2.arch))) n_arch_op++;
    if (dut.u_hold.free_en) n_free++;
    if (dut.u_dmem.busy) n_ldwait++;
    if (dut.u_dmem.en && !dut.u_dmem.rnw) n_store++;
    if (dump) n_dump++;
    if (retire_en) n_retired++;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h), expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  // Load a program and run it to HLT; returns cycles from reset release.
  task automatic run(input prog_t p, input string name, output longint cycles,
                     output longint retired);
    longint start;
    rst = 1'b1;
    for (int i = 0; i < 1024; i++) begin
      load_en   = 1'b1;
      load_addr = 10'(i);
      load_data = (i < p.size()) ? p[i] : hlt();
      @(posedge clk);
      #1;
    end
    load_en = 1'b0;
    @(posedge clk); #1;
    n_retired = 0;
    rst   = 1'b0;
    start = cyc;
    while (!halted && cyc - start < 20000) begin
      @(posedge clk); #1;
    end
    cycles  = cyc - start;
    retired = n_retired;
    checks++;
    if (!halted) begin
      failures++;
      $display("FAIL %s: no HLT", name);
    end
    $display("%s: %0d cycles, %0d instructions retired", name, cycles, retired);
  endtask

  longint c, r;
  prog_t  mp;

  initial begin
    // Factorial 5 and 12
    run(factorial(5), "factorial 5", c, r);
    check("5! in R4", arch_regs[4], 120);
    check("R3 after 5!", arch_regs[3], 0);
    checks++; if (c > 400) begin failures++; $display("FAIL 5! too slow"); end
    run(factorial(12), "factorial 12", c, r);
    check("12! in R4", arch_regs[4], 32'h1C8CFC00);
    checks++; if (c < r - 1) begin failures++; $display("FAIL more than one retire/cycle"); end
    checks++; if (c > 2000) begin failures++; $display("FAIL 12! too slow"); end

    // Infrequent branching
    run(infrequent(), "infrequent branch", c, r);
    for (int k = 1; k <= 12; k++) check($sformatf("R%0d", k), arch_regs[k], 78 - k);
    check("R13", arch_regs[13], 0);
    check("R14", arch_regs[14], 123);

    // Memory and pool pressure
    mp = {};
    mp.push_back(dpi(MOV, 0, 1, 0, 5));
    mp.push_back(str(1, 0, 16'h40));        // mem[16] = 5
    mp.push_back(ldr(2, 0, 16'h40));        // R2 = 5
    mp.push_back(ldr(3, 0, 16'h44));        // R3 = mem[17] = 17 (power-up value)
    mp.push_back(dpi(ADD, 0, 13, 3, 1));    // both wait for R3: dual issue
    mp.push_back(dpi(ADD, 0, 14, 3, 2));
    for (int i = 0; i < 6; i++) mp.push_back(ldr(6 + i % 3, 0, 16'h48 + 4 * i));
    for (int i = 0; i < 90; i++) mp.push_back(dpi(ADD, 0, 9 + i % 4, 9 + i % 4, 1));
    mp.push_back(dpr(ADD, 0, 5, 2, 3));     // R5 = 22
    mp.push_back(str(5, 0, 16'h80));        // mem[32] = 22
    mp.push_back(ldr(4, 0, 16'h80));        // R4 = 22
    mp.push_back(hlt());
    run(mp, "memory", c, r);
    check("stored and reloaded R2", arch_regs[2], 5);
    check("power-up word R3", arch_regs[3], 17);
    check("load R6", arch_regs[6], 21);     // last load to R6 is word 21
    check("load R8", arch_regs[8], 23);
    check("R9 chain", arch_regs[9], 23);
    check("R12 chain", arch_regs[12], 22);
    check("store-load R4", arch_regs[4], 22);
    check("R13 = R3 + 1", arch_regs[13], 18);
    check("R14 = R3 + 2", arch_regs[14], 19);

    $display("mechanisms: stall=%0d flush=%0d goodpred=%0d dual=%0d ooo=%0d archop=%0d free=%0d ldwait=%0d store=%0d dump=%0d",
             n_stall, n_flush, n_good_pred, n_dual, n_ooo, n_arch_op, n_free, n_ldwait, n_store, n_dump);
    check("feed stall seen", n_stall > 0, 1);
    check("flush seen", n_flush > 0, 1);
    check("correct prediction seen", n_good_pred > 0, 1);
    check("dual issue seen", n_dual > 0, 1);
    check("out-of-order issue seen", n_ooo > 0, 1);
    check("architectural operand seen", n_arch_op > 0, 1);
    check("register freeing seen", n_free > 0, 1);
    check("load wait seen", n_ldwait > 0, 1);
    check("store seen", n_store > 0, 1);
    check("REG dump seen", n_dump > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

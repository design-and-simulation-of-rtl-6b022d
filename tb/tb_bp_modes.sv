// tb_bp_modes: the two benchmark programs of the original work, under every branch
// prediction method.
//
// Four copies of the core run side by side, one per predictor mode of the
// feeder (0 never taken, 1 always taken, 2 one-bit table, 3 two-bit table;
// mode 3 is the default and is instantiated without a parameter list). Each
// copy gets the same program through its load port, runs to HLT, and has
// its committed registers compared with values computed here. The programs
// are factorial 5 and 12 (multiplication by repeated addition in a
// subroutine) and the "infrequent branch" loop: twelve passes over twelve
// forward branches that are each taken only once.
// Besides the results the test checks the orderings the predictors must
// show on these programs whatever the pipeline's exact timing: on the
// infrequent-branch loop, whose branches are mostly not taken, the static
// "always taken" method is the slowest and "never taken" beats it; on
// factorial, whose branches are mostly taken, the two-bit table beats
// "never taken". Cycle counts are printed for comparison.
module tb_bp_modes;
  import ss_pkg::*;
  import arm_asm_pkg::*;

  localparam int NM = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic load_en = 1'b0;
  logic [9:0] load_addr = '0;
  word_t load_data = '0;

  word_t  regs   [NM][NARCH];
  flags_t flags  [NM];
  logic   halted [NM];
  logic   dump [NM], ret [NM], fl [NM], stall [NM];

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar m = 0; m < NM; m++) begin : g_cpu
    if (m == 3) begin : g_default
      ss_cpu u_cpu (
        .clk, .rst, .load_en, .load_addr, .load_data,
        .arch_regs(regs[m]), .flags(flags[m]), .halted(halted[m]), .dump(dump[m]),
        .retire_en(ret[m]), .flush(fl[m]), .feed_stall(stall[m])
      );
    end else begin : g_mode
      ss_cpu #(.BP_MODE(m)) u_cpu (
        .clk, .rst, .load_en, .load_addr, .load_data,
        .arch_regs(regs[m]), .flags(flags[m]), .halted(halted[m]), .dump(dump[m]),
        .retire_en(ret[m]), .flush(fl[m]), .feed_stall(stall[m])
      );
    end
  end

  longint done_at [NM];
  int     flushes [NM];
  longint start;

  always @(posedge clk) if (!rst)
    for (int m = 0; m < NM; m++) begin
      if (halted[m] && done_at[m] < 0) done_at[m] = cyc - start;
      if (fl[m]) flushes[m]++;
    end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input prog_t p, input string name);
    bit all;
    rst = 1'b1;
    for (int i = 0; i < 1024; i++) begin
      load_en   = 1'b1;
      load_addr = 10'(i);
      load_data = (i < p.size()) ? p[i] : hlt();
      @(posedge clk); #1;
    end
    load_en = 1'b0;
    for (int m = 0; m < NM; m++) begin done_at[m] = -1; flushes[m] = 0; end
    @(posedge clk); #1;
    rst   = 1'b0;
    start = cyc;
    do begin
      @(posedge clk); #1;
      all = 1;
      for (int m = 0; m < NM; m++) if (!halted[m]) all = 0;
    end while (!all && cyc - start < 20000);
    @(posedge clk); #1;   // let the last finisher be recorded
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (!halted[m]) begin failures++; $display("FAIL %s mode %0d: no HLT", name, m); end
    end
    $display("%s: never=%0d always=%0d 1-bit=%0d 2-bit=%0d cycles; flushes %0d/%0d/%0d/%0d",
             name, done_at[0], done_at[1], done_at[2], done_at[3],
             flushes[0], flushes[1], flushes[2], flushes[3]);
  endtask

  longint fact12 [NM];

  initial begin
    run(factorial(5), "factorial 5");
    for (int m = 0; m < NM; m++) check($sformatf("5! mode %0d", m), regs[m][4], 120);

    run(factorial(12), "factorial 12");
    for (int m = 0; m < NM; m++) begin
      check($sformatf("12! mode %0d", m), regs[m][4], 32'h1C8CFC00);
      fact12[m] = done_at[m];
    end
    checks++;
    if (!(fact12[3] < fact12[0])) begin
      failures++; $display("FAIL 2-bit not faster than never-taken on factorial");
    end

    run(infrequent(), "infrequent branch");
    for (int m = 0; m < NM; m++) begin
      for (int k = 1; k <= 12; k++)
        check($sformatf("mode %0d R%0d", m, k), regs[m][k], 78 - k);
      check($sformatf("mode %0d R14", m), regs[m][14], 123);
    end
    checks++;
    if (!(done_at[1] > done_at[0] && done_at[1] > done_at[2] && done_at[1] > done_at[3])) begin
      failures++; $display("FAIL always-taken is not the slowest on the infrequent-branch test");
    end
    checks++;
    if (!(flushes[1] > flushes[3])) begin
      failures++; $display("FAIL always-taken does not mispredict more than 2-bit");
    end

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

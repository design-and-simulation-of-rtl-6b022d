// tb_branch_predictor: checks the four prediction methods side by side.
// Non-branches must give pc + 4; branches must give the ARM target
// (pc + 8 + 4 * offset) and the fall-through, crossed over by the
// prediction. The two-bit table starts weakly taken, saturates at 0 and 3,
// and survives a single not-taken outcome (the loop-exit case); the one-bit
// table flips on every outcome; entries are indexed by pc[11:2], so two
// branches 4 kB apart share one.
module tb_branch_predictor;
  import ss_pkg::*;

  logic clk = 0, rst = 1;
  word_t pc = '0, fb_pc = '0;
  logic is_branch = 0, fb_en = 0, fb_taken = 0;
  logic [23:0] offset = '0;
  word_t np [4], ap [4];
  logic pt [4];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  for (genvar m = 0; m < 4; m++) begin : g_m
    if (m == 3) begin : g_def
      branch_predictor dut (.clk, .rst, .pc, .is_branch, .offset, .fb_en, .fb_pc, .fb_taken,
                            .next_pc(np[m]), .alt_pc(ap[m]), .pred_taken(pt[m]));
    end else begin : g_alt
      branch_predictor #(.MODE(m)) dut (.clk, .rst, .pc, .is_branch, .offset, .fb_en, .fb_pc,
                            .fb_taken, .next_pc(np[m]), .alt_pc(ap[m]), .pred_taken(pt[m]));
    end
  end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  // Expect, for the branch at address a, predictions p[m] per mode.
  task automatic expect_pred(input word_t a, input logic [23:0] off, input logic [3:0] p);
    word_t tgt;
    pc = a; offset = off; is_branch = 1; #1;
    tgt = a + 8 + {{6{off[23]}}, off, 2'b00};
    for (int m = 0; m < 4; m++) begin
      chk($sformatf("mode %0d pred @%h", m, a), pt[m], p[m]);
      chk($sformatf("mode %0d next", m), np[m], p[m] ? tgt : a + 4);
      chk($sformatf("mode %0d alt", m), ap[m], p[m] ? a + 4 : tgt);
    end
  endtask

  task automatic feedback(input word_t a, input logic t);
    fb_en = 1; fb_pc = a; fb_taken = t;
    @(posedge clk); #1;
    fb_en = 0;
  endtask

  initial begin
    @(posedge clk); #1; rst = 0;
    // non-branch
    pc = 32'h100; is_branch = 0; #1;
    for (int m = 0; m < 4; m++) begin
      chk("non-branch next", np[m], 32'h104);
      chk("non-branch pred", pt[m], 0);
    end
    // fresh entry: never, always, 1-bit taken, 2-bit weakly taken
    expect_pred(32'h200, 24'hfffffc, 4'b1110);   // backward offset -4
    feedback(32'h200, 1);                        // 2-bit -> 3
    feedback(32'h200, 1);                        // stays 3
    feedback(32'h200, 0);                        // 2-bit -> 2, 1-bit -> 0
    expect_pred(32'h200, 24'h000010, 4'b1010);
    feedback(32'h200, 0);                        // 2-bit -> 1
    expect_pred(32'h200, 24'h000010, 4'b0010);
    feedback(32'h200, 0);                        // 2-bit -> 0
    feedback(32'h200, 0);                        // stays 0
    feedback(32'h200, 1);                        // 2-bit -> 1, 1-bit -> 1
    expect_pred(32'h200, 24'h000010, 4'b0110);
    feedback(32'h200, 1);                        // 2-bit -> 2
    expect_pred(32'h200, 24'h000010, 4'b1110);
    // aliasing 4 kB apart, and an untouched neighbour
    feedback(32'h1300, 0);
    feedback(32'h1300, 0);
    expect_pred(32'h300, 24'h000001, 4'b0010);
    expect_pred(32'h304, 24'h000001, 4'b1110);
    // reset restores the initial state
    rst = 1; @(posedge clk); #1; rst = 0;
    expect_pred(32'h300, 24'h000001, 4'b1110);
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

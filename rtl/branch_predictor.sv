// branch_predictor: next-PC generation with static or bimodal prediction.
//
// For the instruction at pc the predictor returns the next PC, the
// alternative PC (the address to restart from if the prediction proves
// wrong) and the prediction flag. For a non-branch the next PC is pc + 4.
// For a branch the target is pc + 8 + 4 * sign-extended offset (ARM branch
// semantics); taken and fall-through addresses go to next_pc and alt_pc, or
// crossed over, according to the prediction.
//
// MODE selects the method, all of which share this interface:
//   0 static "never branch", 1 static "always branch",
//   2 one-bit table, 3 two-bit saturating table (default, the best of the
//   methods compared in the original work).
// The table has ENTRIES counters indexed by pc[11:2]. Two-bit counters reset
// to 2 (weakly taken) and one-bit entries to 1 (taken). At retirement the
// feedback port reports a branch's address and real outcome: the counter is
// incremented (saturating at 3) when taken and decremented (saturating at 0)
// when not. Prediction is combinational; the update takes effect on the next
// rising clock edge. All table contents are cleared by rst.
module branch_predictor
  import ss_pkg::*;
#(
  parameter int unsigned MODE    = 3,
  parameter int unsigned ENTRIES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  // current status
  input  word_t       pc,
  input  logic        is_branch,
  input  logic [23:0] offset,
  // feedback from retirement
  input  logic        fb_en,
  input  word_t       fb_pc,
  input  logic        fb_taken,
  // prediction
  output word_t       next_pc,
  output word_t       alt_pc,
  output logic        pred_taken
);

  localparam int IDX_W = $clog2(ENTRIES);

  logic [1:0] table_q [ENTRIES];

  logic [IDX_W-1:0] rd_idx, wr_idx;
  word_t            target, fallthru;
  logic             guess;

  assign rd_idx   = pc[IDX_W+1:2];
  assign wr_idx   = fb_pc[IDX_W+1:2];
  assign target   = pc + 32'd8 + {{6{offset[23]}}, offset, 2'b00};
  assign fallthru = pc + 32'd4;

  always_comb begin
    unique case (MODE)
      0:       guess = 1'b0;
      1:       guess = 1'b1;
      2:       guess = table_q[rd_idx][0];
      default: guess = table_q[rd_idx][1];
    endcase
    pred_taken = is_branch && guess;
    next_pc    = pred_taken ? target : fallthru;
    alt_pc     = pred_taken ? fallthru : target;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++)
        table_q[i] <= (MODE == 2) ? 2'd1 : 2'd2;
    end else if (fb_en) begin
      if (MODE == 2)
        table_q[wr_idx] <= {1'b0, fb_taken};
      else if (fb_taken && table_q[wr_idx] != 2'd3)
        table_q[wr_idx] <= table_q[wr_idx] + 2'd1;
      else if (!fb_taken && table_q[wr_idx] != 2'd0)
        table_q[wr_idx] <= table_q[wr_idx] - 2'd1;
    end
  end

endmodule

// ss_cpu: superscalar, dynamically scheduled core for a subset of the ARM
// instruction set, with its program and data memories.
//
// Instructions flow feeder -> colouring -> holding unit. The feeder fetches
// one instruction per cycle along the path chosen by the branch predictor
// and decodes it. The colouring unit renames its registers. The holding unit
// keeps up to 64 instructions; any whose operands are ready may run on one
// of two ALUs or the load/store unit, in any order; retirement then commits
// them one per cycle in program order, checks each branch against the
// committed flags and, on a wrong prediction, flushes everything younger and
// restarts the feeder at the right address.
//
// Interface: rst (synchronous, active high) clears the core; while it is
// held the program memory is loaded through load_en/load_addr/load_data
// (word index). After rst falls the core runs from address 0 until an HLT
// instruction retires, which raises halted. arch_regs and flags are the
// committed architectural state; dump pulses when a REG instruction
// retires. retire_en, flush and feed_stall are event outputs for
// performance counting. BP_MODE selects the branch predictor (see
// branch_predictor; default two-bit). The division into these blocks
// follows the original design's module diagram.
module ss_cpu
  import ss_pkg::*;
#(
  parameter int unsigned BP_MODE = 3,
  parameter int unsigned PWORDS  = 1024
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      load_en,
  input  logic [$clog2(PWORDS)-1:0] load_addr,
  input  word_t                     load_data,
  output word_t                     arch_regs [NARCH],
  output flags_t                    flags,
  output logic                      halted,
  output logic                      dump,
  output logic                      retire_en,
  output logic                      flush,
  output logic                      feed_stall
);

  word_t imem_addr, imem_data;
  dec_t  fd;
  logic  fd_valid, write, ok;
  col_t  cd;
  word_t redirect, fb_pc;
  logic  fb_en, fb_taken;
  logic  free_en;
  preg_t free_pd;
  areg_t rev_arch;
  logic  dm_en, dm_rnw, dm_ready, dm_busy;
  logic [9:0] dm_addr;
  word_t dm_wdata, dm_rdata;

  program_memory #(.WORDS(PWORDS)) u_imem (
    .clk      (clk),
    .addr     (imem_addr),
    .instr    (imem_data),
    .load_en  (load_en),
    .load_addr(load_addr),
    .load_data(load_data)
  );

  feeder #(.BP_MODE(BP_MODE)) u_feed (
    .clk      (clk),
    .rst      (rst),
    .imem_addr(imem_addr),
    .imem_data(imem_data),
    .out      (fd),
    .out_valid(fd_valid),
    .accept   (write),
    .flush    (flush),
    .redirect (redirect),
    .fb_en    (fb_en),
    .fb_pc    (fb_pc),
    .fb_taken (fb_taken)
  );

  colouring u_col (
    .clk     (clk),
    .rst     (rst),
    .flush   (flush),
    .din     (fd),
    .cout    (cd),
    .ok      (ok),
    .write   (write),
    .ret_en  (free_en),
    .ret_pd  (free_pd),
    .rev_arch(rev_arch)
  );

  hold_unit u_hold (
    .clk      (clk),
    .rst      (rst),
    .din      (cd),
    .din_valid(fd_valid),
    .din_ok   (ok),
    .write    (write),
    .free_en  (free_en),
    .free_pd  (free_pd),
    .rev_arch (rev_arch),
    .flush    (flush),
    .redirect (redirect),
    .fb_en    (fb_en),
    .fb_pc    (fb_pc),
    .fb_taken (fb_taken),
    .dm_en    (dm_en),
    .dm_rnw   (dm_rnw),
    .dm_addr  (dm_addr),
    .dm_wdata (dm_wdata),
    .dm_rdata (dm_rdata),
    .dm_ready (dm_ready),
    .arch_regs(arch_regs),
    .flags    (flags),
    .halted   (halted),
    .dump     (dump),
    .retire_en(retire_en)
  );

  data_memory u_dmem (
    .clk  (clk),
    .rst  (rst),
    .en   (dm_en),
    .rnw  (dm_rnw),
    .addr (dm_addr),
    .wdata(dm_wdata),
    .rdata(dm_rdata),
    .ready(dm_ready),
    .busy (dm_busy)
  );

  assign feed_stall = fd_valid && !write && !flush;

endmodule

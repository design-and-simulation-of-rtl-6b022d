// hold_unit: the instruction pool and everything that works on it.
//
// Contains NSLOTS hold_slot entries arranged as a ring, the scheduler, the
// register files with the execution units (exec_regs) and the retirement
// unit, as nested modules, plus the control logic that joins them:
//   - Feeding. A counter (tail) points at the next slot of the ring. When
//     the colouring unit presents an instruction (din_valid) that it can
//     colour (din_ok) and that slot is empty, the instruction is written
//     (write = 1, which is also the feeder's accept) and the counter
//     advances. Otherwise the feeder stalls. The destination allocation is
//     passed to the register unit, which clears that register's valid bit.
//   - Dispatch. The scheduler picks slots from the ready lines; multiplexers
//     route the chosen slots' contents to the units, and the units' done
//     reports are routed back to the slots by slot number.
//   - Retirement. A multiplexer shows the slot at the retirement counter to
//     the retirement unit, which marks it empty.
//   - Flush. A wrong branch prediction found at retirement empties every
//     slot and returns both counters to slot 0.
// Load/store instructions are offered to the scheduler only when their slot
// is at the retirement counter, i.e. they are the oldest instruction in the
// pool. The original design does not say how memory order or speculative
// stores are handled; this rule keeps every memory access in program order
// and never writes memory for an instruction that may be cancelled.
module hold_unit
  import ss_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  // from colouring
  input  col_t    din,
  input  logic    din_valid,
  input  logic    din_ok,
  output logic    write,
  // to colouring
  output logic    free_en,
  output preg_t   free_pd,
  input  areg_t   rev_arch,
  // to feeder / colouring
  output logic    flush,
  output word_t   redirect,
  output logic    fb_en,
  output word_t   fb_pc,
  output logic    fb_taken,
  // data memory
  output logic    dm_en,
  output logic    dm_rnw,
  output logic [9:0] dm_addr,
  output word_t   dm_wdata,
  input  word_t   dm_rdata,
  input  logic    dm_ready,
  // committed state
  output word_t   arch_regs [NARCH],
  output flags_t  flags,
  output logic    halted,
  output logic    dump,
  output logic    retire_en
);

  slot_view_t          views [NSLOTS];
  logic   [NSLOTS-1:0] rdy, rdy_ls, empty_v;
  logic   [NSLOTS-1:0] slot_wr, slot_me, slot_done;
  flags_t              slot_fl [NSLOTS];
  flags_t              slot_fm [NSLOTS];

  slot_t tail_q, head;
  logic  ret_en, copy_en;
  preg_t copy_pd;

  notify_t [NEXEC-1:0] notify;
  compl_t  [NEXEC-1:0] done;
  logic    [NPREG-1:0] preg_valid;

  logic  alu0_en, alu1_en, ls_en, ls_idle;
  slot_t alu0_slot, alu1_slot, ls_slot;

  // Feeding
  assign write = din_valid && din_ok && empty_v[tail_q] && !flush;

  always_ff @(posedge clk) begin
    if (rst || flush) tail_q <= '0;
    else if (write)   tail_q <= tail_q + 1'b1;
  end

  // Per-slot control
  always_comb begin
    for (int i = 0; i < NSLOTS; i++) begin
      slot_wr[i]   = write && (tail_q == slot_t'(i));
      slot_me[i]   = ret_en && (head == slot_t'(i));
      slot_done[i] = 1'b0;
      slot_fl[i]   = '0;
      slot_fm[i]   = '0;
      for (int k = 0; k < NEXEC; k++)
        if (done[k].en && done[k].slot == slot_t'(i)) begin
          slot_done[i] = 1'b1;
          slot_fl[i]   = done[k].flags;
          slot_fm[i]   = done[k].fmask;
        end
    end
  end

  for (genvar i = 0; i < NSLOTS; i++) begin : g_slot
    hold_slot u_slot (
      .clk       (clk),
      .rst       (rst),
      .flush     (flush),
      .write     (slot_wr[i]),
      .din       (din),
      .preg_valid(preg_valid),
      .notify    (notify),
      .done      (slot_done[i]),
      .done_flags(slot_fl[i]),
      .done_fmask(slot_fm[i]),
      .mark_empty(slot_me[i]),
      .view      (views[i]),
      .ready     (rdy[i]),
      .ready_ls  (rdy_ls[i])
    );
    assign empty_v[i] = views[i].empty;
  end

  // Dispatch
  scheduler u_sched (
    .ready    (rdy),
    .ready_ls (rdy_ls & (NSLOTS'(1) << head)),
    .ls_idle  (ls_idle),
    .alu0_en  (alu0_en),
    .alu0_slot(alu0_slot),
    .alu1_en  (alu1_en),
    .alu1_slot(alu1_slot),
    .ls_en    (ls_en),
    .ls_slot  (ls_slot)
  );

  exec_regs u_exec (
    .clk       (clk),
    .rst       (rst),
    .alu0_en   (alu0_en),
    .alu0_slot (alu0_slot),
    .alu0_ins  (views[alu0_slot].ins),
    .alu1_en   (alu1_en),
    .alu1_slot (alu1_slot),
    .alu1_ins  (views[alu1_slot].ins),
    .ls_en     (ls_en),
    .ls_slot   (ls_slot),
    .ls_ins    (views[ls_slot].ins),
    .cin       (flags[1]),
    .ls_idle   (ls_idle),
    .notify    (notify),
    .done      (done),
    .preg_valid(preg_valid),
    .alloc_en  (write && din.pd_valid),
    .alloc_pd  (din.pd),
    .copy_en   (copy_en),
    .copy_pd   (copy_pd),
    .copy_arch (rev_arch),
    .arch_regs (arch_regs),
    .dm_en     (dm_en),
    .dm_rnw    (dm_rnw),
    .dm_addr   (dm_addr),
    .dm_wdata  (dm_wdata),
    .dm_rdata  (dm_rdata),
    .dm_ready  (dm_ready)
  );

  // Retirement
  retire u_retire (
    .clk      (clk),
    .rst      (rst),
    .head     (head),
    .hv       (views[head]),
    .retire_en(ret_en),
    .copy_en  (copy_en),
    .copy_pd  (copy_pd),
    .free_en  (free_en),
    .free_pd  (free_pd),
    .flush    (flush),
    .redirect (redirect),
    .fb_en    (fb_en),
    .fb_pc    (fb_pc),
    .fb_taken (fb_taken),
    .flags    (flags),
    .halted   (halted),
    .dump     (dump)
  );

  assign retire_en = ret_en;

endmodule

// hold_slot: one entry of the instruction pool.
//
// Holds a coloured instruction from the moment it is fed until it retires.
// State: empty, complete, and one "available" flag per source operand.
//   write      (feeding bus) loads the instruction, clears empty, and sets
//              complete at once for branches, specials and NOPs, which need
//              no execution. Each operand starts available when unused, when
//              it names an architectural register, when the physical register
//              is already valid (preg_valid) or when it is being notified in
//              that same cycle.
//   notify     one bus per execution unit carries a physical register number
//              that will be valid from the next cycle; a waiting operand
//              that matches becomes available at the clock edge.
//   done       from the execution units: sets complete and stores the flags
//              (and which flags the instruction sets).
//   mark_empty from retirement, and flush, empty the slot.
// ready and readyLS are combinational: the slot holds an ALU (respectively
// load/store) instruction that is not complete and whose operands are all
// available. All the instruction fields are always visible on view for the
// execution and retirement multiplexers. The structure follows the slot of
// the original design; keeping operand values out of the slot (only a flag
// per operand, values live in the physical register file) is also its
// choice.
module hold_slot
  import ss_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             flush,
  input  logic             write,
  input  col_t             din,
  input  logic [NPREG-1:0] preg_valid,
  input  notify_t [NEXEC-1:0] notify,
  input  logic             done,
  input  flags_t           done_flags,
  input  flags_t           done_fmask,
  input  logic             mark_empty,
  output slot_view_t       view,
  output logic             ready,
  output logic             ready_ls
);

  col_t   ins_q;
  logic   empty_q, complete_q, av1_q, av2_q;
  flags_t flags_q, fmask_q;

  function automatic logic notified(input opnd_t o, input notify_t [NEXEC-1:0] n);
    logic hit;
    hit = 1'b0;
    for (int k = 0; k < NEXEC; k++)
      if (n[k].en && n[k].num == o.num) hit = 1'b1;
    return hit;
  endfunction

  function automatic logic avail_now(input opnd_t o, input logic [NPREG-1:0] pv,
                                     input notify_t [NEXEC-1:0] n);
    return !o.used || o.arch || pv[o.num] || notified(o, n);
  endfunction

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      empty_q    <= 1'b1;
      complete_q <= 1'b0;
      av1_q      <= 1'b0;
      av2_q      <= 1'b0;
      flags_q    <= '0;
      fmask_q    <= '0;
      ins_q      <= '0;
    end else if (write) begin
      ins_q      <= din;
      empty_q    <= 1'b0;
      complete_q <= !(din.d.cls inside {CLS_ALU, CLS_LS});
      av1_q      <= avail_now(din.o1, preg_valid, notify);
      av2_q      <= avail_now(din.o2, preg_valid, notify);
      flags_q    <= '0;
      fmask_q    <= '0;
    end else begin
      if (mark_empty) empty_q <= 1'b1;
      if (done) begin
        complete_q <= 1'b1;
        flags_q    <= done_flags;
        fmask_q    <= done_fmask;
      end
      if (notified(ins_q.o1, notify) && !ins_q.o1.arch) av1_q <= 1'b1;
      if (notified(ins_q.o2, notify) && !ins_q.o2.arch) av2_q <= 1'b1;
    end
  end

  always_comb begin
    view.ins      = ins_q;
    view.empty    = empty_q;
    view.complete = complete_q;
    view.flags    = flags_q;
    view.fmask    = fmask_q;
    ready    = !empty_q && !complete_q && (ins_q.d.cls == CLS_ALU) && av1_q && av2_q;
    ready_ls = !empty_q && !complete_q && (ins_q.d.cls == CLS_LS)  && av1_q && av2_q;
  end

endmodule

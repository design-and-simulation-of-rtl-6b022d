// retire: in-order retirement of the instruction pool.
//
// A counter (head) walks the slot ring in program order. When the slot it
// points at is full and complete the instruction retires in that cycle
// (one per cycle): the slot is marked empty and the counter advances at the
// clock edge. On retiring
//   - an instruction with a destination: copy_en asks the register unit to
//     copy its physical register to the architectural register (found by the
//     colouring unit's reverse lookup), and free_en tells the colouring unit
//     that the previous live range of that register has ended;
//   - an ALU instruction: the committed flags take the flags it produced,
//     for those bits its flag mask allows (none when S was clear);
//   - a branch: its predicate is tested against the committed flags and the
//     outcome is reported to the predictor (fb_*). If the outcome differs
//     from the prediction, flush empties the pool, the colouring tables and
//     the feeder, redirect carries the branch's alternative address, and
//     the counter returns to slot 0;
//   - HLT: halted is set and nothing retires after it;
//   - REG: dump pulses for one cycle, asking for the committed state to be
//     reported.
// Predication of non-branch instructions is not supported: they always
// execute. The flags reset to 0. This mirrors the retirement unit of the
// original design; the flag mask (logical operations leave C and V alone)
// is this design's addition.
module retire
  import ss_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  output slot_t      head,
  input  slot_view_t hv,          // view of the slot at head
  output logic       retire_en,   // an instruction retires this cycle
  output logic       copy_en,
  output preg_t      copy_pd,
  output logic       free_en,
  output preg_t      free_pd,
  output logic       flush,
  output word_t      redirect,
  output logic       fb_en,
  output word_t      fb_pc,
  output logic       fb_taken,
  output flags_t     flags,
  output logic       halted,
  output logic       dump
);

  slot_t  head_q;
  flags_t flags_q;
  logic   halted_q;
  logic   is_alu, is_br, taken;

  assign head      = head_q;
  assign flags     = flags_q;
  assign halted    = halted_q;
  assign is_alu    = hv.ins.d.cls == CLS_ALU;
  assign is_br     = hv.ins.d.cls == CLS_BR;
  assign taken     = cond_pass(hv.ins.d.cond, flags_q);

  assign retire_en = !halted_q && !hv.empty && hv.complete;
  assign copy_en   = retire_en && hv.ins.pd_valid;
  assign copy_pd   = hv.ins.pd;
  assign free_en   = copy_en;
  assign free_pd   = hv.ins.pd;
  assign fb_en     = retire_en && is_br;
  assign fb_pc     = hv.ins.d.pc;
  assign fb_taken  = taken;
  assign flush     = fb_en && (taken != hv.ins.d.pred_taken);
  assign redirect  = hv.ins.d.altaddr;
  assign dump      = retire_en && hv.ins.d.cls == CLS_SPEC && hv.ins.d.special == SPEC_REG;

  always_ff @(posedge clk) begin
    if (rst) begin
      head_q   <= '0;
      flags_q  <= '0;
      halted_q <= 1'b0;
    end else if (retire_en) begin
      head_q <= flush ? '0 : head_q + 1'b1;
      if (is_alu)
        flags_q <= (flags_q & ~hv.fmask) | (hv.flags & hv.fmask);
      if (hv.ins.d.cls == CLS_SPEC && hv.ins.d.special == SPEC_HLT)
        halted_q <= 1'b1;
    end
  end

endmodule

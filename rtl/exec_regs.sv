// exec_regs: register files and execution units of the superscalar core.
//
// Registers. NPREG physical registers hold the values of renamed live
// ranges; NARCH architectural registers hold the committed state, written
// only by retirement (one copy from a physical register per cycle). A valid
// bit per physical register (preg_valid) records whether its value has been
// written; it is cleared when the register is allocated and set when an
// execution unit writes it, so an instruction fed after its producer
// finished still finds its operand ready. The physical file has seven read
// ports (two per execution unit, one for the copy to the architectural
// file) and three write ports, one per unit.
//
// Execution units. Two ALUs and one load/store unit. For each dispatched
// instruction the operand multiplexers pick, per operand, the physical
// register, the architectural register (operand flagged arch) or the
// immediate. An ALU finishes in the dispatch cycle: its result is written at
// the clock edge, its destination is announced on its notify bus during the
// cycle (so waiting slots can issue in the next one) and its slot is marked
// complete with the flags. ADC/SBC/RSC use cin, the committed carry flag.
//
// The load/store unit forms base +/- 12-bit offset (a byte address; bits
// 11..2 index the data memory words). A store writes memory at once and
// completes in the dispatch cycle. A load issues a read and waits for the
// memory's ready pulse, then announces, writes and completes like an ALU.
// ls_idle is low while a load is outstanding.
//
// Keeping both register files in the module of the execution units, and the
// unit mix (two ALUs, one load/store), follow the original design.
module exec_regs
  import ss_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // dispatch
  input  logic                alu0_en,
  input  slot_t               alu0_slot,
  input  col_t                alu0_ins,
  input  logic                alu1_en,
  input  slot_t               alu1_slot,
  input  col_t                alu1_ins,
  input  logic                ls_en,
  input  slot_t               ls_slot,
  input  col_t                ls_ins,
  input  logic                cin,
  output logic                ls_idle,
  // results
  output notify_t [NEXEC-1:0] notify,
  output compl_t  [NEXEC-1:0] done,
  output logic    [NPREG-1:0] preg_valid,
  // allocation by the colouring unit
  input  logic                alloc_en,
  input  preg_t               alloc_pd,
  // retirement copy P -> A
  input  logic                copy_en,
  input  preg_t               copy_pd,
  input  areg_t               copy_arch,
  output word_t               arch_regs [NARCH],
  // data memory
  output logic                dm_en,
  output logic                dm_rnw,
  output logic [9:0]          dm_addr,
  output word_t               dm_wdata,
  input  word_t               dm_rdata,
  input  logic                dm_ready
);

  word_t preg [NPREG];
  word_t areg [NARCH];

  function automatic word_t rd_op(input opnd_t o);
    if (!o.used)     return '0;
    else if (o.arch) return areg[o.num[3:0]];
    else             return preg[o.num];
  endfunction

  // ALU units
  logic   [1:0] a_en;
  col_t   [1:0] a_ins;
  slot_t  [1:0] a_slot;
  word_t  [1:0] a_y;
  flags_t [1:0] a_fl, a_fm;
  logic   [1:0] a_wr;

  assign a_en   = {alu1_en, alu0_en};
  assign a_ins  = {alu1_ins, alu0_ins};
  assign a_slot = {alu1_slot, alu0_slot};

  for (genvar k = 0; k < 2; k++) begin : g_alu
    word_t opa, opb;
    assign opa = rd_op(a_ins[k].o1);
    assign opb = a_ins[k].d.use_imm ? a_ins[k].d.imm : rd_op(a_ins[k].o2);
    alu u_alu (
      .op       (a_ins[k].d.op),
      .a        (opa),
      .b        (opb),
      .cin      (cin),
      .y        (a_y[k]),
      .flags    (a_fl[k]),
      .fmask    (a_fm[k]),
      .writes_rd(a_wr[k])
    );
  end

  // Load/store unit
  logic  ls_wait_q;
  slot_t ls_slot_q;
  preg_t ls_pd_q;
  word_t ls_base, ls_ea;

  assign ls_base  = rd_op(ls_ins.o1);
  assign ls_ea    = ls_ins.d.ls_up ? ls_base + ls_ins.d.imm : ls_base - ls_ins.d.imm;
  assign ls_idle  = !ls_wait_q;
  assign dm_en    = ls_en;
  assign dm_rnw   = ls_ins.d.ls_load;
  assign dm_addr  = ls_ea[11:2];
  assign dm_wdata = rd_op(ls_ins.o2);

  logic ls_fin;
  assign ls_fin = ls_wait_q && dm_ready;

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      notify[k].en  = a_en[k] && a_ins[k].pd_valid && a_wr[k];
      notify[k].num = a_ins[k].pd;
      done[k].en    = a_en[k];
      done[k].slot  = a_slot[k];
      done[k].flags = a_fl[k];
      done[k].fmask = a_ins[k].d.s ? a_fm[k] : 4'b0000;
    end
    notify[2].en  = ls_fin;
    notify[2].num = ls_pd_q;
    done[2].en    = ls_fin || (ls_en && !ls_ins.d.ls_load);
    done[2].slot  = ls_fin ? ls_slot_q : ls_slot;
    done[2].flags = '0;
    done[2].fmask = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ls_wait_q <= 1'b0;
      ls_slot_q <= '0;
      ls_pd_q   <= '0;
    end else if (ls_fin) begin
      ls_wait_q <= 1'b0;
    end else if (ls_en && ls_ins.d.ls_load) begin
      ls_wait_q <= 1'b1;
      ls_slot_q <= ls_slot;
      ls_pd_q   <= ls_ins.pd;
    end
  end

  // Physical register file and valid bits
  always_ff @(posedge clk) begin
    for (int k = 0; k < 2; k++)
      if (notify[k].en) preg[notify[k].num] <= a_y[k];
    if (ls_fin) preg[ls_pd_q] <= dm_rdata;
  end

  always_ff @(posedge clk) begin
    if (rst) preg_valid <= '0;
    else begin
      if (alloc_en) preg_valid[alloc_pd] <= 1'b0;
      for (int k = 0; k < NEXEC; k++)
        if (notify[k].en) preg_valid[notify[k].num] <= 1'b1;
    end
  end

  // Architectural register file
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int a = 0; a < NARCH; a++) areg[a] <= '0;
    end else if (copy_en) begin
      areg[copy_arch] <= preg[copy_pd];
    end
  end

  assign arch_regs = areg;

endmodule

// scheduler: dispatch choice for two ALU units and one load/store unit.
//
// Combinational priority encoders over the slots' ready lines. ALU unit 0
// gets the lowest-numbered slot whose ready line is high; ALU unit 1 gets the
// lowest-numbered ready slot other than the one given to unit 0, so the same
// instruction is never sent to both. The load/store unit gets the
// lowest-numbered slot with ready_ls high, but only while ls_idle says the
// unit can take a new request. Each output has an enable. This is the simple
// scheduler of the original design: it looks at slot numbers, not ages, so
// after the ring wraps it may prefer a younger instruction; that costs time,
// never correctness.
module scheduler
  import ss_pkg::*;
(
  input  logic [NSLOTS-1:0] ready,
  input  logic [NSLOTS-1:0] ready_ls,
  input  logic              ls_idle,
  output logic              alu0_en,
  output slot_t             alu0_slot,
  output logic              alu1_en,
  output slot_t             alu1_slot,
  output logic              ls_en,
  output slot_t             ls_slot
);

  function automatic logic [SLOT_W:0] first_set(input logic [NSLOTS-1:0] v);
    logic [SLOT_W:0] r;
    r = '0;
    for (int i = NSLOTS - 1; i >= 0; i--)
      if (v[i]) r = {1'b1, slot_t'(i)};
    return r;
  endfunction

  logic [NSLOTS-1:0] rest;

  always_comb begin
    {alu0_en, alu0_slot} = first_set(ready);
    rest = ready;
    if (alu0_en) rest[alu0_slot] = 1'b0;
    {alu1_en, alu1_slot} = first_set(rest);
    {ls_en, ls_slot}     = first_set(ready_ls);
    if (!ls_idle) ls_en = 1'b0;
  end

endmodule

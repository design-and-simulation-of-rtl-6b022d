// colouring: register renaming ("register colouring") between the feeder
// and the holding unit.
//
// Tables:
//   fwd[a]  physical register holding the newest live range of arch reg a
//   tag[a]  1 once a has been renamed since the last flush; while 0 the
//           operand is read from the architectural register file instead
//   rev[p]  architectural register that physical register p was given to
//   last[p] physical register of the live range that p's allocation ended
//           (0 = none: physical register 0 is never allocated)
//   free[p] p is available
//
// Operand lookup is combinational: for a source register a, the output is
// {fwd[a], arch = 0} when tag[a] is set, otherwise {a, arch = 1}. The
// destination gets the lowest-numbered free physical register. ok is low
// when the instruction writes a register and none is free; the holding unit
// must then not write it. On write (the holding unit takes the instruction
// at the clock edge) a destination allocation updates fwd, tag, rev and
// last and marks the register in use. Sources are looked up before the
// update, so "ADD R1, R1, #1" reads the old R1.
//
// Freeing: when retirement reports a retired destination ret_pd, the
// physical register last[ret_pd] (the previous live range of the same
// architectural register) becomes free, unless it is 0. rev_arch is the
// reverse lookup retirement uses to find the architectural register to copy
// to. flush clears every tag and frees every physical register, since the
// architectural file then holds the whole state. All this follows the
// original design; the lowest-first free-register choice is this design's.
module colouring
  import ss_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  flush,
  // from the feeder
  input  dec_t  din,
  // to the holding unit
  output col_t  cout,
  output logic  ok,
  input  logic  write,
  // retirement
  input  logic  ret_en,
  input  preg_t ret_pd,
  output areg_t rev_arch
);

  preg_t       fwd  [NARCH];
  logic        tag  [NARCH];
  areg_t       rev  [NPREG];
  preg_t       last [NPREG];
  logic [NPREG-1:0] free;

  preg_t new_pd;
  logic  any_free;

  // Lowest free physical register.
  always_comb begin
    new_pd   = '0;
    any_free = 1'b0;
    for (int p = NPREG - 1; p >= 1; p--)
      if (free[p]) begin
        new_pd   = preg_t'(p);
        any_free = 1'b1;
      end
  end

  function automatic opnd_t lookup(input areg_t a, input logic used);
    opnd_t o;
    o.used = used;
    o.arch = !tag[a];
    o.num  = tag[a] ? fwd[a] : preg_t'(a);
    return o;
  endfunction

  always_comb begin
    cout.d        = din;
    cout.o1       = lookup(din.rn, din.rn_used);
    cout.o2       = lookup(din.rm, din.rm_used);
    cout.pd       = din.rd_write ? new_pd : '0;
    cout.pd_valid = din.rd_write;
  end

  assign ok       = !din.rd_write || any_free;
  assign rev_arch = rev[ret_pd];

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      for (int a = 0; a < NARCH; a++) begin
        tag[a] <= 1'b0;
        fwd[a] <= '0;
      end
      free <= {{(NPREG-1){1'b1}}, 1'b0};
    end else begin
      if (write && din.rd_write && any_free) begin
        fwd[din.rd]  <= new_pd;
        tag[din.rd]  <= 1'b1;
        rev[new_pd]  <= din.rd;
        last[new_pd] <= tag[din.rd] ? fwd[din.rd] : '0;
        free[new_pd] <= 1'b0;
      end
      if (ret_en && last[ret_pd] != '0)
        free[last[ret_pd]] <= 1'b1;
    end
  end

  // rev and last need no reset: an entry is written whenever its physical
  // register is allocated, before it is ever read.
endmodule

// program_memory: instruction store of the core.
//
// WORDS 32-bit words, read combinationally: instr is the word at byte
// address addr (bits 1..0 ignored, addresses wrap modulo the size). The
// original model generated this memory as a hard-wired multiplexer from the
// assembled program; here the contents are written through a synchronous
// load port (load_en, load_addr as a word index, load_data) before the core
// is released from reset, so one netlist runs any program.
module program_memory
  import ss_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  word_t                    addr,
  output word_t                    instr,
  input  logic                     load_en,
  input  logic [$clog2(WORDS)-1:0] load_addr,
  input  word_t                    load_data
);

  localparam int AW = $clog2(WORDS);

  word_t mem [WORDS];

  assign instr = mem[addr[AW+1:2]];

  always_ff @(posedge clk)
    if (load_en) mem[load_addr] <= load_data;

endmodule

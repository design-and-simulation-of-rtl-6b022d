// alu: 32-bit ARM data-processing unit.
//
// Purely combinational. The opcode selects one of the sixteen ARM
// data-processing functions of the two operands, as a multiplexer over the
// sixteen results, which is how the original model describes its ALU.
// Flags are {N, Z, C, V}. Arithmetic operations produce all four; logical
// operations (AND, EOR, TST, TEQ, ORR, MOV, BIC, MVN) produce only N and Z,
// since there is no shifter to supply a carry-out. fmask tells the caller
// which flags an S-suffixed instruction may change. ADC, SBC and RSC take
// the carry input cin. writes_rd is low for TST, TEQ, CMP and CMN.
module alu
  import ss_pkg::*;
(
  input  alu_op_t op,
  input  word_t   a,
  input  word_t   b,
  input  logic    cin,
  output word_t   y,
  output flags_t  flags,
  output flags_t  fmask,
  output logic    writes_rd
);

  logic [XLEN:0] sum;     // result with carry-out
  logic          arith;
  logic          ovf;

  always_comb begin
    sum   = '0;
    arith = 1'b1;
    ovf   = 1'b0;
    y     = '0;
    unique case (op)
      OP_AND, OP_TST: begin y = a & b;  arith = 1'b0; end
      OP_EOR, OP_TEQ: begin y = a ^ b;  arith = 1'b0; end
      OP_ORR:         begin y = a | b;  arith = 1'b0; end
      OP_MOV:         begin y = b;      arith = 1'b0; end
      OP_BIC:         begin y = a & ~b; arith = 1'b0; end
      OP_MVN:         begin y = ~b;     arith = 1'b0; end
      OP_SUB, OP_CMP: begin
        sum = {1'b0, a} + {1'b0, ~b} + 33'd1;
        y   = sum[XLEN-1:0];
        ovf = (a[XLEN-1] != b[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
      end
      OP_RSB: begin
        sum = {1'b0, b} + {1'b0, ~a} + 33'd1;
        y   = sum[XLEN-1:0];
        ovf = (a[XLEN-1] != b[XLEN-1]) && (y[XLEN-1] != b[XLEN-1]);
      end
      OP_ADD, OP_CMN: begin
        sum = {1'b0, a} + {1'b0, b};
        y   = sum[XLEN-1:0];
        ovf = (a[XLEN-1] == b[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
      end
      OP_ADC: begin
        sum = {1'b0, a} + {1'b0, b} + {32'd0, cin};
        y   = sum[XLEN-1:0];
        ovf = (a[XLEN-1] == b[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
      end
      OP_SBC: begin
        sum = {1'b0, a} + {1'b0, ~b} + {32'd0, cin};
        y   = sum[XLEN-1:0];
        ovf = (a[XLEN-1] != b[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
      end
      OP_RSC: begin
        sum = {1'b0, b} + {1'b0, ~a} + {32'd0, cin};
        y   = sum[XLEN-1:0];
        ovf = (a[XLEN-1] != b[XLEN-1]) && (y[XLEN-1] != b[XLEN-1]);
      end
    endcase
    flags     = {y[XLEN-1], (y == '0), sum[XLEN], ovf};
    fmask     = arith ? 4'b1111 : 4'b1100;
    writes_rd = !(op inside {OP_TST, OP_TEQ, OP_CMP, OP_CMN});
  end

endmodule

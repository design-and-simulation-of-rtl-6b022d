// feeder: instruction fetch, branch prediction and decode.
//
// Combines the fetch and decode stages of a classic five-stage pipeline. The
// PC addresses the program memory combinationally; the fetched word is
// decoded and the branch predictor supplies the next PC, the alternative
// address and the prediction, all in the same cycle. The result is loaded
// into one output latch (out, out_valid). Register numbers stay
// architectural: no register values are read here.
//
// Handshake: the downstream consumer raises accept in a cycle in which it
// takes out. While out_valid is high and accept is low the feeder stalls:
// the PC and the latch hold. flush (from retirement after a wrong
// prediction) loads redirect into the PC and empties the latch; it wins over
// everything else. rst sets the PC to 0.
//
// Decoding (bits 27..25): 00x data-processing, where bit 25 selects an
// 8-bit immediate (bits 7..0, rotate field ignored since the design has no
// shifter) or register Rm (bits 3..0, shift field ignored); 010 load/store
// word with a 12-bit immediate offset, pre-indexed, no write-back (the
// register-offset form 011 and the byte bit are not supported and decode as
// NOP); 101 branch with a 24-bit word offset (link bit ignored); 111 special
// (NOP/HLT/REG in bits 1..0). Everything else is a NOP.
module feeder
  import ss_pkg::*;
#(
  parameter int unsigned BP_MODE = 3
) (
  input  logic  clk,
  input  logic  rst,
  // program memory
  output word_t imem_addr,
  input  word_t imem_data,
  // consumer
  output dec_t  out,
  output logic  out_valid,
  input  logic  accept,
  // restart after a wrong prediction
  input  logic  flush,
  input  word_t redirect,
  // predictor feedback from retirement
  input  logic  fb_en,
  input  word_t fb_pc,
  input  logic  fb_taken
);

  word_t pc_q;
  dec_t  dec;
  word_t next_pc, alt_pc;
  logic  pred_taken;
  logic  is_branch;

  assign imem_addr = pc_q;
  assign is_branch = (imem_data[27:25] == 3'b101);

  // Decode the fetched word.
  always_comb begin
    logic [31:0] w;
    w         = imem_data;
    dec       = '0;
    dec.pc    = pc_q;
    dec.cond  = w[31:28];
    dec.op    = alu_op_t'(w[24:21]);
    dec.rn    = w[19:16];
    dec.rd    = w[15:12];
    unique casez (w[27:25])
      3'b00?: begin
        dec.cls      = CLS_ALU;
        dec.s        = w[20];
        dec.use_imm  = w[25];
        dec.imm      = {24'd0, w[7:0]};
        dec.rm       = w[3:0];
        dec.rn_used  = !(dec.op inside {OP_MOV, OP_MVN});
        dec.rm_used  = !w[25];
        dec.rd_write = !(dec.op inside {OP_TST, OP_TEQ, OP_CMP, OP_CMN});
      end
      3'b010: begin
        dec.cls      = CLS_LS;
        dec.imm      = {20'd0, w[11:0]};
        dec.ls_load  = w[20];
        dec.ls_up    = w[23];
        dec.rn_used  = 1'b1;
        dec.rm       = w[15:12];
        dec.rm_used  = !w[20];
        dec.rd_write = w[20];
      end
      3'b101:  dec.cls = CLS_BR;
      3'b111: begin
        dec.cls     = CLS_SPEC;
        dec.special = w[1:0];
      end
      default: dec.cls = CLS_NOP;
    endcase
    dec.pred_taken = pred_taken;
    dec.altaddr    = alt_pc;
  end

  branch_predictor #(.MODE(BP_MODE)) u_bp (
    .clk       (clk),
    .rst       (rst),
    .pc        (pc_q),
    .is_branch (is_branch),
    .offset    (imem_data[23:0]),
    .fb_en     (fb_en),
    .fb_pc     (fb_pc),
    .fb_taken  (fb_taken),
    .next_pc   (next_pc),
    .alt_pc    (alt_pc),
    .pred_taken(pred_taken)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q      <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else if (flush) begin
      pc_q      <= redirect;
      out_valid <= 1'b0;
    end else if (!out_valid || accept) begin
      pc_q      <= next_pc;
      out       <= dec;
      out_valid <= 1'b1;
    end
  end

endmodule

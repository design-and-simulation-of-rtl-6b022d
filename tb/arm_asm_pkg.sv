// arm_asm_pkg: instruction encoders and test programs for the testbenches.
//
// Builds ARM instruction words for the subset the core runs: data
// processing with an 8-bit immediate or a register operand, LDR/STR with a
// 12-bit immediate offset, conditional branches, and the NOP/HLT/REG
// simulation instructions. A program is an array of words starting at
// address 0; branch targets are given as word indices.
package arm_asm_pkg;

  localparam logic [3:0] EQ = 4'h0, NE = 4'h1, AL = 4'hE;
  localparam logic [3:0] AND_ = 4'h0, SUB = 4'h2, ADD = 4'h4, CMP = 4'hA,
                         ORR = 4'hC, MOV = 4'hD;

  function automatic logic [31:0] dpi(input logic [3:0] op, input logic s,
                                      input int rd, input int rn, input int imm8);
    return {AL, 2'b00, 1'b1, op, s, 4'(rn), 4'(rd), 4'h0, 8'(imm8)};
  endfunction

  function automatic logic [31:0] dpr(input logic [3:0] op, input logic s,
                                      input int rd, input int rn, input int rm);
    return {AL, 2'b00, 1'b0, op, s, 4'(rn), 4'(rd), 8'h00, 4'(rm)};
  endfunction

  function automatic logic [31:0] ldr(input int rd, input int rn, input int off);
    return {AL, 3'b010, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1, 4'(rn), 4'(rd), 12'(off)};
  endfunction

  function automatic logic [31:0] str(input int rd, input int rn, input int off);
    return {AL, 3'b010, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 4'(rn), 4'(rd), 12'(off)};
  endfunction

  // Branch at word index here to word index target.
  function automatic logic [31:0] b(input logic [3:0] cond, input int here, input int target);
    return {cond, 3'b101, 1'b0, 24'(target - here - 2)};
  endfunction

  function automatic logic [31:0] nop(); return {AL, 3'b111, 25'd0}; endfunction
  function automatic logic [31:0] hlt(); return {AL, 3'b111, 25'd1}; endfunction
  function automatic logic [31:0] regd(); return {AL, 3'b111, 25'd2}; endfunction

  typedef logic [31:0] prog_t [$];

  // Factorial of n by repeated addition; result in R4.
  function automatic prog_t factorial(input int n);
    prog_t p;
    int loopf, mult, ret, loopm;
    loopf = 2; ret = 5; mult = 12; loopm = 14;
    p.push_back(dpi(MOV, 0, 3, 0, n));        // 0  MOV R3,#n
    p.push_back(dpi(MOV, 0, 4, 0, 1));        // 1  MOV R4,#1
    p.push_back(dpr(MOV, 0, 0, 0, 3));        // 2  loopf: MOV R0,R3
    p.push_back(dpr(MOV, 0, 1, 0, 4));        // 3  MOV R1,R4
    p.push_back(b(AL, 4, mult));              // 4  B mult
    p.push_back(dpr(MOV, 0, 4, 0, 2));        // 5  return: MOV R4,R2
    p.push_back(dpi(SUB, 1, 3, 3, 1));        // 6  SUBS R3,R3,#1
    p.push_back(b(NE, 7, loopf));             // 7  BNE loopf
    p.push_back(nop());                       // 8
    p.push_back(nop());                       // 9
    p.push_back(regd());                      // 10 REG
    p.push_back(hlt());                       // 11 HLT
    p.push_back(dpi(MOV, 0, 2, 0, 0));        // 12 mult: MOV R2,#0
    p.push_back(nop());                       // 13
    p.push_back(dpr(ADD, 0, 2, 2, 1));        // 14 loop: ADD R2,R2,R1
    p.push_back(dpi(SUB, 1, 0, 0, 1));        // 15 SUBS R0,R0,#1
    p.push_back(b(NE, 16, loopm));            // 16 BNE loop
    p.push_back(b(AL, 17, ret));              // 17 B return
    return p;
  endfunction

  // Twelve passes of a loop holding twelve rarely taken forward branches.
  function automatic prog_t infrequent();
    prog_t p;
    int outer;
    p.push_back(dpi(MOV, 0, 13, 0, 12));      // MOV R13,#12
    outer = p.size();
    for (int k = 1; k <= 12; k++) begin
      p.push_back(dpi(SUB, 1, 14, 13, k));    // SUBS R14,R13,#k
      p.push_back(b(EQ, p.size(), p.size() + 2));
      p.push_back(dpr(ADD, 0, k, k, 13));     // ADD Rk,Rk,R13
    end
    p.push_back(dpi(SUB, 1, 13, 13, 1));      // SUBS R13,R13,#1
    p.push_back(nop());
    p.push_back(nop());
    p.push_back(b(NE, p.size(), outer));      // BNE outer
    p.push_back(dpi(MOV, 0, 14, 0, 123));     // MOV R14,#123
    p.push_back(hlt());
    return p;
  endfunction

endpackage

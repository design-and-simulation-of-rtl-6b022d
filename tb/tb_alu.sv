// tb_alu: checks every ALU operation on random and corner-case operands
// against a reference computed here with 64-bit arithmetic, including the
// N, Z, C, V flags and the flag mask of logical operations.
module tb_alu;
  import ss_pkg::*;

  alu_op_t op;
  word_t a, b, y;
  logic cin, wr;
  flags_t fl, fm;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .cin, .y, .flags(fl), .fmask(fm), .writes_rd(wr));

  function automatic void model(input alu_op_t o, input word_t x, input word_t z, input logic c,
                                output word_t r, output flags_t f, output flags_t m);
    longint unsigned s;
    word_t nx, nz;
    longint sx, sz, lc;
    logic v;
    longint ss;
    s = 0; v = 0; ss = 0;
    nx = ~x; nz = ~z;
    sx = longint'($signed(x)); sz = longint'($signed(z)); lc = c ? 1 : 0;
    m = 4'b1111;
    case (o)
      OP_AND, OP_TST: begin r = x & z; m = 4'b1100; end
      OP_EOR, OP_TEQ: begin r = x ^ z; m = 4'b1100; end
      OP_ORR: begin r = x | z; m = 4'b1100; end
      OP_MOV: begin r = z; m = 4'b1100; end
      OP_BIC: begin r = x & ~z; m = 4'b1100; end
      OP_MVN: begin r = ~z; m = 4'b1100; end
      OP_ADD, OP_CMN: begin s = 64'(x) + 64'(z); ss = sx + sz; end
      OP_ADC: begin s = 64'(x) + 64'(z) + 64'({63'd0, c}); ss = sx + sz + lc; end
      OP_SUB, OP_CMP: begin s = 64'(x) + 64'(nz) + 1; ss = sx - sz; end
      OP_SBC: begin s = 64'(x) + 64'(nz) + 64'({63'd0, c}); ss = sx - sz - (1 - lc); end
      OP_RSB: begin s = 64'(z) + 64'(nx) + 1; ss = sz - sx; end
      OP_RSC: begin s = 64'(z) + 64'(nx) + 64'({63'd0, c}); ss = sz - sx - (1 - lc); end
    endcase
    if (m == 4'b1111) begin
      r = s[31:0];
      v = (ss > 64'sd2147483647) || (ss < -64'sd2147483648);
    end
    f = {r[31], r == 0, m == 4'b1111 ? s[32] : 1'b0, v};
  endfunction

  word_t er; flags_t ef, em;
  word_t corner [6] = '{32'h0, 32'h1, 32'h7fffffff, 32'h80000000, 32'hffffffff, 32'h12345678};

  initial begin
    for (int i = 0; i < 4000; i++) begin
      op  = alu_op_t'(i % 16);
      a   = (i % 3 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b   = (i % 5 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      cin = $urandom_range(0, 1);
      #1;
      model(op, a, b, cin, er, ef, em);
      checks++;
      if (y !== er || fm !== em || (fl & em) !== (ef & em) ||
          wr !== !(op inside {OP_TST, OP_TEQ, OP_CMP, OP_CMN})) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%0d a=%h b=%h c=%b: y=%h/%h f=%b/%b m=%b/%b", op, a, b, cin, y, er, fl, ef, fm, em);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_program_memory: loads random words through the load port and reads
// them back through the combinational byte-addressed port, including
// addresses with nonzero low bits.
module tb_program_memory;
  import ss_pkg::*;

  logic clk = 0;
  logic load_en = 0;
  logic [9:0] load_addr = '0;
  word_t load_data = '0, addr = '0, instr;
  word_t ref_mem [1024];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  program_memory dut (.clk, .addr, .instr, .load_en, .load_addr, .load_data);

  initial begin
    for (int i = 0; i < 1024; i++) begin
      ref_mem[i] = $urandom;
      load_en = 1; load_addr = 10'(i); load_data = ref_mem[i];
      @(posedge clk); #1;
    end
    load_en = 0;
    for (int t = 0; t < 2000; t++) begin
      int w;
      w = $urandom_range(0, 1023);
      addr = {20'd0, 10'(w), 2'($urandom_range(0, 3))};
      #1;
      checks++;
      if (instr !== ref_mem[w]) begin
        failures++;
        $display("FAIL addr %h: %h expected %h", addr, instr, ref_mem[w]);
      end
    end
    // a disabled load port must not write
    load_addr = 10'd7; load_data = ~ref_mem[7];
    @(posedge clk); #1;
    addr = 32'd28; #1;
    checks++;
    if (instr !== ref_mem[7]) begin failures++; $display("FAIL write without load_en"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

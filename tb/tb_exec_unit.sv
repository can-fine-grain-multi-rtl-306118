// tb_exec_unit: random operands through every ALU operation, branch tests and
// target computations, and memory requests, checked against reference
// expressions written in the testbench. The decoder builds the input record.
module tb_exec_unit;
  import sla_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] instr, pc, a, b, spec_val, result, br_target, j_target, cl_target, mem_addr, mem_wdata;
  logic br_taken, mem_re, mem_we;
  logic [3:0] mem_be;
  dec_t dec;

  decoder u_dec (.instr, .dec);
  exec_unit dut (.*);

  initial begin #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", w, got, exp); end
  endtask

  initial begin
    for (int it = 0; it < 300; it++) begin
      logic [15:0] im;
      logic [4:0] sh;
      a = $urandom; b = $urandom; pc = $urandom & ~32'd3; spec_val = $urandom;
      im = 16'($urandom); sh = 5'($urandom);
      if (it % 10 == 0) b = a;
      instr = enc_r(0, F_ADD, 1, 2, 3); #1; chk("add", result, a + b);
      instr = enc_r(0, F_SUB, 1, 2, 3); #1; chk("sub", result, a - b);
      instr = enc_r(0, F_AND, 1, 2, 3); #1; chk("and", result, a & b);
      instr = enc_r(0, F_OR,  1, 2, 3); #1; chk("or",  result, a | b);
      instr = enc_r(0, F_XOR, 1, 2, 3); #1; chk("xor", result, a ^ b);
      instr = enc_r(0, F_NOR, 1, 2, 3); #1; chk("nor", result, ~(a | b));
      instr = enc_r(0, F_SEQ, 1, 2, 3); #1; chk("seq", result, (a == b) ? 1 : 0);
      instr = enc_r(0, F_SLT, 1, 2, 3); #1; chk("slt", result, ($signed(a) < $signed(b)) ? 1 : 0);
      instr = enc_r(0, F_SLTU,1, 2, 3); #1; chk("sltu", result, (a < b) ? 1 : 0);
      instr = enc_r(0, F_SLL, 1, 2, 0, sh); #1; chk("sll", result, a << sh);
      instr = enc_r(0, F_SRL, 1, 2, 0, sh); #1; chk("srl", result, a >> sh);
      instr = enc_r(0, F_SRA, 1, 2, 0, sh); #1; chk("sra", result, $unsigned($signed(a) >>> sh));
      instr = enc_i(0, OP_ADDI, 1, 2, im); #1; chk("addi", result, a + {{16{im[15]}}, im});
      instr = enc_i(0, OP_ANDI, 1, 2, im); #1; chk("andi", result, a & {16'd0, im});
      instr = enc_i(0, OP_LUI, 1, 0, im); #1; chk("lui", result, {im, 16'd0});
      instr = enc_b(0, OP_BEQZ, 2, im); #1;
      chk("beqz", br_taken, a == 0); chk("br target", br_target, pc + 4 + {{14{im[15]}}, im, 2'b00});
      instr = enc_b(0, OP_BNEZ, 2, im); #1; chk("bnez", br_taken, a != 0);
      instr = enc_j(0, OP_J, {4'd0, 26'($urandom), 2'b00}); #1;
      begin logic [31:0] p4; p4 = pc + 32'd4; chk("j target", j_target, {p4[31:28], instr[25:0], 2'b00}); end
      instr = enc_colane(0, 3'd2, {{16{im[15]}}, im} << 2); #1;
      chk("colane target", cl_target, pc + ({{16{im[15]}}, im} << 2));
      instr = enc_i(0, OP_LW, 1, 2, 0); #1;
      chk("lw re", mem_re, 1); chk("lw we", mem_we, 0); chk("lw addr", mem_addr, a);
      instr = enc_s(0, OP_SW, 2, 3); #1;
      chk("sw we", mem_we, 1); chk("sw data", mem_wdata, b); chk("sw be", mem_be, 4'hf);
      instr = enc_s(0, OP_SB, 2, 3); #1;
      chk("sb be", mem_be, 4'b0001 << a[1:0]); chk("sb data", mem_wdata[8*a[1:0] +: 8], b[7:0]);
      instr = enc_s(0, OP_SWRT, 2, 1); #1; chk("swrt data", mem_wdata, spec_val);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

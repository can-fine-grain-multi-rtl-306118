// tb_decoder: encodes one instruction of each kind with the package encoders
// and checks the decoded fields against hand-written expectations.
module tb_decoder;
  import sla_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] instr;
  dec_t dec;

  decoder dut (.instr, .dec);

  initial begin #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", w, got, exp); end
  endtask

  initial begin
    instr = enc_r(1, F_SUB, 5'd3, 5'd4, 5'd5); #1;
    chk("sr", dec.sr, 1); chk("alu sub", dec.alu, A_SUB); chk("rd", dec.rd, 3);
    chk("rs", dec.rs, 4); chk("rt", dec.rt, 5); chk("wr", dec.wr_gpr, 1); chk("imm?", dec.use_imm, 0);
    instr = enc_r(0, F_SLL, 5'd7, 5'd8, 5'd0, 5'd9); #1;
    chk("sll", dec.alu, A_SLL); chk("shamt", dec.imm, 9); chk("sll imm", dec.use_imm, 1);
    instr = enc_i(0, OP_ADDI, 5'd2, 5'd1, 16'hFFFC); #1;
    chk("addi", dec.alu, A_ADD); chk("addi imm", dec.imm, 32'hFFFF_FFFC); chk("sr0", dec.sr, 0);
    instr = enc_i(0, OP_ORI, 5'd2, 5'd1, 16'h8001); #1;
    chk("ori zext", dec.imm, 32'h0000_8001); chk("ori", dec.alu, A_OR);
    instr = enc_i(0, OP_LUI, 5'd2, 5'd0, 16'h1234); #1;
    chk("lui", dec.imm, 32'h1234_0000);
    instr = enc_i(0, OP_ADDI, 5'd0, 5'd1, 16'd1); #1;
    chk("write to $0 dropped", dec.wr_gpr, 0);
    instr = enc_i(0, OP_LBU, 5'd6, 5'd7, 16'd0); #1;
    chk("lbu", dec.mem, M_LBU); chk("lbu wr", dec.wr_gpr, 1);
    instr = enc_s(0, OP_SB, 5'd7, 5'd6); #1;
    chk("sb", dec.mem, M_SB); chk("sb rs", dec.rs, 7); chk("sb rt", dec.rt, 6); chk("sb wr", dec.wr_gpr, 0);
    instr = enc_s(0, OP_SWRT, 5'd7, 5'd2); #1;
    chk("swrt", dec.mem, M_SW); chk("swrt src", dec.stsrc, SD_RT);
    instr = enc_s(0, OP_SAS, 5'd7, 5'd0); #1;
    chk("sas src", dec.stsrc, SD_PLS);
    instr = enc_i(0, OP_LWRT, 5'd3, 5'd7, 16'd0); #1;
    chk("lwrt", dec.mem, M_LWRT); chk("lwrt wr", dec.wr_gpr, 0);
    instr = enc_s(0, OP_LAS, 5'd7, 5'd0); #1;
    chk("las", dec.mem, M_LAS);
    instr = enc_b(1, OP_BNEZ, 5'd9, 16'hFFFE); #1;
    chk("bnez", dec.ctl, C_BRANCH); chk("off", dec.imm, 32'hFFFF_FFFE); chk("b sr", dec.sr, 1);
    instr = enc_j(0, OP_PB, 32'h0000_1040); #1;
    chk("pb", dec.ctl, C_PB); chk("pb tgt", dec.tgt26, 32'h410); chk("is_pb", is_pb(instr), 1);
    instr = enc_j(0, OP_CALL, 32'h0000_4000); #1;
    chk("call", dec.ctl, C_CALL);
    instr = enc_jr(0, OP_CALLR, 5'd8); #1;
    chk("callr", dec.ctl, C_CALLR); chk("callr rs", dec.rs, 8);
    instr = enc_op(0, OP_RETURN); #1; chk("return", dec.ctl, C_RETURN);
    instr = enc_op(1, OP_HALT); #1;   chk("halt", dec.ctl, C_HALT); chk("halt sr", dec.sr, 1);
    instr = enc_colane(0, 3'd5, 32'hFFFF_FF00); #1;
    chk("colane", dec.ctl, C_COLANE); chk("cl lane", dec.cl_lane, 5); chk("cl disp", dec.cl_disp, 32'hFFFF_FF00);
    instr = NOP; #1; chk("nop no write", dec.wr_gpr, 0); chk("nop ctl", dec.ctl, C_NONE); chk("nop mem", dec.mem, M_NONE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

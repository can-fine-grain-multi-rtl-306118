// decoder: per-lane instruction decoder of the SLA processor.
//
// Purely combinational. Turns one 32-bit instruction word into the dec_t record
// that the execute stage, the register file and the lane controller use: ALU
// operation, operand selection, destination register, memory class and control
// class (branch, jump, call, return, colane, halt, pb). The sr bit (bit 31) is
// passed through unchanged. Each lane has its own copy, as in the document's
// overview figure; the binary format is this design's own (see sla_pkg).
// Undefined opcodes and function codes decode as a no-operation.
module decoder
  import sla_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        dec
);
  always_comb begin
    dec         = '0;
    dec.sr      = instr[31];
    dec.op      = opcode_e'(instr[30:26]);
    dec.ctl     = C_NONE;
    dec.alu     = A_ADD;
    dec.mem     = M_NONE;
    dec.stsrc   = SD_GPR;
    dec.rd      = instr[25:21];
    dec.rs      = instr[20:16];
    dec.rt      = instr[15:11];
    dec.imm     = {{16{instr[15]}}, instr[15:0]};
    dec.tgt26   = instr[25:0];
    dec.cl_lane = instr[25:23];
    dec.cl_disp = {{7{instr[22]}}, instr[22:0], 2'b00};
    unique case (instr[30:26])
      OP_ALU: begin
        dec.wr_gpr = 1'b1;
        unique case (instr[5:0])
          F_ADD:  dec.alu = A_ADD;
          F_SUB:  dec.alu = A_SUB;
          F_AND:  dec.alu = A_AND;
          F_OR:   dec.alu = A_OR;
          F_XOR:  dec.alu = A_XOR;
          F_NOR:  dec.alu = A_NOR;
          F_SEQ:  dec.alu = A_SEQ;
          F_SLT:  dec.alu = A_SLT;
          F_SLTU: dec.alu = A_SLTU;
          F_SLL, F_SRL, F_SRA: begin
            dec.alu     = (instr[5:0] == F_SLL) ? A_SLL :
                          (instr[5:0] == F_SRL) ? A_SRL : A_SRA;
            dec.use_imm = 1'b1;
            dec.imm     = {27'd0, instr[10:6]};
          end
          default: dec.wr_gpr = 1'b0;
        endcase
      end
      OP_ADDI:  begin dec.wr_gpr = 1'b1; dec.use_imm = 1'b1; dec.alu = A_ADD;  end
      OP_SLTI:  begin dec.wr_gpr = 1'b1; dec.use_imm = 1'b1; dec.alu = A_SLT;  end
      OP_SLTIU: begin dec.wr_gpr = 1'b1; dec.use_imm = 1'b1; dec.alu = A_SLTU; end
      OP_ANDI, OP_ORI, OP_XORI: begin
        dec.wr_gpr  = 1'b1;
        dec.use_imm = 1'b1;
        dec.imm     = {16'd0, instr[15:0]};
        dec.alu     = (instr[30:26] == OP_ANDI) ? A_AND :
                      (instr[30:26] == OP_ORI)  ? A_OR  : A_XOR;
      end
      OP_LUI: begin
        dec.wr_gpr = 1'b1; dec.use_imm = 1'b1; dec.alu = A_LUI;
        dec.imm    = {instr[15:0], 16'd0};
      end
      OP_LW:   begin dec.wr_gpr = 1'b1; dec.mem = M_LW;  end
      OP_LB:   begin dec.wr_gpr = 1'b1; dec.mem = M_LB;  end
      OP_LBU:  begin dec.wr_gpr = 1'b1; dec.mem = M_LBU; end
      OP_SW:   dec.mem = M_SW;
      OP_SB:   dec.mem = M_SB;
      OP_SWRT: begin dec.mem = M_SW; dec.stsrc = SD_RT;  end
      OP_SAS:  begin dec.mem = M_SW; dec.stsrc = SD_PLS; end
      OP_LWRT: dec.mem = M_LWRT;
      OP_LAS:  dec.mem = M_LAS;
      OP_BEQZ, OP_BNEZ: dec.ctl = C_BRANCH;
      OP_J:      dec.ctl = C_JUMP;
      OP_JR:     dec.ctl = C_JR;
      OP_CALL:   dec.ctl = C_CALL;
      OP_CALLR:  dec.ctl = C_CALLR;
      OP_CALLM:  dec.ctl = C_CALLM;
      OP_RETURN: dec.ctl = C_RETURN;
      OP_COLANE: dec.ctl = C_COLANE;
      OP_HALT:   dec.ctl = C_HALT;
      OP_PB:     dec.ctl = C_PB;
      default: ;
    endcase
    // $0 is hard-wired to zero: a write to it is dropped.
    if (dec.rd == 5'd0) dec.wr_gpr = 1'b0;
  end
endmodule

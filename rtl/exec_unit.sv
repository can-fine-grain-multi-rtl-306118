// exec_unit: execute stage of one SLA lane.
//
// Combinational. Given the decoded instruction, its PC and its operands (already
// bypassed), it produces the integer ALU result, the branch condition and all
// control-transfer targets, and the data-memory request. Loads and stores use
// only register-deferred addressing (address = rs), as the document requires; the
// effective address is computed by a separate ALU instruction. Branches compare a
// single register with zero (beqz/bnez). The store datum is rt, or the RT / PLS
// value for swrt / sas, which the caller supplies in spec_val.
// Timing: no state; results are used in the same cycle (EX stage).
module exec_unit
  import sla_pkg::*;
(
  input  dec_t        dec,
  input  logic [31:0] pc,
  input  logic [31:0] a,         // rs value
  input  logic [31:0] b,         // rt value
  input  logic [31:0] spec_val,  // RT[rt] for swrt, PLS for sas
  output logic [31:0] result,
  output logic        br_taken,  // beqz/bnez condition holds
  output logic [31:0] br_target, // PC+4+offset
  output logic [31:0] j_target,  // region-absolute target (j, call, callm, pb)
  output logic [31:0] cl_target, // colane start address
  output logic        mem_re,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic [3:0]  mem_be
);
  logic [31:0] op_b;
  logic [31:0] pc4;

  assign op_b = dec.use_imm ? dec.imm : b;
  assign pc4  = pc + 32'd4;

  always_comb begin
    unique case (dec.alu)
      A_ADD:  result = a + op_b;
      A_SUB:  result = a - op_b;
      A_AND:  result = a & op_b;
      A_OR:   result = a | op_b;
      A_XOR:  result = a ^ op_b;
      A_NOR:  result = ~(a | op_b);
      A_SLT:  result = {31'd0, $signed(a) < $signed(op_b)};
      A_SLTU: result = {31'd0, a < op_b};
      A_SEQ:  result = {31'd0, a == op_b};
      A_SLL:  result = a << op_b[4:0];
      A_SRL:  result = a >> op_b[4:0];
      A_SRA:  result = $unsigned($signed(a) >>> op_b[4:0]);
      A_LUI:  result = op_b;
      default: result = '0;
    endcase
  end

  assign br_taken  = (dec.op == OP_BEQZ) ? (a == 32'd0) :
                     (dec.op == OP_BNEZ) ? (a != 32'd0) : 1'b0;
  assign br_target = pc4 + {dec.imm[29:0], 2'b00};
  assign j_target  = region_target(pc4, dec.tgt26);
  assign cl_target = pc + dec.cl_disp;

  function automatic logic [31:0] region_target(logic [31:0] p, logic [25:0] t);
    return {p[31:28], t, 2'b00};
  endfunction

  // Memory request.
  always_comb begin
    mem_re    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = a;
    mem_wdata = (dec.stsrc == SD_GPR) ? b : spec_val;
    mem_be    = 4'b1111;
    unique case (dec.mem)
      M_LW, M_LB, M_LBU, M_LWRT, M_LAS: mem_re = 1'b1;
      M_SW: mem_we = 1'b1;
      M_SB: begin
        mem_we    = 1'b1;
        mem_be    = 4'b0001 << a[1:0];
        mem_wdata = {4{b[7:0]}};
      end
      default: ;
    endcase
  end
endmodule

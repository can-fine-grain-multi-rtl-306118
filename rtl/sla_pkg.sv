// sla_pkg: types, constants and instruction encoders shared by the Synchronized
// Lane Architecture (SLA) processor.
//
// An SLA processor runs one RISC-style instruction stream per lane, all lanes in
// lock-step. Bit 31 of every instruction word is the suspend-resume (sr) bit, as
// the architecture requires, so the lane controller can act on it straight after
// fetch. Everything else about the binary format (5-bit opcode in [30:26], field
// positions, function codes) is this design's own MIPS-like choice.
//
// Formats (bit 31 = sr, [30:26] = opcode):
//   R   : rd[25:21] rs[20:16] rt[15:11] shamt[10:6] funct[5:0]
//   I   : rd[25:21] rs[20:16] imm[15:0]           (addi, andi, ..., loads)
//   S   : rs[20:16] = address, rt[15:11] = data   (sw, sb, swrt, sas)
//   B   : rs[20:16] off[15:0] (words, from PC+4)  (beqz, bnez)
//   J   : target[25:0] (word index in the 256 MiB region of PC) (j, call, callm, pb)
//   JR  : rs[20:16]                                (jr, callr)
//   CL  : lane[25:23] disp[22:0] (words, from the colane's own PC)
// Lane status (LS) follows the document's table: 00 inactive, 10 suspended,
// 11 active; 01 is unused and treated as inactive.
package sla_pkg;

  localparam int XLEN = 32;

  typedef enum logic [1:0] {
    LS_INACTIVE  = 2'b00,
    LS_SUSPENDED = 2'b10,
    LS_ACTIVE    = 2'b11
  } ls_e;

  typedef enum logic [4:0] {
    OP_ALU    = 5'd0,  OP_ADDI  = 5'd1,  OP_ANDI  = 5'd2,  OP_ORI   = 5'd3,
    OP_XORI   = 5'd4,  OP_SLTI  = 5'd5,  OP_SLTIU = 5'd6,  OP_LUI   = 5'd7,
    OP_LW     = 5'd8,  OP_LB    = 5'd9,  OP_LBU   = 5'd10, OP_SW    = 5'd11,
    OP_SB     = 5'd12, OP_BEQZ  = 5'd13, OP_BNEZ  = 5'd14, OP_J     = 5'd15,
    OP_JR     = 5'd16, OP_CALL  = 5'd17, OP_CALLR = 5'd18, OP_CALLM = 5'd19,
    OP_RETURN = 5'd20, OP_COLANE= 5'd21, OP_HALT  = 5'd22, OP_PB    = 5'd23,
    OP_SWRT   = 5'd24, OP_LWRT  = 5'd25, OP_SAS   = 5'd26, OP_LAS   = 5'd27
  } opcode_e;

  typedef enum logic [5:0] {
    F_SLL = 6'd0,  F_SRL = 6'd2,  F_SRA = 6'd3,  F_ADD = 6'd32, F_SUB = 6'd34,
    F_AND = 6'd36, F_OR  = 6'd37, F_XOR = 6'd38, F_NOR = 6'd39, F_SEQ = 6'd40,
    F_SLT = 6'd42, F_SLTU = 6'd43
  } funct_e;

  typedef enum logic [3:0] {
    A_ADD, A_SUB, A_AND, A_OR, A_XOR, A_NOR, A_SLT, A_SLTU, A_SEQ,
    A_SLL, A_SRL, A_SRA, A_LUI
  } alu_e;

  // Control class of an instruction, as seen by the lane controller.
  typedef enum logic [3:0] {
    C_NONE, C_BRANCH, C_JUMP, C_JR, C_CALL, C_CALLR, C_CALLM, C_RETURN,
    C_COLANE, C_HALT, C_PB
  } ctl_e;

  // Memory operation class.
  typedef enum logic [2:0] {
    M_NONE, M_LW, M_LB, M_LBU, M_SW, M_SB, M_LWRT, M_LAS
  } mem_e;

  // Extra stores whose data is not a general register.
  typedef enum logic [1:0] { SD_GPR, SD_RT, SD_PLS } stsrc_e;

  typedef struct packed {
    logic        sr;
    opcode_e     op;
    ctl_e        ctl;
    alu_e        alu;
    mem_e        mem;
    stsrc_e      stsrc;
    logic        use_imm;
    logic        wr_gpr;
    logic [4:0]  rd;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [31:0] imm;
    logic [25:0] tgt26;
    logic [2:0]  cl_lane;
    logic [31:0] cl_disp;   // byte displacement, sign extended
  } dec_t;

  // Message lane 0 sends to lanes 1+ with every pack (Fig. "branch type").
  typedef enum logic [2:0] {
    BT_NONE, BT_TAKEN, BT_CALL, BT_CALLM, BT_RETURN, BT_COLANE
  } btype_e;

  typedef struct packed {
    btype_e      bt;
    logic [2:0]  lane;    // colane target lane
    logic [31:0] target;  // colane start address
  } bmsg_t;

  // ---------------------------------------------------------------- encoders
  function automatic logic [31:0] enc_r(logic sr, funct_e f, logic [4:0] rd,
                                        logic [4:0] rs, logic [4:0] rt,
                                        logic [4:0] shamt = 5'd0);
    return {sr, OP_ALU, rd, rs, rt, shamt, f};
  endfunction

  function automatic logic [31:0] enc_i(logic sr, opcode_e op, logic [4:0] rd,
                                        logic [4:0] rs, logic [15:0] imm);
    return {sr, op, rd, rs, imm};
  endfunction

  function automatic logic [31:0] enc_s(logic sr, opcode_e op, logic [4:0] rs,
                                        logic [4:0] rt);
    return {sr, op, 5'd0, rs, rt, 11'd0};
  endfunction

  function automatic logic [31:0] enc_b(logic sr, opcode_e op, logic [4:0] rs,
                                        logic [15:0] off);
    return {sr, op, 5'd0, rs, off};
  endfunction

  function automatic logic [31:0] enc_j(logic sr, opcode_e op, logic [31:0] target);
    return {sr, op, target[27:2]};
  endfunction

  function automatic logic [31:0] enc_jr(logic sr, opcode_e op, logic [4:0] rs);
    return {sr, op, 5'd0, rs, 16'd0};
  endfunction

  function automatic logic [31:0] enc_colane(logic sr, logic [2:0] lane,
                                             logic [31:0] byte_disp);
    return {sr, OP_COLANE, lane, byte_disp[24:2]};
  endfunction

  function automatic logic [31:0] enc_op(logic sr, opcode_e op);
    return {sr, op, 26'd0};
  endfunction

  localparam logic [31:0] NOP    = 32'h0000_0000;
  localparam logic [31:0] NOP_SR = 32'h8000_0000;

  // pb is recognised straight from the fetched word (no full decode needed).
  // Jumps are only legal in lane 0, so in lanes 1+ a j word is a pb, as the
  // architecture defines it; the separate pb opcode is an alias of it.
  // Only nonzero lanes call this.
  function automatic logic is_pb(logic [31:0] w);
    return w[30:26] inside {OP_PB, OP_J};
  endfunction

endpackage

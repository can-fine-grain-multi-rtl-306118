// tb_laneN_frontend: drives lane 1's frontend through a scripted sequence and
// checks its PC and lane status after every step: start by colane, sequential
// fetch, self-suspend by sr, resume by lane 0's message (and no resume while
// inactive), a pb then a taken branch while suspended, call (inactive + RAS
// push) and return predicted from the RAS, halt in EX, and a misprediction that
// is detected and repaired from the saved state.
module tb_laneN_frontend;
  import sla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic advance, fetch_en, suspend, resume, ex_valid, recover, ex_halt, ex_call, ex_return, mismatch;
  logic [31:0] word, pc, pb, act_ret_pc, ex_seq_pc;
  ls_e ls, act_ret_ls, ex_seq_ls;
  bmsg_t pred_msg, act_msg;

  laneN_frontend #(.LANE_ID(1), .RAS_DEPTH(8)) dut (.*);

  initial begin repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", w, got, exp); end
  endtask

  // one pack: fetch side from the lane's own state, as the increment control does
  task automatic pack(input logic [31:0] w, input logic r0, input btype_e bt,
                      input logic [31:0] tgt = 0, input logic [2:0] ln = 1);
    @(negedge clk);
    advance  = 1;
    fetch_en = (ls == LS_ACTIVE);
    word     = w;
    suspend  = fetch_en && w[31];
    resume   = r0;
    pred_msg = '{bt: bt, lane: ln, target: tgt};
    @(posedge clk); #1;
    advance = 0; suspend = 0; resume = 0; fetch_en = 0; pred_msg = '0;
  endtask

  initial begin
    advance = 0; fetch_en = 0; suspend = 0; resume = 0; word = 0; pred_msg = '0;
    ex_valid = 0; act_msg = '0; act_ret_pc = 0; act_ret_ls = LS_INACTIVE;
    recover = 0; ex_halt = 0; ex_call = 0; ex_return = 0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk("reset ls", ls, LS_INACTIVE);
    pack(NOP, 1, BT_NONE);
    chk("inactive ignores resume", ls, LS_INACTIVE);
    pack(NOP, 0, BT_COLANE, 32'h1000, 3'd2);
    chk("colane for other lane", ls, LS_INACTIVE);
    pack(NOP, 0, BT_COLANE, 32'h1000, 3'd1);
    chk("colane ls", ls, LS_ACTIVE); chk("colane pc", pc, 32'h1000);
    pack(NOP, 0, BT_NONE);
    chk("seq pc", pc, 32'h1004);
    pack(enc_j(0, OP_J, 32'h1080), 0, BT_NONE);
    chk("j word in lane 1 written to PB", pb, 32'h1080); chk("pc after pb", pc, 32'h1008);
    pack(NOP_SR, 0, BT_NONE);
    chk("suspended by sr", ls, LS_SUSPENDED); chk("pc advanced", pc, 32'h100C);
    pack(NOP, 0, BT_NONE);
    chk("stays suspended", ls, LS_SUSPENDED); chk("no fetch", pc, 32'h100C);
    pack(NOP, 0, BT_TAKEN);
    chk("suspended lane follows branch", pc, 32'h1080);
    pack(NOP, 1, BT_NONE);
    chk("resumed", ls, LS_ACTIVE); chk("pc kept", pc, 32'h1080);
    pack(NOP_SR, 1, BT_NONE);
    chk("own sr wins over resume", ls, LS_SUSPENDED);
    pack(NOP, 1, BT_NONE);
    chk("resumed again", ls, LS_ACTIVE); chk("pc", pc, 32'h1084);
    // call: lane parks; the call's EX pushes the saved state
    pack(NOP, 0, BT_CALL);
    chk("call parks lane", ls, LS_INACTIVE);
    chk("seq state saved", ex_seq_pc, 32'h1088); chk("seq ls saved", ex_seq_ls, LS_ACTIVE);
    @(negedge clk); ex_valid = 1; ex_call = 1; act_msg = '{bt: BT_CALL, lane: 0, target: 0};
    #1; chk("no mismatch on predicted call", mismatch, 0);
    @(posedge clk); #1; ex_valid = 0; ex_call = 0; act_msg = '0;
    // return predicted from the RAS
    pack(NOP, 0, BT_RETURN);
    chk("return pc from RAS", pc, 32'h1088); chk("return ls from RAS", ls, LS_ACTIVE);
    @(negedge clk); ex_valid = 1; ex_return = 1; act_msg = '{bt: BT_RETURN, lane: 0, target: 0};
    act_ret_pc = 32'h1088; act_ret_ls = LS_ACTIVE;
    #1; chk("return agrees with RT/PLS", mismatch, 0);
    act_ret_pc = 32'h2000; #1;
    chk("return disagreeing with RT is a mismatch", mismatch, 1);
    recover = 1;
    @(posedge clk); #1; recover = 0; ex_valid = 0; ex_return = 0; act_msg = '0;
    chk("repaired pc", pc, 32'h2000); chk("repaired ls", ls, LS_ACTIVE);
    // predicted not-taken, actually taken: repaired to PB
    pack(NOP, 0, BT_NONE);
    chk("fall through", pc, 32'h2004);
    @(negedge clk); ex_valid = 1; act_msg = '{bt: BT_TAKEN, lane: 0, target: 0}; #1;
    chk("taken mismatch", mismatch, 1);
    recover = 1; @(posedge clk); #1; recover = 0; ex_valid = 0; act_msg = '0;
    chk("repaired to PB", pc, 32'h1080);
    // halt: suspended at fetch by its sr bit, inactive when it executes
    pack(enc_op(1, OP_HALT), 0, BT_NONE);
    chk("halt suspends at fetch", ls, LS_SUSPENDED);
    @(negedge clk); ex_valid = 1; ex_halt = 1; resume = 1; advance = 1; fetch_en = 0; word = NOP;
    @(posedge clk); #1; ex_valid = 0; ex_halt = 0; resume = 0; advance = 0;
    chk("halt in EX wins over resume", ls, LS_INACTIVE);
    pack(NOP, 1, BT_NONE);
    chk("halted lane not resumed", ls, LS_INACTIVE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

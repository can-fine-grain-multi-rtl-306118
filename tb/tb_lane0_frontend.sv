// tb_lane0_frontend: lane 0 with a 64-entry BTB, 8-bit gshare and 4-entry RAS.
// Steps a short instruction stream and feeds back the resolution of each pack:
// a cold jump is mispredicted and repaired, then predicted by the BTB with the
// taken message; a colane is learned with its lane and start address; a call
// and a return are learned and the return is predicted from the RAS.
module tb_lane0_frontend;
  import sla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic advance, ex_valid, ex_taken, recover, mismatch;
  logic [31:0] pc, ex_target, act_next_pc, ex_pc;
  logic [2:0] ex_cl_lane;
  ctl_e ex_ctl;
  bmsg_t pred_msg, act_msg;

  lane0_frontend #(.BTB_ENTRIES(64), .GHR_BITS(8), .RAS_DEPTH(4), .RESET_PC(32'h100)) dut (.*);

  initial begin repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", w, got, exp); end
  endtask

  // fetch one pack, then resolve it in the next cycle (no new fetch meanwhile)
  task automatic step(input ctl_e c, input logic [31:0] nxt, input btype_e bt,
                      input logic [31:0] tgt = 0, input logic [2:0] ln = 0,
                      output logic mis);
    @(negedge clk); advance = 1;
    @(posedge clk); #1; advance = 0;
    @(negedge clk);
    ex_valid = 1; ex_ctl = c; ex_taken = (bt == BT_TAKEN); act_next_pc = nxt;
    ex_target = (bt == BT_COLANE) ? tgt : nxt; ex_cl_lane = ln;
    act_msg = '{bt: bt, lane: (bt == BT_COLANE) ? ln : 3'd0, target: (bt == BT_COLANE) ? tgt : 32'd0};
    #1; mis = mismatch; recover = mismatch;
    @(posedge clk); #1; ex_valid = 0; recover = 0; ex_ctl = C_NONE;
  endtask

  initial begin
    logic m;
    advance = 0; ex_valid = 0; ex_taken = 0; recover = 0; ex_target = 0; act_next_pc = 0;
    ex_cl_lane = 0; ex_ctl = C_NONE; act_msg = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk("reset pc", pc, 32'h100);
    step(C_NONE, 32'h104, BT_NONE, 0, 0, m); chk("plain op predicted", m, 0); chk("pc", pc, 32'h104);
    step(C_JUMP, 32'h100, BT_TAKEN, 0, 0, m);  chk("cold jump mispredicted", m, 1); chk("repaired", pc, 32'h100);
    step(C_NONE, 32'h104, BT_NONE, 0, 0, m);
    @(negedge clk); #1;
    chk("BTB predicts jump target", dut.pred_next, 32'h100); chk("taken message", pred_msg.bt, BT_TAKEN);
    step(C_JUMP, 32'h100, BT_TAKEN, 0, 0, m);  chk("warm jump predicted", m, 0); chk("pc", pc, 32'h100);
    // colane at 0x100 (BTB entry replaced by a colane)
    step(C_COLANE, 32'h104, BT_COLANE, 32'h3000, 3'd3, m); chk("cold colane mismatch", m, 1);
    @(negedge clk); force dut.pc = 32'h100; @(posedge clk); #1; release dut.pc;
    // after release pc keeps 0x100 until the next step
    @(negedge clk); #1;
    chk("colane predicted", pred_msg.bt, BT_COLANE); chk("colane lane", pred_msg.lane, 3);
    chk("colane target", pred_msg.target, 32'h3000);
    step(C_COLANE, 32'h104, BT_COLANE, 32'h3000, 3'd3, m); chk("warm colane predicted", m, 0);
    // call at 0x104 to 0x800, return at 0x800 back to 0x108
    step(C_CALL, 32'h800, BT_CALL, 0, 0, m); chk("cold call", m, 1); chk("at callee", pc, 32'h800);
    step(C_RETURN, 32'h108, BT_RETURN, 0, 0, m); chk("cold return", m, 1); chk("back", pc, 32'h108);
    @(negedge clk); force dut.pc = 32'h104; @(posedge clk); #1; release dut.pc;
    step(C_CALL, 32'h800, BT_CALL, 0, 0, m); chk("warm call predicted", m, 0);
    @(negedge clk); #1;
    chk("return predicted", pred_msg.bt, BT_RETURN); chk("RAS target", dut.pred_next, 32'h108);
    step(C_RETURN, 32'h108, BT_RETURN, 0, 0, m); chk("warm return predicted", m, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

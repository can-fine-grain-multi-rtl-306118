// lane0_frontend: fetch-side state of lane 0, the master lane of the SLA processor.
//
// Lane 0 is always active and is the only lane that holds control transfers,
// so it alone has a branch predictor: a direct-mapped BTB that also records
// colane instructions (target lane and start address), a gshare direction
// predictor and a return address stack. Each fetch cycle it looks up its PC and
// produces the predicted next PC (PC+4, BTB target or RAS top) and the
// branch-type message for lanes 1+ (none, taken, call, callm, return or colane).
// When the pack advances the PC moves to the predicted next PC and the
// prediction is saved for the execute stage. There the core resolves the
// instruction and passes the actual next PC and message: mismatch reports a
// misprediction and recover loads the actual next PC. The BTB, the gshare
// counters and the RAS are trained when the instruction executes.
// Reset puts the PC at RESET_PC.
module lane0_frontend
  import sla_pkg::*;
#(
  parameter int          BTB_ENTRIES = 4096,
  parameter int          GHR_BITS    = 17,
  parameter int          RAS_DEPTH   = 8,
  parameter logic [31:0] RESET_PC    = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  // fetch stage
  input  logic        advance,
  output logic [31:0] pc,
  output bmsg_t       pred_msg,
  // execute stage of the previous pack
  input  logic        ex_valid,
  input  ctl_e        ex_ctl,
  input  logic        ex_taken,      // conditional branch outcome
  input  logic [31:0] ex_target,     // resolved control target (lane 0 / colane)
  input  logic [2:0]  ex_cl_lane,
  input  logic [31:0] act_next_pc,
  input  bmsg_t       act_msg,
  input  logic        recover,
  output logic        mismatch,
  output logic [31:0] ex_pc
);
  logic              b_hit, g_taken, r_empty;
  ctl_e              b_ctl;
  logic [31:0]       b_target, r_top, pred_next, ex_pred_next;
  logic [2:0]        b_lane;
  logic [GHR_BITS-1:0] g_idx, ex_gidx;
  bmsg_t             ex_pred_msg;
  logic [31:0]       pc4;

  assign pc4 = pc + 32'd4;

  always_comb begin
    pred_next = pc4;
    pred_msg  = '{bt: BT_NONE, lane: '0, target: '0};
    if (b_hit) begin
      unique case (b_ctl)
        C_BRANCH: if (g_taken) begin pred_next = b_target; pred_msg.bt = BT_TAKEN; end
        C_JUMP, C_JR: begin pred_next = b_target; pred_msg.bt = BT_TAKEN; end
        C_CALL, C_CALLR: begin pred_next = b_target; pred_msg.bt = BT_CALL; end
        C_CALLM: begin pred_next = b_target; pred_msg.bt = BT_CALLM; end
        C_RETURN: begin
          pred_next   = r_empty ? b_target : r_top;
          pred_msg.bt = BT_RETURN;
        end
        C_COLANE: begin
          pred_msg.bt     = BT_COLANE;
          pred_msg.lane   = b_lane;
          pred_msg.target = b_target;
        end
        default: ;
      endcase
    end
  end

  assign mismatch = ex_valid && (act_next_pc != ex_pred_next || act_msg != ex_pred_msg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc           <= RESET_PC;
      ex_pc        <= '0;
      ex_pred_next <= '0;
      ex_pred_msg  <= '0;
      ex_gidx      <= '0;
    end else if (recover) begin
      pc <= act_next_pc;
    end else if (advance) begin
      pc           <= pred_next;
      ex_pc        <= pc;
      ex_pred_next <= pred_next;
      ex_pred_msg  <= pred_msg;
      ex_gidx      <= g_idx;
    end
  end

  logic bt_update;
  assign bt_update = ex_valid && ex_ctl inside {C_BRANCH, C_JUMP, C_JR, C_CALL,
                     C_CALLR, C_CALLM, C_RETURN, C_COLANE};

  btb #(.ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n,
    .lk_pc    (pc),
    .lk_hit   (b_hit),
    .lk_ctl   (b_ctl),
    .lk_target(b_target),
    .lk_lane  (b_lane),
    .up_en    (bt_update),
    .up_pc    (ex_pc),
    .up_ctl   (ex_ctl),
    .up_target(ex_target),
    .up_lane  (ex_cl_lane)
  );

  gshare #(.GHR_BITS(GHR_BITS)) u_gshare (
    .clk, .rst_n,
    .pc      (pc),
    .taken   (g_taken),
    .idx     (g_idx),
    .up_en   (ex_valid && ex_ctl == C_BRANCH),
    .up_idx  (ex_gidx),
    .up_taken(ex_taken)
  );

  ras #(.DEPTH(RAS_DEPTH), .WIDTH(32)) u_ras (
    .clk, .rst_n,
    .push     (ex_valid && ex_ctl inside {C_CALL, C_CALLR, C_CALLM}),
    .push_data(ex_pc + 32'd4),
    .pop      (ex_valid && ex_ctl == C_RETURN),
    .top      (r_top),
    .empty    (r_empty)
  );
endmodule

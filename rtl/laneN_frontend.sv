// laneN_frontend: fetch-side state of one nonzero SLA lane (lanes 1 .. N-1).
//
// Holds the lane PC, the 2-bit lane status LS (00 inactive, 10 suspended,
// 11 active), the prepare-branch register PB and a return address stack whose
// entries carry the return PC and the lane status to restore (34 bits). It has
// no branch predictor: it follows the branch-type message that lane 0 sends
// with every pack.
//
// When a pack advances, the next state is computed in two steps:
//   1. sequential step: PC += 4 if the lane fetched; LS <= suspended if its own
//      word had sr set, else a suspended lane becomes active on lane 0's resume
//      message (its own sr wins when both happen in one pack);
//   2. control step from lane 0's message: taken branch/jump -> PC <= PB for an
//      active or suspended lane; call/callm -> LS <= inactive; return ->
//      PC, LS <= RAS top; colane naming this lane -> PC <= target, LS <= active.
// A pb word writes PB as soon as it is fetched, so a pb right before the branch
// pack is already visible. The state after step 1 and the predicted state are
// kept for the pack's execute stage. There, act_* gives the actual message and
// return state (RT/PLS); mismatch reports whether the fetch followed a wrong
// prediction, and recover rewrites PC and LS from the saved step-1 state. A halt
// reaching EX sets LS to inactive (it already suspended the lane at fetch by its
// sr bit). The RAS is pushed and popped when call and return execute.
module laneN_frontend
  import sla_pkg::*;
#(
  parameter int          LANE_ID   = 1,
  parameter int          RAS_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // fetch stage
  input  logic        advance,
  input  logic        fetch_en,
  input  logic        suspend,
  input  logic        resume,
  input  logic [31:0] word,
  input  bmsg_t       pred_msg,
  output logic [31:0] pc,
  output ls_e         ls,
  output logic [31:0] pb,
  // execute stage of the previous pack
  input  logic        ex_valid,
  input  bmsg_t       act_msg,
  input  logic [31:0] act_ret_pc,
  input  ls_e         act_ret_ls,
  input  logic        recover,
  input  logic        ex_halt,
  input  logic        ex_call,
  input  logic        ex_return,
  output logic        mismatch,
  output logic [31:0] ex_seq_pc,
  output ls_e         ex_seq_ls
);
  typedef struct packed {
    logic [31:0] pc;
    ls_e         ls;
  } st_t;

  st_t         seq_st, pred_st, act_st, ex_seq, ex_pred;
  logic [33:0] ras_top;
  logic        ras_empty;

  function automatic st_t apply(st_t s, bmsg_t m, logic [31:0] pbv,
                                logic [31:0] rpc, ls_e rls);
    st_t n = s;
    unique case (m.bt)
      BT_TAKEN:  if (s.ls != LS_INACTIVE) n.pc = pbv;
      BT_CALL, BT_CALLM: n.ls = LS_INACTIVE;
      BT_RETURN: begin n.pc = rpc; n.ls = rls; end
      BT_COLANE: if (32'(m.lane) == LANE_ID) begin
        n.pc = m.target;
        n.ls = LS_ACTIVE;
      end
      default: ;
    endcase
    return n;
  endfunction

  function automatic logic same(st_t a, st_t b);
    return (a.ls == b.ls) && (a.ls == LS_INACTIVE || a.pc == b.pc);
  endfunction

  always_comb begin
    seq_st.pc = (fetch_en) ? pc + 32'd4 : pc;
    seq_st.ls = suspend ? LS_SUSPENDED :
                (ls == LS_SUSPENDED && resume) ? LS_ACTIVE : ls;
    pred_st   = apply(seq_st, pred_msg, pb, ras_top[31:0],
                      ras_empty ? LS_INACTIVE : ls_e'(ras_top[33:32]));
    act_st    = apply(ex_seq, act_msg, pb, act_ret_pc, act_ret_ls);
  end

  assign mismatch  = ex_valid && !same(ex_pred, act_st);
  assign ex_seq_pc = ex_seq.pc;
  assign ex_seq_ls = ex_seq.ls;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      ls      <= LS_INACTIVE;
      pb      <= '0;
      ex_seq  <= '{pc: '0, ls: LS_INACTIVE};
      ex_pred <= '{pc: '0, ls: LS_INACTIVE};
    end else begin
      if (recover) begin
        pc <= act_st.pc;
        ls <= act_st.ls;
      end else if (advance) begin
        pc      <= pred_st.pc;
        ls      <= pred_st.ls;
        ex_seq  <= seq_st;
        ex_pred <= pred_st;
        if (fetch_en && is_pb(word)) pb <= {seq_st.pc[31:28], word[25:0], 2'b00};
      end
      if (ex_valid && ex_halt) ls <= LS_INACTIVE;
    end
  end

  ras #(.DEPTH(RAS_DEPTH), .WIDTH(34)) u_ras (
    .clk, .rst_n,
    .push     (ex_valid && ex_call),
    .push_data({ex_seq.ls, ex_seq.pc}),
    .pop      (ex_valid && ex_return),
    .top      (ras_top),
    .empty    (ras_empty)
  );
endmodule

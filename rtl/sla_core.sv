// sla_core: an N-lane Synchronized Lane Architecture (SLA) processor.
//
// An SLA processor runs a statically scheduled (VLIW-style) program as N
// separate instruction streams, one per lane, each with its own PC, private L1
// instruction cache and decoder. The operations that a VLIW would pack into one
// wide word are fetched by the N lanes in the same cycle and issue together as a
// "pack"; the lanes stay in lock-step because any instruction-cache miss stalls
// all of them. Instead of padding with no-ops, a lane sets the sr bit (bit 31)
// of an instruction to suspend itself after it; an sr bit in lane 0 resumes all
// suspended lanes for the next pack. Lane 0 holds every branch, jump, call,
// return and colane (start lane k at an address); the other lanes follow with
// their prepare-branch (PB) registers. call parks lanes 1+ (inactive) after
// saving every lane's return PC (RT) and lane status (PLS); return restores them.
//
// Pipeline (this design's own, shorter than the five stages the document
// evaluates; decode and register read are folded into EX):
//   IF : every active lane reads its I-cache; lane 0 predicts (BTB, gshare, RAS)
//        and broadcasts the branch type; sr bits update the lane states.
//   EX : decode, register read with bypass, ALU, lane-0 branch resolution,
//        data-memory access. A lane-0 misprediction (or a lane whose predicted
//        next state differs from the actual one) flushes the pack in IF and
//        rebuilds every lane's PC and status from the state saved at fetch.
//   WB : register-file, RT and PLS writes (load data arrives here); WB results
//        are bypassed to EX, so dependent packs issue back to back.
// There are no delay slots. The L2 cache is outside: every lane's I-cache fills
// through one shared, pipelined L2 port (l2_*), one request per cycle, each
// tagged with its lane. Data memory is an internal multi-port memory.
//
// Configuration: NLANES lanes (up to 8), per-lane I-cache size and line size in
// IC_BYTES_L / IC_LINE_L (defaults: 4 lanes of 8 KiB, 4-way, 64-byte lines, the
// document's symmetric 4-lane setup), a 4096-entry BTB, gshare with 17 history
// bits, 8-entry RAS, 32 KiB data memory. The port l2_resp_data is LINE_BYTES
// wide; lanes with shorter lines take its low bytes.
module sla_core
  import sla_pkg::*;
#(
  parameter int          NLANES      = 4,
  parameter int          IC_WAYS     = 4,
  parameter int          LINE_BYTES  = 64,
  parameter int          IC_BYTES_L [8] = '{8192, 8192, 8192, 8192, 8192, 8192, 8192, 8192},
  parameter int          IC_LINE_L  [8] = '{64, 64, 64, 64, 64, 64, 64, 64},
  parameter int          BTB_ENTRIES = 4096,
  parameter int          GHR_BITS    = 17,
  parameter int          RAS_DEPTH   = 8,
  parameter int          DMEM_BYTES  = 32768,
  parameter logic [31:0] RESET_PC    = 32'h0,
  localparam int         IDW         = (NLANES > 1) ? $clog2(NLANES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // shared L2 port
  output logic                    l2_req_valid,
  input  logic                    l2_req_ready,
  output logic [31:0]             l2_req_addr,
  output logic [IDW-1:0]          l2_req_id,
  input  logic                    l2_resp_valid,
  input  logic [IDW-1:0]          l2_resp_id,
  input  logic [LINE_BYTES*8-1:0] l2_resp_data,
  // status and counters
  output logic [2*NLANES-1:0]     lane_status,
  output logic [31:0]             packs,         // packs issued
  output logic [31:0]             stall_cycles,  // cycles lost to I-cache misses
  output logic [31:0]             mispredicts    // lane-0 mispredictions
);
  // ------------------------------------------------------------------ fetch
  logic [31:0] fpc      [NLANES];
  ls_e         ls       [NLANES];
  logic        ic_hit   [NLANES];
  logic [31:0] ic_word  [NLANES];
  logic        word_sr  [NLANES];
  logic        fetch_en [NLANES];
  logic        suspend  [NLANES];
  logic        stall, advance, resume, flush;
  bmsg_t       pred_msg;
  logic [31:0] lane_pb  [NLANES];  // PB registers (lane 0 has none)

  logic        fr_valid [NLANES];
  logic [31:0] fr_addr  [NLANES];
  logic        fr_ready [NLANES];
  logic        fs_valid [NLANES];

  // ---------------------------------------------------------------- IF / EX
  logic        ex_valid;
  logic        ex_iv    [NLANES];
  logic [31:0] ex_word  [NLANES];
  logic [31:0] ex_pcl   [NLANES];

  // ---------------------------------------------------------------- EX / WB
  logic        wb_we    [NLANES];
  logic [4:0]  wb_rd    [NLANES];
  logic [31:0] wb_alu   [NLANES];
  mem_e        wb_mem   [NLANES];
  logic [1:0]  wb_boff  [NLANES];
  logic [2:0]  wb_rtidx [NLANES];
  logic [31:0] wb_val   [NLANES];
  logic        wb_gpr   [NLANES];

  for (genvar l = 0; l < NLANES; l++) begin : g_sr
    assign word_sr[l] = ic_word[l][31];
  end

  increment_control #(.NLANES(NLANES)) u_inc (
    .ls, .ic_hit, .word_sr, .flush,
    .fetch_en, .stall, .advance, .suspend, .resume
  );

  // lane 0 --------------------------------------------------------------
  dec_t        dec      [NLANES];
  logic [31:0] opa      [NLANES];
  logic [31:0] opb      [NLANES];
  logic [31:0] spec     [NLANES];
  logic [31:0] res      [NLANES];
  logic        br_taken [NLANES];
  logic [31:0] br_tgt   [NLANES];
  logic [31:0] j_tgt    [NLANES];
  logic [31:0] cl_tgt   [NLANES];
  logic        m_re     [NLANES];
  logic        m_we     [NLANES];
  logic [31:0] m_addr   [NLANES];
  logic [31:0] m_wdata  [NLANES];
  logic [3:0]  m_be     [NLANES];
  logic        lv       [NLANES];   // lane holds a valid instruction in EX
  logic        mis      [NLANES];
  logic [31:0] seq_pc   [NLANES];
  ls_e         seq_ls   [NLANES];
  logic [31:0] rt_q     [NLANES];
  logic [31:0] rt_b     [NLANES];   // bypassed RT values
  logic [2*NLANES-1:0] pls_q, pls_b;

  logic [31:0] act_next_pc, ex_target, ex_pc0;
  bmsg_t       act_msg;
  ctl_e        ctl0;

  lane0_frontend #(
    .BTB_ENTRIES(BTB_ENTRIES), .GHR_BITS(GHR_BITS), .RAS_DEPTH(RAS_DEPTH),
    .RESET_PC(RESET_PC)
  ) u_lane0 (
    .clk, .rst_n,
    .advance,
    .pc         (fpc[0]),
    .pred_msg,
    .ex_valid,
    .ex_ctl     (ctl0),
    .ex_taken   (br_taken[0]),
    .ex_target,
    .ex_cl_lane (dec[0].cl_lane),
    .act_next_pc,
    .act_msg,
    .recover    (flush),
    .mismatch   (mis[0]),
    .ex_pc      (ex_pc0)
  );
  assign ls[0]      = LS_ACTIVE;
  assign lane_pb[0] = '0;
  assign seq_pc[0] = ex_pc0 + 32'd4;
  assign seq_ls[0] = LS_ACTIVE;

  // lanes 1+ --------------------------------------------------------------
  for (genvar l = 1; l < NLANES; l++) begin : g_lane
    laneN_frontend #(.LANE_ID(l), .RAS_DEPTH(RAS_DEPTH)) u_lane (
      .clk, .rst_n,
      .advance,
      .fetch_en  (fetch_en[l]),
      .suspend   (suspend[l]),
      .resume,
      .word      (ic_word[l]),
      .pred_msg,
      .pc        (fpc[l]),
      .ls        (ls[l]),
      .pb        (lane_pb[l]),
      .ex_valid,
      .act_msg,
      .act_ret_pc(rt_b[l]),
      .act_ret_ls(ls_e'(pls_b[2*l +: 2])),
      .recover   (flush),
      .ex_halt   (lv[l] && dec[l].ctl == C_HALT),
      .ex_call   (ex_valid && ctl0 inside {C_CALL, C_CALLR, C_CALLM}),
      .ex_return (ex_valid && ctl0 == C_RETURN),
      .mismatch  (mis[l]),
      .ex_seq_pc (seq_pc[l]),
      .ex_seq_ls (seq_ls[l])
    );
  end

  // instruction caches and the shared L2 port ------------------------------
  for (genvar l = 0; l < NLANES; l++) begin : g_ic
    localparam int LB = IC_LINE_L[l];
    icache #(.BYTES(IC_BYTES_L[l]), .WAYS(IC_WAYS), .LINE_BYTES(LB)) u_ic (
      .clk, .rst_n,
      .req            (fetch_en[l]),
      .addr           (fpc[l]),
      .hit            (ic_hit[l]),
      .rdata          (ic_word[l]),
      .fill_req_valid (fr_valid[l]),
      .fill_req_ready (fr_ready[l]),
      .fill_req_addr  (fr_addr[l]),
      .fill_resp_valid(fs_valid[l]),
      .fill_resp_data (l2_resp_data[LB*8-1:0])
    );
  end

  l2_arbiter #(.NLANES(NLANES), .LINE_BYTES(LINE_BYTES)) u_arb (
    .clk, .rst_n,
    .req_valid (fr_valid),
    .req_addr  (fr_addr),
    .req_ready (fr_ready),
    .resp_valid(fs_valid),
    .l2_req_valid, .l2_req_ready, .l2_req_addr, .l2_req_id,
    .l2_resp_valid, .l2_resp_id
  );

  // IF/EX register --------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
      for (int l = 0; l < NLANES; l++) begin
        ex_iv[l]   <= 1'b0;
        ex_word[l] <= '0;
        ex_pcl[l]  <= '0;
      end
    end else begin
      ex_valid <= advance;
      if (advance)
        for (int l = 0; l < NLANES; l++) begin
          ex_iv[l]   <= fetch_en[l];
          ex_word[l] <= ic_word[l];
          ex_pcl[l]  <= fpc[l];
        end
    end
  end

  // ------------------------------------------------------------------ EX
  logic [4:0]  rf_ra [NLANES];
  logic [4:0]  rf_rb [NLANES];
  logic [31:0] rf_da [NLANES];
  logic [31:0] rf_db [NLANES];

  for (genvar l = 0; l < NLANES; l++) begin : g_ex
    decoder u_dec (.instr(ex_word[l]), .dec(dec[l]));
    assign lv[l]    = ex_valid && ex_iv[l];
    assign rf_ra[l] = dec[l].rs;
    assign rf_rb[l] = dec[l].rt;
    exec_unit u_ex (
      .dec      (dec[l]),
      .pc       (ex_pcl[l]),
      .a        (opa[l]),
      .b        (opb[l]),
      .spec_val (spec[l]),
      .result   (res[l]),
      .br_taken (br_taken[l]),
      .br_target(br_tgt[l]),
      .j_target (j_tgt[l]),
      .cl_target(cl_tgt[l]),
      .mem_re   (m_re[l]),
      .mem_we   (m_we[l]),
      .mem_addr (m_addr[l]),
      .mem_wdata(m_wdata[l]),
      .mem_be   (m_be[l])
    );
  end

  // bypass from WB: the highest lane wins, as in the register file
  always_comb begin
    for (int l = 0; l < NLANES; l++) begin
      opa[l] = rf_da[l];
      opb[l] = rf_db[l];
      for (int w = 0; w < NLANES; w++) begin
        if (wb_gpr[w] && wb_rd[w] == dec[l].rs && dec[l].rs != 5'd0) opa[l] = wb_val[w];
        if (wb_gpr[w] && wb_rd[w] == dec[l].rt && dec[l].rt != 5'd0) opb[l] = wb_val[w];
      end
    end
    for (int k = 0; k < NLANES; k++) rt_b[k] = rt_q[k];
    pls_b = pls_q;
    for (int w = 0; w < NLANES; w++) begin
      for (int k = 0; k < NLANES; k++)
        if (wb_mem[w] == M_LWRT && 32'(wb_rtidx[w]) == k) rt_b[k] = wb_val[w];
      if (wb_mem[w] == M_LAS) pls_b = wb_val[w][2*NLANES-1:0];
    end
    for (int l = 0; l < NLANES; l++) begin
      spec[l] = '0;
      for (int k = 0; k < NLANES; k++)
        if (32'(dec[l].rt[2:0]) == k) spec[l] = rt_b[k];
      if (dec[l].stsrc == SD_PLS) spec[l] = 32'(pls_b);
    end
  end

  // lane-0 control resolution
  always_comb begin
    ctl0        = ex_valid ? dec[0].ctl : C_NONE;
    act_next_pc = ex_pc0 + 32'd4;
    act_msg     = '{bt: BT_NONE, lane: '0, target: '0};
    ex_target   = act_next_pc;
    unique case (ctl0)
      C_BRANCH: begin
        ex_target = br_tgt[0];
        if (br_taken[0]) begin act_next_pc = br_tgt[0]; act_msg.bt = BT_TAKEN; end
      end
      C_JUMP:  begin ex_target = j_tgt[0]; act_next_pc = j_tgt[0]; act_msg.bt = BT_TAKEN; end
      C_JR:    begin ex_target = opa[0];   act_next_pc = opa[0];   act_msg.bt = BT_TAKEN; end
      C_CALL:  begin ex_target = j_tgt[0]; act_next_pc = j_tgt[0]; act_msg.bt = BT_CALL;  end
      C_CALLR: begin ex_target = opa[0];   act_next_pc = opa[0];   act_msg.bt = BT_CALL;  end
      C_CALLM: begin ex_target = j_tgt[0]; act_next_pc = j_tgt[0]; act_msg.bt = BT_CALLM; end
      C_RETURN: begin ex_target = rt_b[0]; act_next_pc = rt_b[0];  act_msg.bt = BT_RETURN; end
      C_COLANE: begin
        ex_target      = cl_tgt[0];
        act_msg.bt     = BT_COLANE;
        act_msg.lane   = dec[0].cl_lane;
        act_msg.target = cl_tgt[0];
      end
      default: ;
    endcase
  end

  always_comb begin
    flush = 1'b0;
    for (int l = 0; l < NLANES; l++) if (mis[l]) flush = 1'b1;
  end

  regfile #(.NLANES(NLANES)) u_rf (
    .clk, .rst_n,
    .ra(rf_ra), .rb(rf_rb), .da(rf_da), .db(rf_db),
    .we(wb_gpr), .wa(wb_rd), .wd(wb_val)
  );

  // RT / PLS registers
  logic [31:0]         call_rt  [NLANES];
  logic [2*NLANES-1:0] call_pls;
  logic                ld_we    [NLANES];
  logic                ld_pls   [NLANES];
  always_comb begin
    for (int l = 0; l < NLANES; l++) begin
      call_rt[l]         = seq_pc[l];
      call_pls[2*l +: 2] = seq_ls[l];
      ld_we[l]           = wb_mem[l] inside {M_LWRT, M_LAS};
      ld_pls[l]          = wb_mem[l] == M_LAS;
    end
  end

  rt_pls #(.NLANES(NLANES)) u_rtpls (
    .clk, .rst_n,
    .call_we (ctl0 inside {C_CALL, C_CALLR}),
    .callm_we(ctl0 == C_CALLM),
    .call_rt, .call_pls,
    .ld_we, .ld_pls,
    .ld_idx  (wb_rtidx),
    .ld_data (wb_val),
    .rt      (rt_q),
    .pls     (pls_q)
  );

  // data memory
  logic        d_re  [NLANES];
  logic        d_we  [NLANES];
  logic [31:0] d_rd  [NLANES];
  always_comb
    for (int l = 0; l < NLANES; l++) begin
      d_re[l] = lv[l] && m_re[l];
      d_we[l] = lv[l] && m_we[l];
    end

  dmem #(.NLANES(NLANES), .BYTES(DMEM_BYTES)) u_dmem (
    .clk, .re(d_re), .we(d_we), .addr(m_addr), .wdata(m_wdata), .be(m_be),
    .rdata(d_rd)
  );

  // EX/WB register ----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NLANES; l++) begin
        wb_we[l]    <= 1'b0;
        wb_rd[l]    <= '0;
        wb_alu[l]   <= '0;
        wb_mem[l]   <= M_NONE;
        wb_boff[l]  <= '0;
        wb_rtidx[l] <= '0;
      end
    end else begin
      for (int l = 0; l < NLANES; l++) begin
        wb_we[l]    <= lv[l] && dec[l].wr_gpr;
        wb_rd[l]    <= dec[l].rd;
        wb_alu[l]   <= res[l];
        wb_mem[l]   <= (lv[l] && !(dec[l].mem inside {M_SW, M_SB})) ? dec[l].mem : M_NONE;
        wb_boff[l]  <= m_addr[l][1:0];
        wb_rtidx[l] <= dec[l].rd[2:0];
      end
    end
  end

  // ------------------------------------------------------------------ WB
  always_comb begin
    for (int l = 0; l < NLANES; l++) begin
      logic [7:0] byte_v;
      byte_v    = d_rd[l][8*wb_boff[l] +: 8];
      wb_gpr[l] = wb_we[l];
      unique case (wb_mem[l])
        M_LW, M_LWRT, M_LAS: wb_val[l] = d_rd[l];
        M_LB:                wb_val[l] = {{24{byte_v[7]}}, byte_v};
        M_LBU:               wb_val[l] = {24'd0, byte_v};
        default:             wb_val[l] = wb_alu[l];
      endcase
    end
  end

  // ------------------------------------------------------------ status out
  always_comb
    for (int l = 0; l < NLANES; l++) lane_status[2*l +: 2] = ls[l];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      packs        <= '0;
      stall_cycles <= '0;
      mispredicts  <= '0;
    end else begin
      if (advance) packs        <= packs + 1'b1;
      if (stall)   stall_cycles <= stall_cycles + 1'b1;
      if (flush)   mispredicts  <= mispredicts + 1'b1;
    end
  end
endmodule

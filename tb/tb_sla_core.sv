// tb_sla_core: end-to-end test of the SLA processor at its default size.
//
// Loads a small four-lane program into the L2 model and runs it to completion.
// The program starts lanes 1-3 with colane, runs a 24-iteration loop in which lane 1 works
// every pack, lane 2 suspends itself with an sr bit and is resumed by lane 0's
// sr bit, and lanes 1 and 2 follow lane 0's branch through their PB registers;
// lane 3 stores and halts. It then calls a function that starts lane 1 again,
// saves RT/PLS with swrt/sas, makes a nested callr to a leaf, restores with
// lwrt/las and returns, which must bring lanes 1 and 2 back where they were.
// A final jump sends three lanes to new cache lines at once. Results are
// checked in data memory against values worked out by hand, together with the
// cost of a lone I-cache miss (12 cycles with the L2 model's 10-cycle latency),
// the final lane states, and that every mechanism happened at least once.
module tb_sla_core;
  import sla_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         l2_req_valid, l2_req_ready, l2_resp_valid;
  logic [31:0]  l2_req_addr;
  logic [1:0]   l2_req_id, l2_resp_id;
  logic [511:0] l2_resp_data;
  logic [7:0]   lane_status;
  logic [31:0]  packs, stall_cycles, mispredicts;

  sla_core dut (
    .clk, .rst_n,
    .l2_req_valid, .l2_req_ready, .l2_req_addr, .l2_req_id,
    .l2_resp_valid, .l2_resp_id, .l2_resp_data,
    .lane_status, .packs, .stall_cycles, .mispredicts
  );

  l2_model #(.LAT(10), .LINE_BYTES(64), .WORDS(8192), .IDW(2)) u_l2 (
    .clk, .rst_n,
    .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_addr(l2_req_addr),
    .req_id(l2_req_id), .resp_valid(l2_resp_valid), .resp_id(l2_resp_id),
    .resp_data(l2_resp_data)
  );

  task automatic put(input int unsigned addr, input logic [31:0] w);
    u_l2.mem[addr >> 2] = w;
  endtask

  function automatic logic [31:0] addi(logic sr, logic [4:0] rd, logic [4:0] rs, int imm);
    return enc_i(sr, OP_ADDI, rd, rs, 16'(imm));
  endfunction
  function automatic logic [31:0] colane(int lane, int unsigned from, int unsigned to);
    return enc_colane(1'b0, 3'(lane), to - from);
  endfunction

  task automatic load_program();
    for (int i = 0; i < 8192; i++) u_l2.mem[i] = NOP;
    // ---- main, lane 0
    put(32'h00, addi(0, 20, 0, 'h100));
    put(32'h04, colane(1, 'h04, 'h1000));
    put(32'h08, colane(2, 'h08, 'h2000));
    put(32'h0C, colane(3, 'h0C, 'h3000));
    put(32'h10, addi(0, 1, 0, 24));
    put(32'h14, addi(0, 1, 1, -1));                       // LOOP
    put(32'h18, enc_b(1, OP_BNEZ, 1, 16'(-2)));           // bnez.sr r1, LOOP
    put(32'h1C, addi(0, 2, 0, 'h200));
    put(32'h20, enc_j(0, OP_CALL, 32'h4000));
    put(32'h24, enc_i(0, OP_LW, 26, 20, 0));
    put(32'h28, enc_j(0, OP_J, 32'h40));
    put(32'h40, addi(0, 29, 26, 100));
    put(32'h44, enc_s(0, OP_SW, 28, 29));
    put(32'h48, addi(0, 31, 0, 'h1a8));
    put(32'h4C, enc_s(0, OP_SW, 31, 30));
    put(32'h50, enc_j(0, OP_J, 32'h50));                  // END
    // ---- main, lane 1
    put(32'h1000, addi(0, 21, 0, 'h10c));
    put(32'h1004, enc_j(0, OP_PB, 32'h100C));
    put(32'h1008, addi(0, 10, 0, 0));
    put(32'h100C, addi(0, 10, 10, 3));                    // LOOP_1
    put(32'h1010, addi(0, 12, 10, 1));
    put(32'h1014, enc_s(0, OP_SW, 20, 10));
    put(32'h1018, enc_j(0, OP_J,  32'h1040));   // a j in a nonzero lane is a pb
    put(32'h101C, NOP);
    put(32'h1020, addi(0, 27, 0, 'h1a0));
    put(32'h1040, enc_s(0, OP_SB, 27, 26));
    put(32'h1044, enc_i(0, OP_LBU, 30, 27, 0));
    put(32'h1048, enc_op(1, OP_HALT));
    // ---- main, lane 2
    put(32'h2000, enc_j(0, OP_PB, 32'h2008));
    put(32'h2004, addi(0, 11, 0, 0));
    put(32'h2008, addi(1, 11, 11, 5));                    // LOOP_2, .sr
    put(32'h200C, addi(0, 22, 0, 'h104));
    put(32'h2010, enc_s(0, OP_SW, 22, 11));
    put(32'h2014, enc_j(0, OP_J,  32'h2040));   // a j in a nonzero lane is a pb
    put(32'h2018, addi(0, 28, 0, 'h1a4));
    put(32'h2040, enc_op(1, OP_HALT));
    // ---- main, lane 3
    put(32'h3000, addi(0, 24, 0, 77));
    put(32'h3004, enc_s(0, OP_SW, 21, 24));
    put(32'h3008, enc_op(1, OP_HALT));
    // ---- FN, lane 0 and lane 1
    put(32'h4000, colane(1, 'h4000, 'h5000));
    put(32'h4004, addi(0, 3, 0, 'h180));
    put(32'h4008, enc_s(0, OP_SAS, 3, 0));
    put(32'h400C, addi(0, 8, 0, 'h4100));
    put(32'h4010, enc_s(0, OP_SWRT, 14, 0));
    put(32'h4014, enc_jr(0, OP_CALLR, 8));
    put(32'h4018, enc_i(0, OP_LWRT, 0, 14, 0));
    put(32'h401C, addi(0, 16, 0, 'h190));
    put(32'h4020, enc_op(0, OP_RETURN));
    put(32'h5000, addi(0, 4, 0, 'h184));
    put(32'h5004, enc_s(0, OP_SWRT, 4, 1));
    put(32'h5008, addi(0, 14, 0, 'h188));
    put(32'h500C, addi(0, 9, 0, 7));
    put(32'h5010, addi(0, 15, 9, 1));
    put(32'h5014, enc_i(0, OP_LWRT, 1, 4, 0));
    put(32'h5018, enc_s(0, OP_LAS, 3, 0));
    put(32'h501C, enc_s(0, OP_SW, 16, 15));
    // ---- LEAF, lane 0 only
    put(32'h4100, addi(0, 13, 0, 'h3c));
    put(32'h4104, enc_op(0, OP_RETURN));
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] dword(int unsigned a);
    return dut.u_dmem.mem[a >> 2];
  endfunction

  // ------------------------------------------------------------ event counts
  int n_stall, n_backtoback, n_suspend, n_resume, n_colane, n_halt, n_pb,
      n_taken, n_taken_pred, n_flush, n_call, n_return, n_swrt, n_lwrt, n_sas,
      n_las, n_multimiss, n_bypass, n_jump_pred;
  logic prev_l2;
  int first_stall = -1;

  always @(posedge clk) if (rst_n) begin
    int nm;
    prev_l2 <= l2_req_valid;
    if (dut.stall) n_stall++;
    if (l2_req_valid && prev_l2) n_backtoback++;
    nm = 0;
    for (int l = 0; l < 4; l++) if (dut.fr_valid[l]) nm++;
    if (nm > 1) n_multimiss++;
    for (int l = 1; l < 4; l++) if (dut.suspend[l]) n_suspend++;
    for (int l = 1; l < 4; l++) if (dut.resume && dut.ls[l] == LS_SUSPENDED && !dut.suspend[l]) n_resume++;
    for (int l = 1; l < 4; l++) if (dut.advance && dut.fetch_en[l] && is_pb(dut.ic_word[l])) n_pb++;
    for (int l = 0; l < 4; l++) if (dut.lv[l] && dut.dec[l].ctl == C_HALT) n_halt++;
    for (int l = 0; l < 4; l++) begin
      if (dut.lv[l] && dut.dec[l].op == OP_SWRT) n_swrt++;
      if (dut.lv[l] && dut.dec[l].op == OP_LWRT) n_lwrt++;
      if (dut.lv[l] && dut.dec[l].op == OP_SAS)  n_sas++;
      if (dut.lv[l] && dut.dec[l].op == OP_LAS)  n_las++;
      for (int w = 0; w < 4; w++)
        if (dut.lv[l] && dut.wb_gpr[w] && dut.dec[l].rs != 0 && dut.wb_rd[w] == dut.dec[l].rs)
          n_bypass++;
    end
    if (dut.ex_valid && dut.ctl0 == C_COLANE) n_colane++;
    if (dut.ex_valid && dut.ctl0 inside {C_CALL, C_CALLR}) n_call++;
    if (dut.ex_valid && dut.ctl0 == C_RETURN) n_return++;
    if (dut.ex_valid && dut.ctl0 == C_BRANCH && dut.br_taken[0]) begin
      n_taken++;
      if (!dut.flush) n_taken_pred++;
    end
    if (dut.flush) n_flush++;
    if (dut.ex_valid && dut.ctl0 == C_JUMP && !dut.flush) n_jump_pred++;
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_program();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // the first fetch misses alone: wait for the first pack
    while (!dut.advance) @(posedge clk);
    check("lone I-cache miss penalty (cycles)", stall_cycles + (dut.stall ? 1 : 0), 12);
    // run until lane 0 sits in the END loop and the last store is done
    while (!(dut.fpc[0] == 32'h50 && dword('h1a8) == 32'd72)) @(posedge clk);
    repeat (20) @(posedge clk);

    check("lane 1 loop sum @0x100", dword('h100), 72);
    check("lane 2 loop sum @0x104", dword('h104), 120);
    check("lane 3 store   @0x10c", dword('h10c), 77);
    check("PLS saved by sas @0x180", dword('h180), 32'h3F);
    check("RT1 saved by swrt @0x184", dword('h184), 32'h101C);
    check("RT0 saved by swrt @0x188", dword('h188), 32'h24);
    check("lane-1 value after nested call @0x190", dword('h190), 8);
    check("sb byte @0x1a0", {24'd0, dword('h1a0)[7:0]}, 72);
    check("load-use result @0x1a4", dword('h1a4), 172);
    check("lbu result @0x1a8", dword('h1a8), 72);
    check("r12 (lane 1 dependent add)", dut.u_rf.r[12], 73);
    check("r13 (leaf)", dut.u_rf.r[13], 32'h3c);
    check("final lane states", {24'd0, lane_status}, 32'h03);
    check("mispredicts counted", mispredicts, n_flush);

    $display("events: stall=%0d l2_b2b=%0d multimiss=%0d suspend=%0d resume=%0d colane=%0d halt=%0d pb=%0d taken=%0d taken_pred=%0d flush=%0d call=%0d return=%0d swrt=%0d lwrt=%0d sas=%0d las=%0d bypass=%0d packs=%0d",
      n_stall, n_backtoback, n_multimiss, n_suspend, n_resume, n_colane, n_halt, n_pb,
      n_taken, n_taken_pred, n_flush, n_call, n_return, n_swrt, n_lwrt, n_sas, n_las, n_bypass, packs);
    check("I-cache stall happened", 32'(n_stall > 0), 1);
    check("several I-caches missed together", 32'(n_multimiss > 0), 1);
    check("back-to-back (pipelined) L2 requests", 32'(n_backtoback > 0), 1);
    check("sr suspend happened", 32'(n_suspend > 0), 1);
    check("lane-0 sr resume happened", 32'(n_resume > 0), 1);
    check("colane executed 4 times", n_colane, 4);
    check("halt executed 3 times", n_halt, 3);
    check("pb fetched 4 times", n_pb, 4);
    check("taken loop branch 23 times", n_taken, 23);
    check("a taken conditional branch was predicted", 32'(n_taken_pred > 0), 1);
    check("taken jump predicted by the BTB", 32'(n_jump_pred > 0), 1);
    check("misprediction flush happened", 32'(n_flush > 0), 1);
    check("call/callr executed", n_call, 2);
    check("return executed", n_return, 2);
    check("swrt/lwrt/sas/las executed", 32'(n_swrt == 2 && n_lwrt == 2 && n_sas == 1 && n_las == 1), 1);
    check("bypass used", 32'(n_bypass > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// sla_prog_run: runs one lane-parallel test program on one sla_core
// configuration and checks it; used by tb_sla_configs to cover several lane
// counts and instruction-cache splits with the same program.
//
// The program is generated for NLANES lanes. Lane 0 starts lanes 1..N-1 with
// colane, then runs a loop of ITER iterations whose first pack carries an sr bit
// (resume) and whose second pack is the loop branch. Every nonzero lane k
// prepares its branch target once with a pb (written as a j word), suspends,
// and then adds k to its own accumulator register in the branch pack of every
// iteration, suspending again each time. After the loop lane 0 resumes the
// lanes once more; each stores its sum to 0x200+4k and halts. Lane k's code
// starts 24 bytes into a 4 KiB region so that it spans one 64-byte line or two
// 32-byte lines. Checks: each stored sum (k*ITER), the final lane states (only
// lane 0 active), the number of I-cache fills each nonzero lane requested
// (lines its code spans), and that stalls and mispredictions happened.
// Interface: clk, rst_n in; done, checks, failures out (done rises once all
// checks are made). A 10-cycle L2 model serves the fills.
module sla_prog_run #(
  parameter int NLANES         = 4,
  parameter int IC_BYTES_L [8] = '{8192, 8192, 8192, 8192, 8192, 8192, 8192, 8192},
  parameter int IC_LINE_L  [8] = '{64, 64, 64, 64, 64, 64, 64, 64},
  parameter int ITER           = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import sla_pkg::*;

  localparam int IDW = (NLANES > 1) ? $clog2(NLANES) : 1;

  logic                 l2_req_valid, l2_req_ready, l2_resp_valid;
  logic [31:0]          l2_req_addr;
  logic [IDW-1:0]       l2_req_id, l2_resp_id;
  logic [511:0]         l2_resp_data;
  logic [2*NLANES-1:0]  lane_status;
  logic [31:0]          packs, stall_cycles, mispredicts;

  sla_core #(.NLANES(NLANES), .IC_BYTES_L(IC_BYTES_L), .IC_LINE_L(IC_LINE_L)) dut (
    .clk, .rst_n,
    .l2_req_valid, .l2_req_ready, .l2_req_addr, .l2_req_id,
    .l2_resp_valid, .l2_resp_id, .l2_resp_data,
    .lane_status, .packs, .stall_cycles, .mispredicts
  );

  l2_model #(.LAT(10), .LINE_BYTES(64), .WORDS(8192), .IDW(IDW)) u_l2 (
    .clk, .rst_n,
    .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_addr(l2_req_addr),
    .req_id(l2_req_id), .resp_valid(l2_resp_valid), .resp_id(l2_resp_id),
    .resp_data(l2_resp_data)
  );

  localparam int unsigned END_PC = 32'h40;

  function automatic int unsigned lane_base(int k);
    return 32'h1000 * k + 32'h18;
  endfunction

  task automatic put(input int unsigned addr, input logic [31:0] w);
    u_l2.mem[addr >> 2] = w;
  endtask

  task automatic load_program();
    int unsigned a, b;
    for (int i = 0; i < 8192; i++) u_l2.mem[i] = NOP;
    // lane 0: packs 0..N-2 start the lanes, pack N-1 sets the counter, pack N
    // waits for the last lane's pb.sr, then the loop
    for (int k = 1; k < NLANES; k++) begin
      a = 4 * (k - 1);
      put(a, enc_colane(1'b0, 3'(k), 32'(lane_base(k) - a)));
    end
    a = 4 * (NLANES - 1);
    put(a,      enc_i(0, OP_ADDI, 5'd1, 5'd0, 16'(ITER)));
    put(a + 4,  NOP);
    put(a + 8,  enc_i(1, OP_ADDI, 5'd1, 5'd1, 16'hFFFF));      // loop: r1--, sr
    put(a + 12, enc_b(0, OP_BNEZ, 5'd1, 16'hFFFE));            // bnez r1, loop
    put(a + 16, NOP_SR);                                       // resume for the stores
    put(END_PC, enc_j(0, OP_J, END_PC));                       // end: j end
    // lane k: address register r(16+k), accumulator r(8+k)
    for (int k = 1; k < NLANES; k++) begin
      b = lane_base(k);
      put(b,      enc_i(0, OP_ADDI, 5'(16 + k), 5'd0, 16'(32'h200 + 4 * k)));
      put(b + 4,  enc_j(1, OP_J, b + 8));                      // pb.sr loop_k
      put(b + 8,  enc_i(1, OP_ADDI, 5'(8 + k), 5'(8 + k), 16'(k)));
      put(b + 12, enc_s(0, OP_SW, 5'(16 + k), 5'(8 + k)));
      put(b + 16, enc_op(1, OP_HALT));
    end
  endtask

  // I-cache fill requests per lane
  int fills [NLANES];
  always @(posedge clk) if (rst_n && l2_req_valid && l2_req_ready) fills[l2_req_id] <= fills[l2_req_id] + 1;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %m %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    int unsigned b, lines;
    done = 1'b0; checks = 0; failures = 0;
    for (int k = 0; k < NLANES; k++) fills[k] = 0;
    load_program();
    @(posedge rst_n);
    while (!(dut.fpc[0] == END_PC && lane_status == (2*NLANES)'(3))) @(posedge clk);
    repeat (10) @(posedge clk);
    for (int k = 1; k < NLANES; k++)
      check($sformatf("lane %0d sum", k), dut.u_dmem.mem[(32'h200 + 4 * k) >> 2], 32'(k * ITER));
    check("only lane 0 active at the end", 32'(lane_status), 32'h3);
    for (int k = 1; k < NLANES; k++) begin
      b = lane_base(k);
      lines = (b + 16) / IC_LINE_L[k] - b / IC_LINE_L[k] + 1;
      check($sformatf("lane %0d I-cache fills", k), 32'(fills[k]), 32'(lines));
    end
    check("I-cache stalls happened", 32'(stall_cycles > 0), 1);
    check("mispredictions happened", 32'(mispredicts > 0), 1);
    $display("%m: NLANES=%0d packs=%0d stall_cycles=%0d mispredicts=%0d",
             NLANES, packs, stall_cycles, mispredicts);
    done = 1'b1;
  end
endmodule

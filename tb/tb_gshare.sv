// tb_gshare: checks the gshare predictor (10 history bits) against a reference
// model of the counters and history (the counter RAM, which has no reset, is
// preset to weakly not-taken through the hierarchy): index = PC[11:2] ^ history, prediction =
// counter MSB, saturating 2-bit update and history shift at update.
module tb_gshare;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int G = 10;
  logic [31:0] pc;
  logic taken, up_en, up_taken;
  logic [G-1:0] idx, up_idx, ghr;
  int ctr [1 << G];

  gshare #(.GHR_BITS(G)) dut (.*);

  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    pc = 0; up_en = 0; up_idx = 0; up_taken = 0; ghr = 0;
    for (int i = 0; i < (1 << G); i++) begin ctr[i] = 1; dut.ctr[i] = 2'b01; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      pc = {20'd0, 3'($urandom), 7'd0, 2'b00} | ($urandom_range(0,1) << 5);
      #1;
      checks += 2;
      if (idx !== (pc[G+1:2] ^ ghr)) begin failures++; $display("FAIL idx"); end
      if (taken !== (ctr[pc[G+1:2] ^ ghr] >= 2)) begin failures++; $display("FAIL pred"); end
      up_en = 1; up_idx = idx; up_taken = (pc[5] == 1'b1) ? 1'b1 : ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (up_taken && ctr[up_idx] < 3) ctr[up_idx]++;
      if (!up_taken && ctr[up_idx] > 0) ctr[up_idx]--;
      ghr = {ghr[G-2:0], up_taken};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

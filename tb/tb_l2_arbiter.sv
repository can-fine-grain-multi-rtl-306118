// tb_l2_arbiter: four lanes raise line requests at random and hold them until
// accepted. Checks one grant per cycle, that the granted address and id are
// the winner's, round-robin order among simultaneous requests, bounded waiting,
// and that responses reach only the lane named by the response id.
module tb_l2_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic req_valid [4], req_ready [4], resp_valid [4];
  logic [31:0] req_addr [4];
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  logic [31:0] l2_req_addr;
  logic [1:0] l2_req_id, l2_resp_id;
  int waitc [4];
  int last = 3;

  l2_arbiter #(.NLANES(4), .LINE_BYTES(64)) dut (.*);

  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int l = 0; l < 4; l++) begin req_valid[l] = 0; req_addr[l] = 0; waitc[l] = 0; end
    l2_req_ready = 1; l2_resp_valid = 0; l2_resp_id = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      int ng, exp_g;
      @(negedge clk);
      for (int l = 0; l < 4; l++)
        if (!req_valid[l] && $urandom_range(0, 3) == 0) begin
          req_valid[l] = 1; req_addr[l] = {$urandom, 6'd0}; waitc[l] = 0;
        end
      l2_req_ready = $urandom_range(0, 4) != 0;
      l2_resp_valid = $urandom_range(0, 1); l2_resp_id = 2'($urandom);
      #1;
      // expected winner: first requesting lane after the last one granted
      exp_g = -1;
      for (int k = 1; k <= 4; k++) if (exp_g < 0 && req_valid[(last + k) % 4]) exp_g = (last + k) % 4;
      ng = 0;
      for (int l = 0; l < 4; l++) if (req_ready[l]) ng++;
      checks += 2;
      if (ng > 1) begin failures++; $display("FAIL two grants"); end
      if (l2_req_valid !== (exp_g >= 0)) begin failures++; $display("FAIL valid"); end
      if (exp_g >= 0) begin
        checks += 2;
        if (l2_req_id !== 2'(exp_g)) begin failures++; $display("FAIL id %0d exp %0d", l2_req_id, exp_g); end
        if (l2_req_addr !== req_addr[exp_g]) begin failures++; $display("FAIL addr"); end
        if (l2_req_ready) begin
          checks++;
          if (!req_ready[exp_g]) begin failures++; $display("FAIL ready"); end
        end
      end
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (resp_valid[l] !== (l2_resp_valid && l2_resp_id == 2'(l))) begin failures++; $display("FAIL resp"); end
      end
      @(posedge clk); #1;
      if (exp_g >= 0 && l2_req_ready) begin req_valid[exp_g] = 0; last = exp_g; end
      for (int l = 0; l < 4; l++) if (req_valid[l]) begin
        waitc[l]++;
        if (waitc[l] > 40) begin failures++; checks++; $display("FAIL starvation"); waitc[l] = 0; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_icache: a 512-byte, 2-way, 16-byte-line cache (8 sets) in front of the L2
// model fetches random words from a 2 KiB region. Every hit must return the
// model's word; a lone miss must take the fill request plus the model's latency;
// the region is larger than the cache, so lines are evicted and refetched.
module tb_icache;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic req, hit, fill_req_valid, fill_req_ready, fill_resp_valid, rv;
  logic [31:0] addr, rdata, fill_req_addr;
  logic [127:0] fill_resp_data;
  logic [0:0] rid;

  icache #(.BYTES(512), .WAYS(2), .LINE_BYTES(16)) dut (.*);
  l2_model #(.LAT(6), .LINE_BYTES(16), .WORDS(512), .IDW(1)) u_l2 (
    .clk, .rst_n, .req_valid(fill_req_valid), .req_ready(fill_req_ready),
    .req_addr(fill_req_addr), .req_id(1'b0), .resp_valid(rv), .resp_id(rid),
    .resp_data(fill_resp_data));
  assign fill_resp_valid = rv;

  initial begin repeat (40000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int misses = 0, wait_c;
    for (int i = 0; i < 512; i++) u_l2.mem[i] = $urandom;
    req = 0; addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 1500; it++) begin
      @(negedge clk);
      req = 1; addr = {21'd0, 9'($urandom), 2'b00};
      wait_c = 0;
      #1;
      while (!hit) begin @(posedge clk); #1; wait_c++; end
      if (wait_c > 0) begin
        misses++;
        checks++;
        // miss seen, request, LAT cycles in the model, fill written
        if (wait_c != 6 + 2) begin failures++; $display("FAIL miss cycles %0d", wait_c); end
      end
      checks++;
      if (rdata !== u_l2.mem[addr[10:2]]) begin failures++; $display("FAIL data @%h", addr); end
    end
    checks++;
    if (misses < 50 || misses > 1400) begin failures++; $display("FAIL miss count %0d", misses); end
    $display("misses=%0d", misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

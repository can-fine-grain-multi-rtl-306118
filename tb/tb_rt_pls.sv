// tb_rt_pls: exercises call saves, callm (RT0 only), lwrt and las loads and the
// call-over-load priority against a reference model.
module tb_rt_pls;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic call_we, callm_we;
  logic [31:0] call_rt [4], ld_data [4], rt [4];
  logic [7:0] call_pls, pls;
  logic ld_we [4], ld_pls [4];
  logic [2:0] ld_idx [4];
  logic [31:0] mrt [4];
  logic [7:0] mpls;

  rt_pls #(.NLANES(4)) dut (.*);

  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    call_we = 0; callm_we = 0; call_pls = 0; mpls = 0;
    for (int l = 0; l < 4; l++) begin call_rt[l] = 0; ld_data[l] = 0; ld_we[l] = 0; ld_pls[l] = 0; ld_idx[l] = 0; mrt[l] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 800; it++) begin
      @(negedge clk);
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (rt[l] !== mrt[l]) begin failures++; $display("FAIL rt%0d", l); end
      end
      checks++; if (pls !== mpls) begin failures++; $display("FAIL pls"); end
      call_we = $urandom_range(0, 4) == 0; callm_we = !call_we && $urandom_range(0, 4) == 0;
      call_pls = 8'($urandom);
      for (int l = 0; l < 4; l++) begin
        call_rt[l] = $urandom; ld_data[l] = $urandom;
        ld_we[l] = $urandom_range(0, 3) == 0; ld_pls[l] = $urandom_range(0, 3) == 0;
        ld_idx[l] = 3'($urandom_range(0, 3));
      end
      @(posedge clk);
      for (int l = 0; l < 4; l++)
        if (ld_we[l]) begin if (ld_pls[l]) mpls = ld_data[l][7:0]; else mrt[ld_idx[l]] = ld_data[l]; end
      if (call_we) begin for (int l = 0; l < 4; l++) mrt[l] = call_rt[l]; mpls = call_pls; end
      else if (callm_we) mrt[0] = call_rt[0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

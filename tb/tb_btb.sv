// tb_btb: writes random entries into the BTB (small size) and checks lookups
// against a reference model: hit only for the exact PC last written at that
// index, returning its class, target and colane lane.
module tb_btb;
  import sla_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int E = 64;
  logic [31:0] lk_pc, lk_target, up_pc, up_target;
  logic lk_hit, up_en;
  ctl_e lk_ctl, up_ctl;
  logic [2:0] lk_lane, up_lane;
  logic        rv [E];
  logic [31:0] rpc [E], rtg [E];
  ctl_e        rct [E];
  logic [2:0]  rln [E];

  btb #(.ENTRIES(E)) dut (.*);

  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    up_en = 0; up_pc = 0; up_ctl = C_NONE; up_target = 0; up_lane = 0; lk_pc = 0;
    for (int i = 0; i < E; i++) rv[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      up_en     = $urandom_range(0, 1);
      up_pc     = {22'($urandom_range(0, 3)), 6'($urandom), 2'b00};
      up_ctl    = ctl_e'($urandom_range(1, 8));
      up_target = $urandom & ~32'd3;
      up_lane   = 3'($urandom);
      lk_pc     = ($urandom_range(0, 1)) ? up_pc : {22'($urandom_range(0, 3)), 6'($urandom), 2'b00};
      #1;
      begin
        int i;
        i = int'(lk_pc[7:2]);
        checks++;
        if (lk_hit != (rv[i] && rpc[i] == lk_pc)) begin failures++; $display("FAIL hit pc=%h", lk_pc); end
        else if (lk_hit) begin
          checks++;
          if (lk_ctl != rct[i] || lk_target != rtg[i] || lk_lane != rln[i]) begin
            failures++; $display("FAIL entry pc=%h", lk_pc); end
        end
      end
      @(posedge clk);
      if (up_en) begin
        int i;
        i = int'(up_pc[7:2]);
        rv[i] = 1; rpc[i] = up_pc; rct[i] = up_ctl; rtg[i] = up_target; rln[i] = up_lane;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

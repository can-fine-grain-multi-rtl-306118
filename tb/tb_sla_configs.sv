// tb_sla_configs: runs the same lane-parallel program on the other lane and
// instruction-cache configurations of the architecture (the default four lanes
// of 8 KiB are covered by tb_sla_core):
//   - four lanes with caches of 16, 8, 4 and 4 KiB;
//   - eight lanes of 4 KiB each;
//   - eight lanes of 8, 4, 4, 4, 4, 4, 2 and 2 KiB, the two 2 KiB caches with
//     32-byte lines.
// Each configuration is an sla_prog_run instance with its own core and L2
// model; see that module for the program and the checks. All run in parallel
// from one reset; the test ends when all are done, with a watchdog.
module tb_sla_configs;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [3];
  int   c    [3];
  int   f    [3];

  sla_prog_run #(.NLANES(4), .IC_BYTES_L('{16384, 8192, 4096, 4096, 4096, 4096, 4096, 4096}))
    u_asym4 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  sla_prog_run #(.NLANES(8), .IC_BYTES_L('{4096, 4096, 4096, 4096, 4096, 4096, 4096, 4096}))
    u_wide8 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  sla_prog_run #(.NLANES(8), .IC_BYTES_L('{8192, 4096, 4096, 4096, 4096, 4096, 2048, 2048}),
                 .IC_LINE_L('{64, 64, 64, 64, 64, 64, 32, 32}))
    u_asym8 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!(done[0] && done[1] && done[2])) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule

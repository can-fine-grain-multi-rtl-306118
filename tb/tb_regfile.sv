// tb_regfile: random writes from all four lanes and reads on all eight ports,
// checked against a reference array ($0 stays zero, highest lane wins).
module tb_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [4:0] ra [4], rb [4], wa [4];
  logic [31:0] da [4], db [4], wd [4];
  logic we [4];
  logic [31:0] m [32];

  regfile #(.NLANES(4)) dut (.*);

  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 32; i++) m[i] = 0;
    for (int l = 0; l < 4; l++) begin we[l] = 0; wa[l] = 0; wd[l] = 0; ra[l] = 0; rb[l] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      for (int l = 0; l < 4; l++) begin
        we[l] = $urandom_range(0, 1); wa[l] = 5'($urandom); wd[l] = $urandom;
        ra[l] = 5'($urandom); rb[l] = 5'($urandom);
      end
      #1;
      for (int l = 0; l < 4; l++) begin
        checks += 2;
        if (da[l] !== m[ra[l]]) begin failures++; $display("FAIL da r%0d", ra[l]); end
        if (db[l] !== m[rb[l]]) begin failures++; $display("FAIL db r%0d", rb[l]); end
      end
      @(posedge clk);
      for (int l = 0; l < 4; l++) if (we[l] && wa[l] != 0) m[wa[l]] = wd[l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

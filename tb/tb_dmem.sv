// tb_dmem: random byte-enabled stores and loads on four ports of a 1 KiB data
// memory, checked against a reference byte array; loads return data one cycle
// after the request.
module tb_dmem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic re [4], we [4];
  logic [31:0] addr [4], wdata [4], rdata [4];
  logic [3:0] be [4];
  logic [7:0] m [1024];
  logic [31:0] exp_r [4];
  logic exp_v [4];

  dmem #(.NLANES(4), .BYTES(1024)) dut (.*);

  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int l = 0; l < 4; l++) begin re[l] = 0; we[l] = 0; addr[l] = 0; wdata[l] = 0; be[l] = 0; exp_v[l] = 0; end
    // initialise through the store ports
    for (int a = 0; a < 1024; a += 4) begin
      @(negedge clk); we[0] = 1; addr[0] = a; wdata[0] = 0; be[0] = 4'hf;
      @(posedge clk);
    end
    for (int i = 0; i < 1024; i++) m[i] = 0;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      for (int l = 0; l < 4; l++) begin
        if (exp_v[l]) begin
          checks++;
          if (rdata[l] !== exp_r[l]) begin failures++; $display("FAIL lane %0d", l); end
        end
        we[l] = $urandom_range(0, 2) == 0; re[l] = !we[l] && $urandom_range(0, 1);
        addr[l] = {22'd0, 8'($urandom), 2'b00}; wdata[l] = $urandom; be[l] = 4'($urandom);
        exp_v[l] = re[l];
        exp_r[l] = {m[addr[l]+3], m[addr[l]+2], m[addr[l]+1], m[addr[l]]};
      end
      @(posedge clk);
      for (int l = 0; l < 4; l++)
        if (we[l]) for (int b = 0; b < 4; b++) if (be[l][b]) m[addr[l] + b] = wdata[l][8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

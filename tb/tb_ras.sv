// tb_ras: pushes and pops the return address stack against a reference queue,
// including overflow past DEPTH (oldest entry lost) and pop when empty.
module tb_ras;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic push, pop, empty;
  logic [33:0] pd, top;
  logic [33:0] ref_q[$];

  ras #(.DEPTH(8), .WIDTH(34)) dut (.clk, .rst_n, .push, .push_data(pd), .pop, .top, .empty);

  initial begin repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    push = 0; pop = 0; pd = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (!empty) failures++;
    for (int it = 0; it < 400; it++) begin
      push = ($urandom_range(0, 2) != 0) && (it < 300 || ($urandom_range(0,3)==0));
      pop  = !push && $urandom_range(0, 1);
      pd   = {$urandom, $urandom} & 34'h3_ffff_ffff;
      @(posedge clk);
      if (push) begin ref_q.push_back(pd); if (ref_q.size() > 8) void'(ref_q.pop_front()); end
      else if (pop && ref_q.size() > 0) void'(ref_q.pop_back());
      @(negedge clk);
      checks++;
      if (empty != (ref_q.size() == 0)) begin failures++; $display("FAIL empty at %0d", it); end
      if (ref_q.size() > 0) begin
        checks++;
        if (top !== ref_q[$]) begin failures++; $display("FAIL top %h exp %h", top, ref_q[$]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_increment_control: random lane states, hits and sr bits against a
// reference of the lock-step rules (any fetching lane's miss stalls all; own sr
// suspends lanes 1+; lane 0's sr is the resume message; flush cancels).
module tb_increment_control;
  import sla_pkg::*;
  int checks = 0, failures = 0;
  ls_e  ls [4];
  logic ic_hit [4], word_sr [4], fetch_en [4], suspend [4];
  logic flush, stall, advance, resume;

  increment_control #(.NLANES(4)) dut (.*);

  initial begin #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      logic es, ea, er;
      logic ef [4];
      for (int l = 0; l < 4; l++) begin
        int s;
        s = $urandom_range(0, 2);
        ls[l] = (s == 0) ? LS_INACTIVE : (s == 1) ? LS_SUSPENDED : LS_ACTIVE;
        ic_hit[l] = $urandom_range(0, 4) != 0; word_sr[l] = $urandom_range(0, 1);
      end
      flush = $urandom_range(0, 5) == 0;
      #1;
      es = 0;
      for (int l = 0; l < 4; l++) begin
        ef[l] = (l == 0) || ls[l] == LS_ACTIVE;
        if (ef[l] && !ic_hit[l]) es = 1;
      end
      ea = !es && !flush; er = ea && word_sr[0];
      checks += 3;
      if (stall !== es) begin failures++; $display("FAIL stall"); end
      if (advance !== ea) begin failures++; $display("FAIL advance"); end
      if (resume !== er) begin failures++; $display("FAIL resume"); end
      for (int l = 0; l < 4; l++) begin
        checks += 2;
        if (fetch_en[l] !== ef[l]) begin failures++; $display("FAIL fetch_en %0d", l); end
        if (suspend[l] !== (ea && l != 0 && ef[l] && word_sr[l])) begin failures++; $display("FAIL suspend %0d", l); end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

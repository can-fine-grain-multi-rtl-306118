// increment_control: the lock-step controller of the SLA processor.
//
// Each cycle it decides which lanes fetch (lane 0 always; lanes 1+ only when
// their lane status is active), whether the pack advances, and what every lane
// must do with its status. A miss in the instruction cache of any fetching lane
// stalls every lane (advance low), which keeps the lanes in lock-step. When the
// pack advances, a lane whose fetched word has the sr bit set is told to suspend
// (lanes 1+), and an sr bit in lane 0's word is broadcast as the resume message
// for suspended lanes in the next pack. Inactive (halted) lanes ignore the
// resume message; that rule is applied in the lanes. flush (a lane-0
// misprediction) cancels the pack being fetched. Purely combinational.
module increment_control
  import sla_pkg::*;
#(
  parameter int NLANES = 4
) (
  input  ls_e               ls       [NLANES],
  input  logic              ic_hit   [NLANES],
  input  logic              word_sr  [NLANES],
  input  logic              flush,
  output logic              fetch_en [NLANES],
  output logic              stall,
  output logic              advance,
  output logic              suspend  [NLANES],
  output logic              resume
);
  for (genvar l = 0; l < NLANES; l++) begin : g_fe
    assign fetch_en[l] = (l == 0) || (ls[l] == LS_ACTIVE);
  end

  always_comb begin
    stall = 1'b0;
    for (int l = 0; l < NLANES; l++)
      if (fetch_en[l] && !ic_hit[l]) stall = 1'b1;
    advance = !stall && !flush;
    resume  = advance && word_sr[0];
    for (int l = 0; l < NLANES; l++)
      suspend[l] = advance && (l != 0) && fetch_en[l] && word_sr[l];
  end
endmodule

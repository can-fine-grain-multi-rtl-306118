// btb: direct-mapped branch target buffer of lane 0.
//
// ENTRIES entries indexed by PC[IDXW+1:2], each with a valid bit, the remaining
// PC bits as tag, the control class of the instruction, its target and, for a
// colane, the lane it starts (the extra bits the document asks the BTB to carry
// so that colane needs no separate structure). Lookup is combinational on the
// fetch PC; update is written on the rising edge from the execute stage. Only
// lane 0 has a BTB, because only lane 0 holds control transfers. Reset clears the
// valid bits.
module btb
  import sla_pkg::*;
#(
  parameter int ENTRIES = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] lk_pc,
  output logic        lk_hit,
  output ctl_e        lk_ctl,
  output logic [31:0] lk_target,
  output logic [2:0]  lk_lane,
  input  logic        up_en,
  input  logic [31:0] up_pc,
  input  ctl_e        up_ctl,
  input  logic [31:0] up_target,
  input  logic [2:0]  up_lane
);
  localparam int IDXW = $clog2(ENTRIES);
  localparam int TAGW = 30 - IDXW;

  typedef struct packed {
    logic [TAGW-1:0] tag;
    ctl_e            ctl;
    logic [31:0]     target;
    logic [2:0]      lane;
  } entry_t;

  logic [ENTRIES-1:0] valid;
  entry_t             tab [ENTRIES];
  logic [IDXW-1:0]    lk_idx, up_idx;
  entry_t             e;

  assign lk_idx    = lk_pc[IDXW+1:2];
  assign up_idx    = up_pc[IDXW+1:2];
  assign e         = tab[lk_idx];
  assign lk_hit    = valid[lk_idx] && e.tag == lk_pc[31:IDXW+2];
  assign lk_ctl    = e.ctl;
  assign lk_target = e.target;
  assign lk_lane   = e.lane;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (up_en) valid[up_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (up_en) tab[up_idx] <= '{tag: up_pc[31:IDXW+2], ctl: up_ctl,
                                target: up_target, lane: up_lane};
  end
endmodule

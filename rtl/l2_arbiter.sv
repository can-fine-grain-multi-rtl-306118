// l2_arbiter: shares the single L2 port among the instruction caches of all lanes.
//
// When several L1 instruction caches miss together, their line requests are sent
// to the L2 one per cycle, back to back (pipelined), so the L2 needs one port
// only. Grant is round robin, starting after the last lane granted. The request
// carries the lane number as its id; the L2 returns it with the line, and the
// arbiter steers fill_resp_valid to that lane. Requests are passed through
// combinationally (no added cycle); responses likewise. Round robin is this
// design's choice.
module l2_arbiter #(
  parameter int NLANES     = 4,
  parameter int LINE_BYTES = 64,
  localparam int IDW       = (NLANES > 1) ? $clog2(NLANES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid [NLANES],
  input  logic [31:0]             req_addr  [NLANES],
  output logic                    req_ready [NLANES],
  output logic                    resp_valid[NLANES],
  output logic                    l2_req_valid,
  input  logic                    l2_req_ready,
  output logic [31:0]             l2_req_addr,
  output logic [IDW-1:0]          l2_req_id,
  input  logic                    l2_resp_valid,
  input  logic [IDW-1:0]          l2_resp_id
);
  logic [IDW-1:0] last;
  logic [IDW-1:0] gnt;
  logic           any;

  always_comb begin
    any = 1'b0;
    gnt = '0;
    for (int k = NLANES; k >= 1; k--) begin
      int unsigned c;
      c = (32'(last) + 32'(k)) % NLANES;
      if (req_valid[c]) begin
        any = 1'b1;
        gnt = IDW'(c);
      end
    end
  end

  assign l2_req_valid = any;
  assign l2_req_addr  = req_addr[gnt];
  assign l2_req_id    = gnt;

  always_comb begin
    for (int l = 0; l < NLANES; l++) begin
      req_ready[l]  = any && gnt == IDW'(l) && l2_req_ready;
      resp_valid[l] = l2_resp_valid && l2_resp_id == IDW'(l);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= IDW'(NLANES - 1);
    else if (any && l2_req_ready) last <= gnt;
  end
endmodule

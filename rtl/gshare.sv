// gshare: global-history direction predictor for lane 0's conditional branches.
//
// 2^GHR_BITS two-bit saturating counters indexed by PC[GHR_BITS+1:2] XOR the
// global history. Prediction is combinational on the fetch PC and returns the
// index used, which the pipeline carries to the execute stage; the update there
// trains that counter and shifts the outcome into the history. The history is
// therefore updated at resolution, not speculatively (this design's choice; the
// document gives only "GShare predictor w/ 17-bit branch history"). Reset clears
// the history; the counters are not reset (a table of 2^17 entries is a RAM),
// so they start at whatever the RAM holds until trained.
module gshare #(
  parameter int GHR_BITS = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [31:0]         pc,
  output logic                taken,
  output logic [GHR_BITS-1:0] idx,
  input  logic                up_en,
  input  logic [GHR_BITS-1:0] up_idx,
  input  logic                up_taken
);
  localparam int N = 1 << GHR_BITS;
  logic [1:0]          ctr [N];
  logic [GHR_BITS-1:0] ghr;

  assign idx   = pc[GHR_BITS+1:2] ^ ghr;
  assign taken = ctr[idx][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ghr <= '0;
    else if (up_en) ghr <= {ghr[GHR_BITS-2:0], up_taken};
  end

  // The counter table is a plain memory with no reset: its contents only
  // steer prediction, never correctness.
  always_ff @(posedge clk) begin
    if (up_en) begin
      if (up_taken && ctr[up_idx] != 2'b11) ctr[up_idx] <= ctr[up_idx] + 2'd1;
      else if (!up_taken && ctr[up_idx] != 2'b00) ctr[up_idx] <= ctr[up_idx] - 2'd1;
    end
  end
endmodule

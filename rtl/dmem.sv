// dmem: data memory of the SLA processor, one load/store port per lane.
//
// BYTES bytes as 32-bit words. Each lane presents a request in its EX stage:
// stores write the enabled bytes on the rising edge; loads return the whole word
// one cycle later (synchronous read), in the lane's WB stage. If two lanes store
// to one word in the same cycle the higher lane's bytes win. The document
// evaluates a 32 KiB 4-way L1 data cache backed by the L2; this block keeps the
// size and the one-cycle access but is a plain memory with no tags or misses.
// Addresses wrap modulo BYTES. Contents are not reset.
module dmem #(
  parameter int NLANES = 4,
  parameter int BYTES  = 32768
) (
  input  logic        clk,
  input  logic        re    [NLANES],
  input  logic        we    [NLANES],
  input  logic [31:0] addr  [NLANES],
  input  logic [31:0] wdata [NLANES],
  input  logic [3:0]  be    [NLANES],
  output logic [31:0] rdata [NLANES]
);
  localparam int WORDS = BYTES / 4;
  localparam int AW    = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    for (int l = 0; l < NLANES; l++) begin
      if (re[l]) rdata[l] <= mem[addr[l][AW+1:2]];
    end
    for (int l = 0; l < NLANES; l++) begin
      if (we[l])
        for (int b = 0; b < 4; b++)
          if (be[l][b]) mem[addr[l][AW+1:2]][8*b +: 8] <= wdata[l][8*b +: 8];
    end
  end
endmodule

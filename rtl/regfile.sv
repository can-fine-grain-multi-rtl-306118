// regfile: the register file shared by all lanes of the SLA processor.
//
// 32 x 32-bit registers, $0 reads as zero. Two combinational read ports and one
// write port per lane, written on the rising clock edge. The document only says
// the lanes share one register file; the port count follows from one operation
// per lane per pack. If several lanes write the same register in one cycle the
// highest-numbered lane wins (the compiler is expected never to do this).
// Reset clears every register.
module regfile #(
  parameter int NLANES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [4:0]        ra   [NLANES],
  input  logic [4:0]        rb   [NLANES],
  output logic [31:0]       da   [NLANES],
  output logic [31:0]       db   [NLANES],
  input  logic              we   [NLANES],
  input  logic [4:0]        wa   [NLANES],
  input  logic [31:0]       wd   [NLANES]
);
  logic [31:0] r [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) r[i] <= '0;
    end else begin
      for (int l = 0; l < NLANES; l++)
        if (we[l] && wa[l] != 5'd0) r[wa[l]] <= wd[l];
    end
  end

  always_comb begin
    for (int l = 0; l < NLANES; l++) begin
      da[l] = (ra[l] == 5'd0) ? 32'd0 : r[ra[l]];
      db[l] = (rb[l] == 5'd0) ? 32'd0 : r[rb[l]];
    end
  end
endmodule

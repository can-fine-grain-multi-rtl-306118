// l2_model: behavioural model of the L2 side of the shared instruction-fill port.
// Not part of the design. It accepts one line request per cycle (always ready),
// keeps requests in order in a LAT-stage pipeline and returns each line, with
// the requesting lane's id, exactly LAT cycles after acceptance. Contents come
// from the array mem (32-bit words from address 0), which a testbench fills.
module l2_model #(
  parameter int LAT        = 10,
  parameter int LINE_BYTES = 64,
  parameter int WORDS      = 8192,
  parameter int IDW        = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic [31:0]             req_addr,
  input  logic [IDW-1:0]          req_id,
  output logic                    resp_valid,
  output logic [IDW-1:0]          resp_id,
  output logic [LINE_BYTES*8-1:0] resp_data
);
  localparam int LW = LINE_BYTES / 4;
  logic [31:0]    mem   [WORDS];
  logic           pv    [LAT];
  logic [31:0]    pa    [LAT];
  logic [IDW-1:0] pid   [LAT];
  int unsigned    accepted;

  assign req_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin pv[i] <= 1'b0; pa[i] <= '0; pid[i] <= '0; end
      accepted <= 0;
    end else begin
      pv[0]  <= req_valid;
      pa[0]  <= req_addr;
      pid[0] <= req_id;
      if (req_valid) accepted <= accepted + 1;
      for (int i = 1; i < LAT; i++) begin
        pv[i] <= pv[i-1]; pa[i] <= pa[i-1]; pid[i] <= pid[i-1];
      end
    end
  end

  assign resp_valid = pv[LAT-1];
  assign resp_id    = pid[LAT-1];
  always_comb
    for (int w = 0; w < LW; w++)
      resp_data[32*w +: 32] = mem[(32'(pa[LAT-1][31:2]) + 32'(w)) % WORDS];
endmodule

// rt_pls: return-address (RT) registers and the previous-lane-status (PLS)
// register of the SLA processor.
//
// One RT register per lane holds that lane's return PC; the single PLS register
// holds two lane-status bits for every lane. A call writes all of them at once
// (RT[k] <= PC of lane k after the call pack, PLS <= the lane states after that
// pack). callm writes only RT[0], which is this design's reading of "a call
// that does not save lane states". lwrt and las write one register from a load
// (one port per lane); swrt, sas and return read them. The call port has
// priority over the load ports in the same cycle, because the call is the
// younger instruction. Reset clears all registers.
module rt_pls #(
  parameter int NLANES = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  call_we,   // full save (call, callr)
  input  logic                  callm_we,  // RT[0] only
  input  logic [31:0]           call_rt  [NLANES],
  input  logic [2*NLANES-1:0]   call_pls,
  input  logic                  ld_we    [NLANES],
  input  logic                  ld_pls   [NLANES],  // 1: las, 0: lwrt
  input  logic [2:0]            ld_idx   [NLANES],  // RT index for lwrt
  input  logic [31:0]           ld_data  [NLANES],
  output logic [31:0]           rt       [NLANES],
  output logic [2*NLANES-1:0]   pls
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLANES; i++) rt[i] <= '0;
      pls <= '0;
    end else begin
      for (int l = 0; l < NLANES; l++) begin
        if (ld_we[l]) begin
          if (ld_pls[l]) pls <= ld_data[l][2*NLANES-1:0];
          else for (int k = 0; k < NLANES; k++)
            if (32'(ld_idx[l]) == k) rt[k] <= ld_data[l];
        end
      end
      if (call_we) begin
        for (int i = 0; i < NLANES; i++) rt[i] <= call_rt[i];
        pls <= call_pls;
      end else if (callm_we) begin
        rt[0] <= call_rt[0];
      end
    end
  end
endmodule

// icache: the private L1 instruction cache of one SLA lane.
//
// BYTES bytes, WAYS-way set associative, LINE_BYTES-byte lines, 32-bit fetch.
// Every lane has its own cache and its own tags, so a pack performs one tag
// compare per active lane. Lookup is combinational: when req is high, hit and
// rdata answer for addr in the same cycle. On a miss the cache, if idle, raises
// fill_req_valid with the line address and holds it until fill_req_ready; it then
// waits for fill_resp_valid, which carries the whole line, writes it into the
// set's round-robin victim way and returns to idle, so the next lookup hits. A
// fill always completes for the line it was started for, even if the lane has
// moved on (wrong-path fetch). A request that misses while a fill is under way
// waits for it to finish. Replacement policy and the single outstanding miss are
// this design's choices; the sizes are the document's. Reset invalidates all lines.
module icache #(
  parameter int BYTES      = 8192,
  parameter int WAYS       = 4,
  parameter int LINE_BYTES = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req,
  input  logic [31:0]             addr,
  output logic                    hit,
  output logic [31:0]             rdata,
  output logic                    fill_req_valid,
  input  logic                    fill_req_ready,
  output logic [31:0]             fill_req_addr,
  input  logic                    fill_resp_valid,
  input  logic [LINE_BYTES*8-1:0] fill_resp_data
);
  localparam int SETS = BYTES / (WAYS * LINE_BYTES);
  localparam int OFFW = $clog2(LINE_BYTES);
  localparam int SETW = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int TAGW = 32 - OFFW - SETW;
  localparam int WAYW = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int WRDW = OFFW - 2;

  typedef enum logic [1:0] { IDLE, REQ, WAIT } state_e;

  logic [LINE_BYTES*8-1:0] data  [SETS][WAYS];
  logic [TAGW-1:0]         tags  [SETS][WAYS];
  logic [WAYS-1:0]         valid [SETS];
  logic [WAYW-1:0]         rr    [SETS];

  state_e          state;
  logic [31:0]     miss_addr;
  logic [SETW-1:0] set;
  logic [TAGW-1:0] tag;
  logic [WRDW-1:0] word;
  logic [WAYW-1:0] hit_way;
  logic [SETW-1:0] fset;

  assign set  = SETW'(addr[OFFW +: SETW] & SETW'(SETS - 1));
  assign tag  = addr[31 -: TAGW];
  assign word = addr[2 +: WRDW];
  assign fset = SETW'(miss_addr[OFFW +: SETW] & SETW'(SETS - 1));

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[set][w] && tags[set][w] == tag) begin
        hit     = req;
        hit_way = WAYW'(w);
      end
    rdata = data[set][hit_way][32*word +: 32];
  end

  assign fill_req_valid = (state == REQ);
  assign fill_req_addr  = {miss_addr[31:OFFW], {OFFW{1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      miss_addr <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        rr[s]    <= '0;
      end
    end else begin
      unique case (state)
        IDLE: if (req && !hit) begin
          state     <= REQ;
          miss_addr <= addr;
        end
        REQ:  if (fill_req_ready) state <= WAIT;
        WAIT: if (fill_resp_valid) begin
          state                <= IDLE;
          valid[fset][rr[fset]] <= 1'b1;
          rr[fset]             <= rr[fset] + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == WAIT && fill_resp_valid) begin
      data[fset][rr[fset]] <= fill_resp_data;
      tags[fset][rr[fset]] <= miss_addr[31 -: TAGW];
    end
  end
endmodule

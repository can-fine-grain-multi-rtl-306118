// ras: return address stack.
//
// A circular stack of DEPTH entries of WIDTH bits. Lane 0 stores 32-bit return
// PCs; the nonzero lanes of the SLA processor store 34 bits per entry, the return
// PC plus the 2-bit lane status to restore (the document's per-lane overhead
// table). push and pop act on the rising edge; top shows the newest entry
// combinationally. Pushing onto a full stack overwrites the oldest entry and
// popping an empty stack leaves it empty (both are this design's choice). It is
// only a predictor: the architectural return state lives in the RT/PLS registers.
module ras #(
  parameter int DEPTH = 8,
  parameter int WIDTH = 34
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  input  logic             pop,
  output logic [WIDTH-1:0] top,
  output logic             empty
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    sp;      // index of the next free slot
  logic [PW:0]      count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp    <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (push) begin
      // push wins over pop (a call and a return never share a pack)
      mem[sp] <= push_data;
      sp      <= (32'(sp) == DEPTH - 1) ? '0 : sp + 1'b1;
      if (32'(count) < DEPTH) count <= count + 1'b1;
    end else if (pop && count != 0) begin
      sp    <= (sp == '0) ? PW'(DEPTH - 1) : sp - 1'b1;
      count <= count - 1'b1;
    end
  end

  assign top   = mem[(sp == '0) ? PW'(DEPTH - 1) : sp - 1'b1];
  assign empty = (count == 0);
endmodule

// Return address stack of one hardware thread.
//
// Each thread has its own small stack that predicts the targets of subroutine
// returns; 16 entries per thread are taken as enough to make return
// mispredictions negligible. The stack is a circular buffer: a push on a full
// stack overwrites the oldest entry, a pop on an empty stack leaves it empty
// (both choices of this design). push and pop in the same cycle replace the
// top entry. 'top' shows the current top of stack combinationally; 'count'
// is the number of valid entries. Reset empties the stack.
module ras
  import scsmt_pkg::*;
#(
  parameter int unsigned DEPTH = RAS_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  addr_t push_addr,
  input  logic  pop,
  output addr_t top,
  output logic  empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = $clog2(DEPTH);
  addr_t         stack [DEPTH];
  logic [PW-1:0] sp;            // index of the top entry
  logic [$clog2(DEPTH+1)-1:0] cnt;

  assign top   = stack[sp];
  assign empty = (cnt == '0);
  assign count = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp  <= '0;
      cnt <= '0;
    end else if (push && pop) begin
      if (cnt == '0) cnt <= 1;
    end else if (push) begin
      sp <= sp + 1'b1;
      if (cnt != DEPTH[$clog2(DEPTH+1)-1:0]) cnt <= cnt + 1'b1;
    end else if (pop && cnt != '0) begin
      sp  <= sp - 1'b1;
      cnt <= cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && pop)  stack[sp]        <= push_addr;
    else if (push)    stack[sp + 1'b1] <= push_addr;
  end
endmodule

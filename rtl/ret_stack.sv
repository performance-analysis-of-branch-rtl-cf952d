// Return-address stack for CALL / ICALL / RET.
//
// DEPTH 16-bit entries. push writes data to the slot above the current top
// and pop removes the top; top always shows the current top entry
// (combinationally). The stack pointer sp counts entries; pushing onto a full
// stack wraps round and overwrites the oldest entry, popping an empty stack
// returns whatever the slot holds. push and pop take effect on the rising
// clock edge; if both are high, the top is replaced. Reset empties the stack.
// DEPTH must be a power of two (the pointer wraps naturally).
// CALL, ICALL and RET come from the reference design's branch list; a separate
// hardware stack and its depth are this design's choices.
module ret_stack
  import bpu_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     push,
  input  logic                     pop,
  input  addr_t                    data,
  output addr_t                    top,
  output logic [$clog2(DEPTH)-1:0] sp
);

  localparam int unsigned PW = $clog2(DEPTH);

  addr_t         mem [DEPTH];
  logic [PW-1:0] ptr;      // index of the next free slot
  logic [PW-1:0] top_idx;

  assign top_idx = ptr - 1'b1;
  assign top     = mem[top_idx];
  assign sp      = ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (push && pop) begin
      mem[top_idx] <= data;
    end else if (push) begin
      mem[ptr] <= data;
      ptr      <= ptr + 1'b1;
    end else if (pop) begin
      ptr <= ptr - 1'b1;
    end
  end

endmodule

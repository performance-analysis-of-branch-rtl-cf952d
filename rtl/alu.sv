// 8-bit arithmetic and logic unit (combinational).
//
// Operations: pass B, add, subtract (A - B), and, or, xor, shift A left or
// right by one. Flags: z = result is zero, n = result bit 7, c = carry out of
// an add, borrow of a subtract (A < B unsigned) or the bit shifted out,
// v = signed overflow of an add or subtract (0 for the other operations).
// The reference design describes an 8-bit processor without listing its
// operations; this operation set and the flags are this design's choices.
module alu
  import bpu_pkg::*;
(
  input  alu_op_e op,
  input  data_t   a,
  input  data_t   b,
  output data_t   y,
  output flags_t  flags
);

  logic [XLEN:0] sum;

  always_comb begin
    sum     = '0;
    y       = '0;
    flags.c = 1'b0;
    flags.v = 1'b0;
    unique case (op)
      ALU_PASSB: y = b;
      ALU_ADD: begin
        sum     = {1'b0, a} + {1'b0, b};
        y       = sum[XLEN-1:0];
        flags.c = sum[XLEN];
        flags.v = (a[XLEN-1] == b[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
      end
      ALU_SUB: begin
        sum     = {1'b0, a} - {1'b0, b};
        y       = sum[XLEN-1:0];
        flags.c = sum[XLEN];
        flags.v = (a[XLEN-1] != b[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SHL: begin
        y       = {a[XLEN-2:0], 1'b0};
        flags.c = a[XLEN-1];
      end
      ALU_SHR: begin
        y       = {1'b0, a[XLEN-1:1]};
        flags.c = a[0];
      end
      default: y = b;
    endcase
    flags.z = (y == '0);
    flags.n = y[XLEN-1];
  end

endmodule

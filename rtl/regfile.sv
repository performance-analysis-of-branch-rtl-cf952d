// Register file: NREGS 8-bit registers (r0..r7), all general purpose.
//
// Two combinational read ports (ra, rb) and one write port written on the
// rising clock edge when we is high. A read of the register being written in
// the same cycle returns the old value; the processor reads and writes in the
// same stage, so no bypass is needed. Synchronous reset clears every register.
// regs_o shows all registers (the LEDs and the testbenches look at them).
// The reference design shows 8-bit registers r1..r5; the count of eight and
// the port arrangement are this design's choices.
module regfile
  import bpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  rsel_t ra,
  input  rsel_t rb,
  output data_t rdata_a,
  output data_t rdata_b,
  input  logic  we,
  input  rsel_t wa,
  input  data_t wdata,
  output data_t regs_o [NREGS]
);

  data_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wdata;
    end
  end

  assign rdata_a = regs[ra];
  assign rdata_b = regs[rb];
  assign regs_o  = regs;

endmodule

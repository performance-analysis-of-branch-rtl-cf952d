// Data memory: BYTES bytes (256 by default) of 8-bit words.
//
// Read is combinational from addr, so a load completes in the execute cycle.
// A write of wdata to addr happens on the rising clock edge when we is high.
// The contents are not reset; a program must store before it loads.
// The 256-byte size follows the reference design; the access timing is this
// design's choice.
module dmem #(
  parameter int unsigned BYTES = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(BYTES)-1:0] addr,
  input  logic [7:0]               wdata,
  output logic [7:0]               rdata
);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule

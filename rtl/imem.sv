// Instruction memory: BYTES bytes (512 by default, 128 four-byte
// instructions).
//
// Read: combinational, one 32-bit instruction from the byte address raddr
// (the two low address bits are ignored; byte raddr holds the opcode, i.e.
// the word is stored most significant byte first). Addresses past the end
// wrap round. Write: one byte per rising clock edge when we is high, used to
// load a program. If INIT_FILE is not empty the memory is also preloaded
// from that hex file (one byte per line), as an FPGA bitstream would be.
// The 512-byte size and the 4-byte instruction slots follow the reference
// design; byte order, read timing and the load port are this design's choices.
module imem
  import bpu_pkg::*;
#(
  parameter int unsigned BYTES     = 512,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(BYTES)-1:0] waddr,
  input  logic [7:0]               wdata,
  input  addr_t                    raddr,
  output logic [31:0]              rdata
);

  localparam int unsigned AW = $clog2(BYTES);

  logic [7:0] mem [BYTES];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  logic [AW-1:0] base;
  assign base  = {raddr[AW-1:2], 2'b00};
  assign rdata = {mem[base], mem[base | AW'(1)], mem[base | AW'(2)], mem[base | AW'(3)]};

endmodule

// Testbench of the instruction memory: writes all 512 bytes with random
// data, then reads every 4-byte instruction (and unaligned addresses, whose
// low bits are ignored) and compares with a copy.
`timescale 1ns/1ps
module tb_imem;
  import bpu_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [8:0] waddr = '0;
  logic [7:0] wdata = '0;
  addr_t raddr = '0;
  logic [31:0] rdata;
  always #5 clk = ~clk;

  imem #(.BYTES(512)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] m [512];
  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); we = 1; waddr = 9'(i); wdata = 8'($urandom); m[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 128; i++) begin
      raddr = addr_t'(4 * i + $urandom_range(0, 3));
      #1;
      check(rdata == {m[4*i], m[4*i+1], m[4*i+2], m[4*i+3]}, $sformatf("word %0d", i));
    end
    raddr = 16'h0204;  // wraps to word 1
    #1;
    check(rdata == {m[4], m[5], m[6], m[7]}, "address wraps round");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

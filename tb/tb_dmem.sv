// Testbench of the data memory: fills all 256 bytes, then mixes random
// writes and reads, comparing every read with a model.
`timescale 1ns/1ps
module tb_dmem;
  logic clk = 1'b0, we = 1'b0;
  logic [7:0] addr = '0, wdata = '0, rdata;
  always #5 clk = ~clk;

  dmem #(.BYTES(256)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

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

  logic [7:0] m [256];
  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; addr = 8'(i); wdata = 8'($urandom); m[i] = wdata;
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); addr = 8'($urandom); wdata = 8'($urandom);
      #1;
      check(rdata == m[addr], $sformatf("read %02h", addr));
      if (we) m[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

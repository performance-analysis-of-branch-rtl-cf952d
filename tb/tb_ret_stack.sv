// Testbench of the return-address stack: nested pushes and pops, push and
// pop together, overflow (the ninth push overwrites the oldest entry), and
// a random sequence compared with a circular-buffer model.
`timescale 1ns/1ps
module tb_ret_stack;
  import bpu_pkg::*;
  logic clk = 1'b0, rst = 1'b1, push = 1'b0, pop = 1'b0;
  addr_t data = '0, top;
  logic [2:0] sp;
  always #5 clk = ~clk;

  ret_stack #(.DEPTH(8)) dut (.clk(clk), .rst(rst), .push(push), .pop(pop), .data(data), .top(top), .sp(sp));

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

  addr_t m [8];
  int    p;
  task automatic op(bit pu, bit po, addr_t d);
    @(negedge clk); push = pu; pop = po; data = d;
    @(posedge clk);
    if (pu && po) m[(p + 7) % 8] = d;
    else if (pu) begin m[p] = d; p = (p + 1) % 8; end
    else if (po) p = (p + 7) % 8;
    #1; push = 0; pop = 0;
    check(sp == 3'(p), "stack pointer");
    check(top == m[(p + 7) % 8], $sformatf("top %h expected %h", top, m[(p + 7) % 8]));
  endtask

  initial begin
    foreach (m[i]) m[i] = 0;
    p = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    op(1, 0, 16'h0010); op(1, 0, 16'h0020); op(1, 0, 16'h0030);
    check(top == 16'h0030, "last pushed on top");
    op(0, 1, 0); check(top == 16'h0020, "pop returns previous");
    op(1, 1, 16'h0044); check(top == 16'h0044, "push and pop replace top");
    for (int i = 0; i < 9; i++) op(1, 0, addr_t'(16'h100 + i));
    check(top == 16'h0108, "overflow keeps newest on top");
    for (int k = 0; k < 1000; k++) op($urandom_range(0, 1), $urandom_range(0, 1), addr_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the register file: reset value, then random writes with two
// random reads per cycle, compared with a model (a read in the cycle of a
// write to the same register returns the old value).
`timescale 1ns/1ps
module tb_regfile;
  import bpu_pkg::*;
  logic clk = 1'b0, rst = 1'b1, we = 1'b0;
  rsel_t ra = '0, rb = '0, wa = '0;
  data_t rdata_a, rdata_b, wdata = '0;
  data_t regs [NREGS];
  always #5 clk = ~clk;

  regfile dut (.clk(clk), .rst(rst), .ra(ra), .rb(rb), .rdata_a(rdata_a), .rdata_b(rdata_b),
               .we(we), .wa(wa), .wdata(wdata), .regs_o(regs));

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

  data_t m [NREGS];
  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    foreach (m[i]) begin m[i] = 0; check(regs[i] == 0, "reset clears registers"); end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wa = rsel_t'($urandom); wdata = data_t'($urandom);
      ra = rsel_t'($urandom); rb = rsel_t'($urandom);
      #1;
      check(rdata_a == m[ra] && rdata_b == m[rb], "read ports");
      if (we) m[wa] = wdata;
      @(posedge clk); #1;
      foreach (m[i]) check(regs[i] == m[i], $sformatf("r%0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

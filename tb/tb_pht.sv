// Testbench of the pattern-history table: random initialisations and
// updates of the eight state machines compared with a model, with every
// entry read back through the read port.
`timescale 1ns/1ps
module tb_pht;
  import bpu_pkg::*;
  logic clk = 1'b0, rst = 1'b1, init = 1'b0, update = 1'b0, taken = 1'b0;
  logic [2:0] rd_idx = '0, wr_idx = '0;
  logic rd_taken;
  pred_state_e rd_state;
  pred_state_e states [8];
  always #5 clk = ~clk;

  pht #(.ENTRIES(8)) dut (.clk(clk), .rst(rst), .rd_idx(rd_idx), .rd_taken(rd_taken), .rd_state(rd_state),
    .init(init), .update(update), .wr_idx(wr_idx), .taken(taken), .states(states));

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

  int m [8];
  initial begin
    foreach (m[i]) m[i] = 1;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int k = 0; k < 1500; k++) begin
      @(negedge clk);
      init = ($urandom_range(0, 5) == 0); update = $urandom_range(0, 1); taken = $urandom_range(0, 1);
      wr_idx = 3'($urandom_range(0, 7));
      @(posedge clk);
      if (init) m[wr_idx] = taken ? 2 : 1;
      else if (update) m[wr_idx] = taken ? (m[wr_idx] == 3 ? 3 : m[wr_idx] + 1) : (m[wr_idx] == 0 ? 0 : m[wr_idx] - 1);
      #1;
      init = 0; update = 0;
      rd_idx = 3'($urandom_range(0, 7));
      #1;
      check(int'(rd_state) == m[rd_idx], $sformatf("entry %0d state %0d expected %0d", rd_idx, rd_state, m[rd_idx]));
      check(rd_taken == (m[rd_idx] >= 2), "read prediction");
      for (int i = 0; i < 8; i++) check(int'(states[i]) == m[i], $sformatf("states[%0d]", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

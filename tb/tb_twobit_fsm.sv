// Testbench of the two-bit predictor state machine: the named transitions of
// the four-state diagram, then 2000 random init/update/outcome cycles
// compared with a saturating-counter model.
`timescale 1ns/1ps
module tb_twobit_fsm;
  import bpu_pkg::*;
  logic clk = 1'b0, rst = 1'b1, init = 1'b0, update = 1'b0, taken = 1'b0;
  pred_state_e state;
  logic pt;
  always #5 clk = ~clk;

  twobit_fsm dut (.clk(clk), .rst(rst), .init(init), .update(update), .taken(taken),
                  .state(state), .predict_taken(pt));

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

  task automatic step(bit i, bit u, bit t);
    @(negedge clk); init = i; update = u; taken = t;
    @(negedge clk); init = 0; update = 0;
  endtask

  int m;
  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    check(state == P_WNT && !pt, "reset state is weakly not taken");
    step(1, 0, 1); check(state == P_WT && pt,  "first taken -> weakly taken");
    step(0, 1, 1); check(state == P_ST && pt,  "taken again -> strongly taken");
    step(0, 1, 1); check(state == P_ST,        "strongly taken saturates");
    step(0, 1, 0); check(state == P_WT && pt,  "not taken from strongly taken -> weakly taken");
    step(0, 1, 0); check(state == P_WNT && !pt, "weakly taken, not taken -> weakly not taken");
    step(0, 1, 0); check(state == P_SNT && !pt, "-> strongly not taken");
    step(0, 1, 0); check(state == P_SNT,        "strongly not taken saturates");
    step(1, 0, 0); check(state == P_WNT,        "first not taken -> weakly not taken");
    m = int'(state);
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      init = ($urandom_range(0, 7) == 0); update = $urandom_range(0, 1); taken = $urandom_range(0, 1);
      @(posedge clk);
      if (init) m = taken ? 2 : 1;
      else if (update) m = taken ? (m == 3 ? 3 : m + 1) : (m == 0 ? 0 : m - 1);
      #1;
      check(int'(state) == m, $sformatf("random step %0d: state %0d expected %0d", k, state, m));
      check(pt == (m >= 2), "prediction follows state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

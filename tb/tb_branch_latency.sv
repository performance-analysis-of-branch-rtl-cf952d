// Branch latency measurement: for each of the eleven branch instructions, a
// short loop executes it three times (taken each time) on a core with the
// branch prediction unit and on one without. The testbench times each
// execution from its entry into execute to the entry of the next
// instruction and checks: without prediction every execution costs the
// unpredicted latency (CALL 4, JZNE 5, ICALL 3, JZ 5, RJMP 3, JMP 4, BREQ 5,
// BRNE 5, RET 3, BRGE 5, BRLE 5); with prediction the first execution (BTB
// miss) costs the same and the later ones 2 cycles, except RET, which always
// costs 3. It prints the measured table.
`timescale 1ns/1ps
module tb_branch_latency;
  import bpu_pkg::*;
  import tb_model_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [8:0] waddr = '0;
  logic [7:0] wdata = '0;

  logic halted [2];
  logic [7:0] state [2];
  logic ex_start [2];
  logic [31:0] cycle [2];
  data_t regs1 [NREGS];
  data_t regs0 [NREGS];
  addr_t pc [2];
  logic [2:0] sp [2];
  logic bv1 [8]; addr_t bb1 [8]; addr_t bt1 [8]; pred_state_e fs1 [8];
  logic bv0 [8]; addr_t bb0 [8]; addr_t bt0 [8]; pred_state_e fs0 [8];
  logic ev [2][8];

  cpu #(.USE_BPU(1'b1)) dut1 (.clk(clk), .rst(rst), .in_port(8'h00), .imem_we(we), .imem_waddr(waddr), .imem_wdata(wdata),
    .halted(halted[1]), .cycle(cycle[1]), .pc(pc[1]), .state(state[1]), .ex_start(ex_start[1]), .regs(regs1), .stack_ptr(sp[1]),
    .btb_valid(bv1), .btb_branch(bb1), .btb_target(bt1), .fsm_state(fs1),
    .branch(ev[1][0]), .btbhit(ev[1][1]), .redirect(ev[1][2]), .wp(ev[1][3]), .br_done(ev[1][4]),
    .br_fast(ev[1][5]), .btb_alloc(ev[1][6]), .ex_hold(ev[1][7]));
  cpu #(.USE_BPU(1'b0)) dut0 (.clk(clk), .rst(rst), .in_port(8'h00), .imem_we(we), .imem_waddr(waddr), .imem_wdata(wdata),
    .halted(halted[0]), .cycle(cycle[0]), .pc(pc[0]), .state(state[0]), .ex_start(ex_start[0]), .regs(regs0), .stack_ptr(sp[0]),
    .btb_valid(bv0), .btb_branch(bb0), .btb_target(bt0), .fsm_state(fs0),
    .branch(ev[0][0]), .btbhit(ev[0][1]), .redirect(ev[0][2]), .wp(ev[0][3]), .br_done(ev[0][4]),
    .br_fast(ev[0][5]), .btb_alloc(ev[0][6]), .ex_hold(ev[0][7]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int tcyc = 0;
  always @(posedge clk) begin
    tcyc <= tcyc + 1;
    if (tcyc > 100000) begin
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // timing of the measured opcode
  logic [7:0] target_op;
  int   lat [2][$];
  int   t_enter [2];
  bit   pending [2];
  always @(posedge clk) if (!rst) begin
    for (int k = 0; k < 2; k++) begin
      if (ex_start[k] && !halted[k]) begin
        if (pending[k]) begin lat[k].push_back(tcyc - t_enter[k]); pending[k] = 0; end
        if (state[k] == target_op) begin t_enter[k] = tcyc; pending[k] = 1; end
      end
    end
  end

  logic [31:0] prog [128];

  task automatic run(logic [7:0] op);
    target_op = op;
    lat[0].delete(); lat[1].delete();
    pending = '{0, 0};
    rst = 1'b1;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 9'(i); wdata = prog[i/4][31 - 8*(i%4) -: 8];
    end
    @(negedge clk); we = 1'b0;
    @(negedge clk); rst = 1'b0;
    while (!(halted[0] && halted[1])) @(negedge clk);
  endtask

  // Loop: idx5 sets flags, idx6 holds the branch under test, idx8-9 count, idx11 is the subroutine.
  task automatic build(logic [7:0] op);
    foreach (prog[i]) prog[i] = HALT();
    prog[0] = LDI(1, 3);
    prog[1] = LDI(2, 1);
    prog[2] = LDI(3, 0);
    prog[3] = LDI(6, 0);
    prog[4] = LDI(7, 44);
    prog[5] = (op == 8'h14) ? CMP(2, 3) : CMP(3, 3);
    case (op)
      8'h10: prog[6] = JMP(32);
      8'h11: prog[6] = JZ(3, 32);
      8'h12: prog[6] = JZNE(2, 32);
      8'h13: prog[6] = RJMP(8);
      8'h14: prog[6] = BRNE(32);
      8'h15: prog[6] = BREQ(32);
      8'h16: prog[6] = BRGE(32);
      8'h17: prog[6] = BRLE(32);
      8'hB1: prog[6] = ICALL(6, 7);
      default: prog[6] = CALL(44);   // CALL, and RET measured inside it
    endcase
    prog[7]  = JMP(32);              // return point of the calls
    prog[8]  = SUBI(1, 1);
    prog[9]  = (op == 8'h12) ? BRNE(20) : JZNE(1, 20);
    prog[10] = HALT();
    prog[11] = RET();
  endtask

  initial begin
    logic [7:0] ops [11] = '{8'hB0, 8'h12, 8'hB1, 8'h11, 8'h13, 8'h10, 8'h15, 8'h14, 8'hB2, 8'h16, 8'h17};
    string names [11] = '{"CALL", "JZNE", "ICALL", "JZ", "RJMP", "JMP", "BREQ", "BRNE", "RET", "BRGE", "BRLE"};
    $display("instruction  with prediction (1st, 2nd, 3rd)  without prediction");
    foreach (ops[i]) begin
      int l, p;
      build(ops[i]);
      run(ops[i]);
      l = lat_nopred(ops[i]);
      p = (ops[i] == 8'hB2) ? 3 : 2;
      check(lat[1].size() == 3 && lat[0].size() == 3, $sformatf("%s executed three times", names[i]));
      if (lat[1].size() == 3 && lat[0].size() == 3) begin
        check(lat[1][0] == l && lat[1][1] == p && lat[1][2] == p,
              $sformatf("%s with prediction %0d %0d %0d", names[i], lat[1][0], lat[1][1], lat[1][2]));
        check(lat[0][0] == l && lat[0][1] == l && lat[0][2] == l,
              $sformatf("%s without prediction %0d %0d %0d", names[i], lat[0][0], lat[0][1], lat[0][2]));
        $display("%-6s       %0d, %0d, %0d                          %0d   (saved %0d)",
                 names[i], lat[1][0], lat[1][1], lat[1][2], lat[0][1], lat[0][1] - lat[1][1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

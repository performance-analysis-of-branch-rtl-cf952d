// Self-checking testbench of the processor core.
//
// Two cores run side by side on every program, one with the branch
// prediction unit (USE_BPU = 1) and one without. Each program is also run on
// the instruction-level reference model of tb_model_pkg, and the testbench
// checks: final registers, the exact cycle-counter value, the
// number of mispredictions (wp pulses) and the final BTB / state-machine
// contents. It also times every instruction in execute and checks each
// branch latency: 5/4/3 cycles unpredicted (per opcode), 2 cycles for a
// correctly predicted taken branch, 1 for every other instruction. Programs:
// a loop over eight branch types (all taken), a loop with JZ/JZNE and
// branches that are never taken, a chain of eleven branches that overflows
// the eight-entry BTB, and a workload (sum loop, multiply subroutine,
// bubble sort) run for several input values.
`timescale 1ns/1ps
module tb_cpu;
  import bpu_pkg::*;
  import tb_model_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [7:0] in_port;
  logic       we;
  logic [8:0] waddr;
  logic [7:0] wdata;

  logic        halted [2];
  logic [31:0] cycle  [2];
  data_t       regs0 [NREGS];
  data_t       regs1 [NREGS];
  logic        wp [2];
  logic        redirect [2];
  logic        br_done [2];
  logic        br_fast [2];
  logic        btb_alloc [2];
  logic        ex_hold [2];
  logic        branch [2];
  logic        btbhit [2];
  logic        btb_valid1  [8];
  addr_t       btb_branch1 [8];
  addr_t       btb_target1 [8];
  pred_state_e fsm_state1  [8];
  logic        btb_valid0  [8];
  addr_t       btb_branch0 [8];
  addr_t       btb_target0 [8];
  pred_state_e fsm_state0  [8];
  addr_t       pc [2];
  logic [7:0]  state [2];
  logic        ex_start [2];
  logic [2:0]  sp [2];

  cpu #(.USE_BPU(1'b1)) dut1 (
    .clk(clk), .rst(rst), .in_port(in_port), .imem_we(we), .imem_waddr(waddr), .imem_wdata(wdata),
    .halted(halted[1]), .cycle(cycle[1]), .pc(pc[1]), .state(state[1]), .ex_start(ex_start[1]), .regs(regs1), .stack_ptr(sp[1]),
    .btb_valid(btb_valid1), .btb_branch(btb_branch1), .btb_target(btb_target1), .fsm_state(fsm_state1),
    .branch(branch[1]), .btbhit(btbhit[1]), .redirect(redirect[1]), .wp(wp[1]), .br_done(br_done[1]),
    .br_fast(br_fast[1]), .btb_alloc(btb_alloc[1]), .ex_hold(ex_hold[1]));

  cpu #(.USE_BPU(1'b0)) dut0 (
    .clk(clk), .rst(rst), .in_port(in_port), .imem_we(we), .imem_waddr(waddr), .imem_wdata(wdata),
    .halted(halted[0]), .cycle(cycle[0]), .pc(pc[0]), .state(state[0]), .ex_start(ex_start[0]), .regs(regs0), .stack_ptr(sp[0]),
    .btb_valid(btb_valid0), .btb_branch(btb_branch0), .btb_target(btb_target0), .fsm_state(fsm_state0),
    .branch(branch[0]), .btbhit(btbhit[0]), .redirect(redirect[0]), .wp(wp[0]), .br_done(br_done[0]),
    .br_fast(br_fast[0]), .btb_alloc(btb_alloc[0]), .ex_hold(ex_hold[0]));

  int checks = 0;
  int failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  int tcyc = 0;
  always @(posedge clk) begin
    tcyc <= tcyc + 1;
    if (tcyc > 200000) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ------------------------------------------------------------ latency monitor
  // An instruction enters execute in a cycle where the ID/EX register is
  // valid and no held-branch count is running.
  int   last_t [2];
  logic [7:0] last_op [2];
  bit   have_last [2];
  int   wp_count [2];
  bit   seen_fast [256];
  bit   seen_slow1 [256];
  bit   seen_slow0 [256];
  int   lat_checks;

  function automatic void note_latency(int k, logic [7:0] op, int lat);
    bit ok;
    if (!is_branch_op(op)) ok = (lat == 1);
    else if (k == 0) begin
      ok = (lat == lat_nopred(op));
      seen_slow0[op] = 1;
    end else begin
      ok = (lat == 1 && op != 8'hB2) || (lat == 2 && op != 8'hB2) || (lat == lat_nopred(op));
      if (lat == 2 && op != 8'hB2) seen_fast[op] = 1;
      if (lat == lat_nopred(op)) seen_slow1[op] = 1;
    end
    lat_checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: core %0d opcode %02h took %0d cycles", k, op, lat);
    end
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      have_last = '{0, 0};
      wp_count  = '{0, 0};
    end else begin
      if (!halted[1]) begin
        if (wp[1]) wp_count[1]++;
        if (ex_start[1]) begin
          if (have_last[1]) note_latency(1, last_op[1], tcyc - last_t[1]);
          last_t[1] = tcyc; last_op[1] = state[1]; have_last[1] = 1;
        end
      end
      if (!halted[0]) begin
        if (wp[0]) wp_count[0]++;
        if (ex_start[0]) begin
          if (have_last[0]) note_latency(0, last_op[0], tcyc - last_t[0]);
          last_t[0] = tcyc; last_op[0] = state[0]; have_last[0] = 1;
        end
      end
    end
  end

  // ------------------------------------------------------------ program handling
  logic [31:0] prog [128];

  task automatic clear_prog();
    foreach (prog[i]) prog[i] = HALT();
  endtask

  task automatic load_and_run(string name, logic [7:0] inp, int max_cycles);
    iss m1, m0;
    bit  h1, h0;
    int  t;
    m1 = new(1'b1);
    m0 = new(1'b0);
    foreach (prog[i]) begin m1.prog[i] = prog[i]; m0.prog[i] = prog[i]; end
    h1 = m1.run(inp, 100000);
    h0 = m0.run(inp, 100000);
    check(h1 && h0, {name, ": reference model halts"});

    rst     = 1'b1;
    in_port = inp;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 9'(i);
      wdata = prog[i/4][31 - 8*(i%4) -: 8];
    end
    @(negedge clk);
    we = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    t = 0;
    while (!(halted[0] && halted[1]) && t < max_cycles) begin
      @(negedge clk);
      t++;
    end
    check(halted[1] && halted[0], {name, ": both cores halt"});
    for (int i = 0; i < NREGS; i++) begin
      check(regs1[i] == m1.r[i], $sformatf("%s: bpu core r%0d=%02h expected %02h", name, i, regs1[i], m1.r[i]));
      check(regs0[i] == m0.r[i], $sformatf("%s: plain core r%0d=%02h expected %02h", name, i, regs0[i], m0.r[i]));
    end
    check(cycle[1] == 32'(m1.cycles), $sformatf("%s: bpu core cycles %0d expected %0d", name, cycle[1], m1.cycles));
    check(cycle[0] == 32'(m0.cycles), $sformatf("%s: plain core cycles %0d expected %0d", name, cycle[0], m0.cycles));
    check(wp_count[1] == m1.mispredicts, $sformatf("%s: mispredictions %0d expected %0d", name, wp_count[1], m1.mispredicts));
    check(wp_count[0] == 0, {name, ": plain core never mispredicts"});
    for (int i = 0; i < 8; i++) begin
      check(btb_valid1[i] == m1.bv[i], $sformatf("%s: btb valid[%0d]", name, i));
      if (m1.bv[i]) begin
        check(btb_branch1[i] == m1.bb[i], $sformatf("%s: btb branch[%0d]=%h expected %h", name, i, btb_branch1[i], m1.bb[i]));
        check(btb_target1[i] == m1.bt[i], $sformatf("%s: btb target[%0d]=%h expected %h", name, i, btb_target1[i], m1.bt[i]));
        check(int'(fsm_state1[i]) == m1.fsm[i], $sformatf("%s: fsm[%0d]=%0d expected %0d", name, i, fsm_state1[i], m1.fsm[i]));
      end
    end
    $display("%s (input %02h): cycles with prediction %0d, without %0d; r1..r5 = %02h %02h %02h %02h %02h; mispredictions %0d",
             name, inp, cycle[1], cycle[0], regs1[1], regs1[2], regs1[3], regs1[4], regs1[5], wp_count[1]);
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; in_port = '0; lat_checks = 0;
    foreach (seen_fast[i]) begin seen_fast[i] = 0; seen_slow1[i] = 0; seen_slow0[i] = 0; end

    // Program A: eight branch types, all taken, loop of four iterations.
    clear_prog();
    prog[0]  = LDI(1, 4);
    prog[1]  = LDI(6, 0);
    prog[2]  = LDI(7, 88);
    prog[3]  = JMP(20);
    prog[4]  = HALT();
    prog[5]  = RJMP(8);
    prog[6]  = HALT();
    prog[7]  = CALL(80);
    prog[8]  = ICALL(6, 7);
    prog[9]  = LDI(2, 5);
    prog[10] = CMP(2, 2);
    prog[11] = BREQ(52);
    prog[12] = HALT();
    prog[13] = BRGE(60);
    prog[14] = HALT();
    prog[15] = BRLE(68);
    prog[16] = HALT();
    prog[17] = SUBI(1, 1);
    prog[18] = BRNE(12);
    prog[19] = HALT();
    prog[20] = ADDI(3, 1);
    prog[21] = RET();
    prog[22] = ADDI(4, 2);
    prog[23] = RET();
    load_and_run("branch types", 8'h00, 2000);

    // Program B: JZ / JZNE taken, BREQ and JZ never taken.
    clear_prog();
    prog[0]  = LDI(1, 4);
    prog[1]  = LDI(3, 0);
    prog[2]  = JZ(3, 16);
    prog[3]  = HALT();
    prog[4]  = LDI(5, 1);
    prog[5]  = JZNE(5, 28);
    prog[6]  = HALT();
    prog[7]  = CMP(1, 3);
    prog[8]  = BREQ(76);
    prog[9]  = ADDI(2, 7);
    prog[10] = JZ(1, 76);
    prog[11] = SUBI(1, 1);
    prog[12] = JZNE(1, 8);
    prog[13] = HALT();
    prog[19] = LDI(7, 8'hEE);
    prog[20] = HALT();
    load_and_run("not-taken branches", 8'h00, 2000);

    // Program C: eleven branches in a loop overflow the eight-entry BTB.
    clear_prog();
    prog[0]  = LDI(1, 3);
    for (int i = 1; i <= 10; i++) prog[i] = JMP(4 * (i + 1));
    prog[11] = SUBI(1, 1);
    prog[12] = BRNE(4);
    prog[13] = HALT();
    load_and_run("btb replacement", 8'h00, 2000);

    // Workload: sum 1..n, n*5 by subroutine, bubble sort of eight bytes.
    clear_prog();
    prog[0]  = IN(1);
    prog[1]  = LDI(2, 0);
    prog[2]  = MOV(6, 1);
    prog[3]  = JZ(6, 28);
    prog[4]  = ADD(2, 6);
    prog[5]  = SUBI(6, 1);
    prog[6]  = JZNE(6, 16);
    prog[7]  = LDI(3, 0);
    prog[8]  = CALL(160);
    prog[9]  = LDI(0, 0);
    prog[10] = MOV(4, 1);
    prog[11] = ADDI(4, 8'h5B);
    prog[12] = ST(4, 0, 0);
    prog[13] = ADDI(0, 1);
    prog[14] = MOV(5, 0);
    prog[15] = SUBI(5, 8);
    prog[16] = JZNE(5, 44);
    prog[17] = LDI(6, 7);
    prog[18] = LDI(0, 0);
    prog[19] = LD(4, 0, 0);
    prog[20] = LD(5, 1, 0);
    prog[21] = CMP(5, 4);
    prog[22] = BRGE(100);
    prog[23] = ST(5, 0, 0);
    prog[24] = ST(4, 1, 0);
    prog[25] = ADDI(0, 1);
    prog[26] = MOV(7, 0);
    prog[27] = SUBI(7, 7);
    prog[28] = JZNE(7, 76);
    prog[29] = SUBI(6, 1);
    prog[30] = BRNE(72);
    prog[31] = LDI(0, 0);
    prog[32] = LD(4, 0, 0);
    prog[33] = LD(5, 7, 0);
    prog[34] = HALT();
    prog[40] = LDI(7, 5);
    prog[41] = ADD(3, 1);
    prog[42] = SUBI(7, 1);
    prog[43] = BRNE(164);
    prog[44] = RET();
    foreach (prog[i]) if (i > 44) prog[i] = HALT();
    load_and_run("workload", 8'h05, 5000);
    check(cycle[1] < cycle[0], "workload n=5: prediction saves cycles");
    load_and_run("workload", 8'h0F, 5000);
    check(cycle[1] < cycle[0], "workload n=15: prediction saves cycles");
    load_and_run("workload", 8'hC8, 10000);
    check(cycle[1] < cycle[0], "workload n=200: prediction saves cycles");
    load_and_run("workload", 8'h00, 5000);

    // Every branch type was timed at its table latency without prediction,
    // and every predictable one at 2 cycles with prediction.
    foreach (seen_slow0[i]) if (is_branch_op(8'(i)))
      check(seen_slow0[i], $sformatf("opcode %02h timed without prediction", i));
    foreach (seen_fast[i]) if (is_branch_op(8'(i)) && i != 8'hB2)
      check(seen_fast[i], $sformatf("opcode %02h timed as a predicted branch", i));
    check(seen_slow1[8'hB2], "RET timed with prediction unit present");
    checks += lat_checks;
    $display("instruction latencies checked: %0d", lat_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

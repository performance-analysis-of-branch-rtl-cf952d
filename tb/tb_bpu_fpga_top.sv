// End-to-end testbench of the FPGA top level at its default parameters
// (branch prediction on, eight BTB entries, 100 MHz LCD timing).
//
// Loads the workload program (preceded by a chain of jumps, so that twelve
// different branches pass through the eight-entry BTB), sets the switches to
// the input value and runs to HALT. Checks the registers and the exact cycle
// count against the reference model, then steps the two select inputs and
// checks that the LEDs show r1..r4, and decodes the LCD bus until a line
// written after HALT shows the final cycle count in hexadecimal.
// It counts every branch mechanism of the design and fails if one never
// happened: BTB hit with redirect, correct not-taken prediction,
// misprediction, unpredicted branch held in execute, BTB allocation, BTB
// replacement, call and return, halt.
`timescale 1ns/1ps
module tb_bpu_fpga_top;
  import bpu_pkg::*;
  import tb_model_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [7:0] sw = '0;
  logic [1:0] sel = '0;
  logic [7:0] led;
  logic lcd_e, lcd_rs, lcd_rw;
  logic [3:0] lcd_db;
  logic we = 1'b0;
  logic [8:0] waddr = '0;
  logic [7:0] wdata = '0;
  logic halted;
  logic [31:0] cycle;
  data_t regs [NREGS];
  addr_t pc;
  logic [7:0] state;
  logic ex_start;
  logic [2:0] sp;
  logic btb_valid [8];
  addr_t btb_branch [8];
  addr_t btb_target [8];
  pred_state_e fsm_state [8];
  logic branch, btbhit, redirect, wp, br_done, br_fast, btb_alloc, ex_hold;

  bpu_fpga_top dut (
    .clk(clk), .rst(rst), .sw(sw), .sel(sel), .led(led),
    .lcd_e(lcd_e), .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_db(lcd_db),
    .imem_we(we), .imem_waddr(waddr), .imem_wdata(wdata),
    .halted(halted), .cycle(cycle), .regs(regs), .pc(pc), .state(state), .ex_start(ex_start), .sp(sp),
    .btb_valid(btb_valid), .btb_branch(btb_branch), .btb_target(btb_target), .fsm_state(fsm_state),
    .branch(branch), .btbhit(btbhit), .redirect(redirect), .wp(wp), .br_done(br_done),
    .br_fast(br_fast), .btb_alloc(btb_alloc), .ex_hold(ex_hold));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int tcyc = 0;
  always @(posedge clk) begin
    tcyc <= tcyc + 1;
    if (tcyc > 4_000_000) begin
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_redirect = 0, n_nt_ok = 0, n_wp = 0, n_hold = 0, n_alloc = 0, n_replace = 0;
  int n_call = 0, n_ret = 0, n_hit = 0;
  int last_t = 0;
  logic [7:0] last_op = '0;
  bit have_last = 0;
  always @(posedge clk) if (!rst && !halted) begin
    bit full;
    if (redirect)  n_redirect++;
    if (btbhit)    n_hit++;
    if (wp)        n_wp++;
    if (ex_hold)   n_hold++;
    if (btb_alloc) begin
      full = 1;
      foreach (btb_valid[i]) full &= btb_valid[i];
      n_alloc++;
      if (full) n_replace++;
    end
    if (ex_start) begin
      if (have_last && is_branch_op(last_op) && tcyc - last_t == 1) n_nt_ok++;
      if (state == 8'hB0 || state == 8'hB1) n_call++;
      if (state == 8'hB2) n_ret++;
      last_t = tcyc; last_op = state; have_last = 1;
    end
  end

  // ---------------------------------------------------------------- LCD model
  int nib = 0;
  bit half = 0;
  logic [3:0] hi;
  logic [8:0] bytes [$];
  always @(negedge lcd_e) if (!rst) begin
    if (nib >= 4) begin
      if (!half) begin hi = lcd_db; half = 1; end
      else begin bytes.push_back({lcd_rs, hi, lcd_db}); half = 0; end
    end
    nib++;
  end

  function automatic logic [7:0] hx(logic [3:0] d);
    return (d < 10) ? 8'h30 + 8'(d) : 8'h41 + 8'(d) - 8'd10;
  endfunction

  logic [31:0] prog [128];
  initial begin
    iss m;
    logic [8:0] b;
    logic [7:0] line [8];
    bit found;
    workload(prog);
    prog[0]  = JMP(200);   // chain of jumps ahead of the workload
    prog[50] = JMP(204);
    prog[51] = JMP(208);
    prog[52] = IN(1);
    prog[53] = JMP(4);
    sw = 8'h0C;
    m = new(1'b1);
    foreach (prog[i]) m.prog[i] = prog[i];
    check(m.run(sw, 100000), "reference model halts");

    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 9'(i); wdata = prog[i/4][31 - 8*(i%4) -: 8];
    end
    @(negedge clk); we = 1'b0;
    @(negedge clk); rst = 1'b0;
    wait (halted);
    @(negedge clk);
    for (int i = 0; i < NREGS; i++)
      check(regs[i] == m.r[i], $sformatf("r%0d=%02h expected %02h", i, regs[i], m.r[i]));
    check(cycle == 32'(m.cycles), $sformatf("cycles %0d expected %0d", cycle, m.cycles));
    $display("workload n=%0d: %0d cycles with prediction (model without prediction: see tb_cpu); r1..r5 = %02h %02h %02h %02h %02h",
             sw, cycle, regs[1], regs[2], regs[3], regs[4], regs[5]);

    // LEDs
    for (int s = 0; s < 4; s++) begin
      @(negedge clk); sel = 2'(s);
      @(negedge clk); @(negedge clk);
      check(led == regs[s + 1], $sformatf("LEDs show r%0d", s + 1));
    end

    // LCD: find a complete line written after halt
    bytes.delete();
    found = 0;
    while (!found) begin
      while (bytes.size() == 0) @(posedge clk);
      b = bytes.pop_front();
      if (b == 9'h080) begin
        for (int d = 0; d < 8; d++) begin
          while (bytes.size() == 0) @(posedge clk);
          b = bytes.pop_front();
          line[d] = b[7:0];
          check(b[8], "digit written as character");
        end
        found = 1;
      end
    end
    for (int d = 0; d < 8; d++)
      check(line[d] == hx(cycle[28 - 4*d +: 4]), $sformatf("LCD digit %0d = %c", d, line[d]));
    $display("LCD shows %c%c%c%c%c%c%c%c", line[0], line[1], line[2], line[3], line[4], line[5], line[6], line[7]);

    $display("redirects %0d, hits %0d, correct not-taken %0d, mispredictions %0d, held cycles %0d, allocations %0d, replacements %0d, calls %0d, returns %0d",
             n_redirect, n_hit, n_nt_ok, n_wp, n_hold, n_alloc, n_replace, n_call, n_ret);
    check(n_redirect > 0, "predicted-taken redirect happened");
    check(n_nt_ok > 0,    "correct not-taken prediction happened");
    check(n_wp > 0,       "misprediction happened");
    check(n_wp == m.mispredicts, "misprediction count matches model");
    check(n_hold > 0,     "unpredicted branch held execute");
    check(n_alloc > 0,    "BTB allocation happened");
    check(n_replace > 0,  "BTB replacement happened");
    check(n_call > 0 && n_ret > 0, "call and return happened");
    check(halted,         "halt happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

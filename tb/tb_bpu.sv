// Testbench of the branch prediction unit (BTB + pattern history + selection
// logic). A random stream of resolved branches from a small set of branch
// addresses updates the unit; after each update a random address is looked
// up and hit, predicted direction, target and the selected next fetch
// address are compared with a model (allocation on miss with weakly
// taken/not taken, one saturating step on a hit, round-robin replacement).
`timescale 1ns/1ps
module tb_bpu;
  import bpu_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic lookup_valid = 1'b0;
  addr_t lookup_pc = '0, seq_pc = '0;
  logic hit, pred_taken, redirect;
  logic [2:0] hit_idx;
  addr_t pred_target, next_pc;
  logic upd_valid = 1'b0, upd_hit = 1'b0, upd_taken = 1'b0;
  logic [2:0] upd_idx = '0;
  addr_t upd_pc = '0, upd_target = '0;
  logic bv [8];
  addr_t bb [8];
  addr_t bt [8];
  pred_state_e fs [8];
  always #5 clk = ~clk;

  bpu #(.ENTRIES(8)) dut (.clk(clk), .rst(rst), .lookup_valid(lookup_valid), .lookup_pc(lookup_pc),
    .seq_pc(seq_pc), .hit(hit), .hit_idx(hit_idx), .pred_taken(pred_taken), .pred_target(pred_target),
    .redirect(redirect), .next_pc(next_pc), .upd_valid(upd_valid), .upd_hit(upd_hit), .upd_idx(upd_idx),
    .upd_pc(upd_pc), .upd_taken(upd_taken), .upd_target(upd_target),
    .btb_valid(bv), .btb_branch(bb), .btb_target(bt), .fsm_state(fs));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit    mv [8];
  addr_t mb [8];
  addr_t mt [8];
  int    mf [8];
  int    wp;
  int    n_redirect, n_alloc, n_hits;

  function automatic int find(addr_t a);
    for (int i = 0; i < 8; i++) if (mv[i] && mb[i] == a) return i;
    return -1;
  endfunction

  initial begin
    foreach (mv[i]) mv[i] = 0;
    wp = 0; n_redirect = 0; n_alloc = 0; n_hits = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int k = 0; k < 3000; k++) begin
      int    idx;
      addr_t a;
      // look up a branch from a set of 12 addresses (more than the BTB holds)
      @(negedge clk);
      a = addr_t'($urandom_range(0, 11) * 4 + 16'h40);
      lookup_valid = ($urandom_range(0, 7) != 0);
      lookup_pc = a;
      seq_pc = a + 16'd8;
      #1;
      idx = find(a);
      check(hit == (lookup_valid && idx >= 0), $sformatf("hit for %h", a));
      if (lookup_valid && idx >= 0) begin
        n_hits++;
        check(pred_taken == (mf[idx] >= 2), "predicted direction");
        check(pred_target == mt[idx], "predicted target");
        check(hit_idx == 3'(idx), "hit index");
      end
      check(redirect == (lookup_valid && idx >= 0 && mf[idx] >= 2), "redirect");
      check(next_pc == (redirect ? mt[idx] : seq_pc), "selected next fetch address");
      if (redirect) n_redirect++;
      // resolve that branch
      upd_valid  = 1;
      upd_hit    = (idx >= 0);
      upd_idx    = (idx >= 0) ? 3'(idx) : 3'($urandom_range(0, 7));
      upd_pc     = a;
      upd_taken  = ($urandom_range(0, 3) != 0);
      upd_target = ($urandom_range(0, 9) == 0) ? addr_t'($urandom) : a + 16'h100;
      @(posedge clk); #1;
      upd_valid = 0;
      if (idx >= 0) begin
        mf[idx] = upd_taken ? (mf[idx] == 3 ? 3 : mf[idx] + 1) : (mf[idx] == 0 ? 0 : mf[idx] - 1);
        mt[idx] = upd_target;
      end else begin
        n_alloc++;
        mv[wp] = 1; mb[wp] = a; mt[wp] = upd_target; mf[wp] = upd_taken ? 2 : 1;
        wp = (wp + 1) % 8;
      end
      for (int i = 0; i < 8; i++) if (mv[i])
        check(bv[i] && bb[i] == mb[i] && bt[i] == mt[i] && int'(fs[i]) == mf[i], $sformatf("entry %0d", i));
    end
    check(n_redirect > 100 && n_alloc > 50 && n_hits > 500, "redirects, allocations and hits all occurred");
    $display("hits %0d, redirects %0d, allocations %0d", n_hits, n_redirect, n_alloc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the branch target buffer: fills all eight entries in order,
// overflows it (oldest entry replaced), rewrites targets, and checks
// hit/index/target of random lookups of stored and absent addresses
// against a model.
`timescale 1ns/1ps
module tb_btb;
  import bpu_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  addr_t lookup_pc = '0, alloc_pc = '0, alloc_target = '0, upd_target = '0;
  logic hit, alloc = 1'b0, retarget = 1'b0;
  logic [2:0] hit_idx, alloc_idx, upd_idx = '0;
  addr_t hit_target;
  logic  v_o [8];
  addr_t b_o [8];
  addr_t t_o [8];
  always #5 clk = ~clk;

  btb #(.ENTRIES(8)) dut (.clk(clk), .rst(rst), .lookup_pc(lookup_pc), .hit(hit), .hit_idx(hit_idx),
    .hit_target(hit_target), .alloc(alloc), .alloc_pc(alloc_pc), .alloc_target(alloc_target),
    .alloc_idx(alloc_idx), .retarget(retarget), .upd_idx(upd_idx), .upd_target(upd_target),
    .valid_o(v_o), .branch_o(b_o), .target_o(t_o));

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
  int    wp;

  task automatic probe(addr_t a);
    int idx;
    lookup_pc = a;
    #1;
    idx = -1;
    for (int i = 7; i >= 0; i--) if (mv[i] && mb[i] == a) idx = i;
    check(hit == (idx >= 0), $sformatf("hit for %h", a));
    if (idx >= 0) begin
      check(hit_idx == 3'(idx), $sformatf("index for %h", a));
      check(hit_target == mt[idx], $sformatf("target for %h", a));
    end
  endtask

  addr_t used [$];
  initial begin
    foreach (mv[i]) mv[i] = 0;
    wp = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    probe(16'h0000);
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      alloc = 0; retarget = 0;
      if ($urandom_range(0, 2) == 0) begin
        // allocate a branch address that is not stored yet (multiple of 4)
        addr_t a;
        bit dup;
        do begin
          a = addr_t'($urandom_range(0, 127) * 4);
          dup = 0;
          foreach (mv[i]) if (mv[i] && mb[i] == a) dup = 1;
        end while (dup);
        alloc = 1; alloc_pc = a; alloc_target = addr_t'($urandom);
        check(alloc_idx == 3'(wp), "allocation slot is the round-robin pointer");
        @(posedge clk); #1;
        mv[wp] = 1; mb[wp] = alloc_pc; mt[wp] = alloc_target; wp = (wp + 1) % 8;
        used.push_back(a);
      end else if ($urandom_range(0, 1) == 0) begin
        retarget = 1; upd_idx = 3'($urandom_range(0, 7)); upd_target = addr_t'($urandom);
        @(posedge clk); #1;
        mt[upd_idx] = upd_target;
      end
      alloc = 0; retarget = 0;
      if (used.size() > 0 && $urandom_range(0, 1) == 0) probe(used[$urandom_range(0, used.size() - 1)]);
      else probe(addr_t'($urandom_range(0, 127) * 4));
      for (int i = 0; i < 8; i++) begin
        check(v_o[i] == mv[i], "valid bits");
        if (mv[i]) check(b_o[i] == mb[i] && t_o[i] == mt[i], "stored entry");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

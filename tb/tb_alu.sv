// Testbench of the ALU: every operation on edge values and random operands,
// result and flags compared with integer arithmetic.
`timescale 1ns/1ps
module tb_alu;
  import bpu_pkg::*;
  alu_op_e op;
  data_t a, b, y;
  flags_t f;

  alu dut (.op(op), .a(a), .b(b), .y(y), .flags(f));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(alu_op_e o, data_t x, data_t z);
    int ey, ec, ev, sx, sz, sr;
    op = o; a = x; b = z;
    #1;
    sx = (x >= 128) ? int'(x) - 256 : int'(x);
    sz = (z >= 128) ? int'(z) - 256 : int'(z);
    ec = 0; ev = 0;
    case (o)
      ALU_PASSB: ey = z;
      ALU_ADD:   begin ey = (int'(x) + int'(z)) % 256; ec = (int'(x) + int'(z)) > 255; sr = sx + sz; ev = (sr > 127 || sr < -128); end
      ALU_SUB:   begin ey = (int'(x) - int'(z) + 256) % 256; ec = int'(x) < int'(z); sr = sx - sz; ev = (sr > 127 || sr < -128); end
      ALU_AND:   ey = x & z;
      ALU_OR:    ey = x | z;
      ALU_XOR:   ey = x ^ z;
      ALU_SHL:   begin ey = (int'(x) * 2) % 256; ec = x[7]; end
      default:   begin ey = int'(x) / 2; ec = x[0]; end
    endcase
    check(y == 8'(ey), $sformatf("%s %02h,%02h = %02h expected %02h", o.name(), x, z, y, ey));
    check(f.z == (ey == 0) && f.n == ey[7], $sformatf("%s z/n flags", o.name()));
    check(f.c == ec[0] && f.v == ev[0], $sformatf("%s %02h,%02h c/v flags", o.name(), x, z));
  endtask

  initial begin
    data_t edge_v [6] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFF, 8'h55};
    for (int o = 0; o < 8; o++) begin
      foreach (edge_v[i]) foreach (edge_v[j]) run_one(alu_op_e'(o), edge_v[i], edge_v[j]);
      for (int k = 0; k < 300; k++) run_one(alu_op_e'(o), data_t'($urandom), data_t'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the instruction decoder: all 256 opcodes with random operand
// fields, compared with a table of the instruction set (register writes,
// flag writes, memory access, branch kind and condition, halt).
`timescale 1ns/1ps
module tb_decoder;
  import bpu_pkg::*;
  logic [31:0] instr;
  dec_t dec;
  logic is_branch, predictable;

  decoder dut (.instr(instr), .dec(dec), .is_branch(is_branch), .predictable(predictable));

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

  initial begin
    for (int o = 0; o < 256; o++) begin
      for (int k = 0; k < 4; k++) begin
        bit e_rw, e_fw, e_ld, e_st, e_br, e_pred, e_halt;
        br_kind_e e_kind;
        cond_e    e_cond;
        instr = {8'(o), 24'($urandom)};
        #1;
        e_rw = (o >= 8'h01 && o <= 8'h0B) || o == 8'h0D || o == 8'h0F;
        e_fw = (o >= 8'h03 && o <= 8'h0C);
        e_ld = (o == 8'h0D);
        e_st = (o == 8'h0E);
        e_halt = (o == 8'hF0);
        e_kind = BR_NONE; e_cond = CND_ALWAYS;
        case (o)
          8'h10: e_kind = BR_JMP;
          8'h13: e_kind = BR_REL;
          8'hB0: e_kind = BR_CALL;
          8'hB1: e_kind = BR_ICALL;
          8'hB2: e_kind = BR_RET;
          8'h11: begin e_kind = BR_COND; e_cond = CND_RZ;  end
          8'h12: begin e_kind = BR_COND; e_cond = CND_RNZ; end
          8'h14: begin e_kind = BR_COND; e_cond = CND_NE;  end
          8'h15: begin e_kind = BR_COND; e_cond = CND_EQ;  end
          8'h16: begin e_kind = BR_COND; e_cond = CND_GE;  end
          8'h17: begin e_kind = BR_COND; e_cond = CND_LE;  end
          default: ;
        endcase
        e_br = (e_kind != BR_NONE);
        e_pred = e_br && (o != 8'hB2);
        check(dec.opcode == 8'(o) && dec.rd == instr[22:20] && dec.rs == instr[18:16] && dec.imm == instr[15:0],
              $sformatf("%02h fields", o));
        check(dec.reg_we == e_rw && dec.flags_we == e_fw, $sformatf("%02h write enables", o));
        check(dec.mem_rd == e_ld && dec.mem_wr == e_st && dec.in_rd == (o == 8'h0F), $sformatf("%02h memory/input", o));
        check(dec.br_kind == e_kind && dec.cond == e_cond, $sformatf("%02h branch kind", o));
        check(is_branch == e_br && predictable == e_pred && dec.halt == e_halt, $sformatf("%02h branch/halt flags", o));
        check(dec.use_imm == (o == 8'h01 || o == 8'h08 || o == 8'h09), $sformatf("%02h immediate operand", o));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Instruction decoder (combinational).
//
// Splits the 32-bit instruction word into opcode, register fields and the
// 16-bit operand, and derives the control signals of the execute stage:
// ALU operation and operand source, register/flag/memory write enables, and
// for control transfers their kind (conditional, jump, relative jump, call,
// indirect call, return) and condition. is_branch is the "branch" signal of
// the decode stage: it tells the branch prediction unit to look the
// instruction up. predictable excludes RET, whose target comes from the
// return stack and is never kept in the branch target buffer.
// Unknown opcodes decode as no-operation.
// The opcodes of JZNE, CALL, BREQ, BRGE and HALT and the list of branch
// instructions follow the reference design; everything else in the encoding
// is this design's own.
module decoder
  import bpu_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        dec,
  output logic        is_branch,
  output logic        predictable
);

  always_comb begin
    dec          = '0;
    dec.opcode   = instr[31:24];
    dec.rd       = instr[22:20];
    dec.rs       = instr[18:16];
    dec.imm      = instr[15:0];
    dec.alu_op   = ALU_PASSB;
    dec.br_kind  = BR_NONE;
    dec.cond     = CND_ALWAYS;
    unique case (instr[31:24])
      OP_LDI:  begin dec.alu_op = ALU_PASSB; dec.use_imm = 1'b1; dec.reg_we = 1'b1; end
      OP_MOV:  begin dec.alu_op = ALU_PASSB; dec.reg_we = 1'b1; end
      OP_ADD:  begin dec.alu_op = ALU_ADD; dec.reg_we = 1'b1; dec.flags_we = 1'b1; end
      OP_SUB:  begin dec.alu_op = ALU_SUB; dec.reg_we = 1'b1; dec.flags_we = 1'b1; end
      OP_AND:  begin dec.alu_op = ALU_AND; dec.reg_we = 1'b1; dec.flags_we = 1'b1; end
      OP_OR:   begin dec.alu_op = ALU_OR;  dec.reg_we = 1'b1; dec.flags_we = 1'b1; end
      OP_XOR:  begin dec.alu_op = ALU_XOR; dec.reg_we = 1'b1; dec.flags_we = 1'b1; end
      OP_ADDI: begin dec.alu_op = ALU_ADD; dec.use_imm = 1'b1; dec.reg_we = 1'b1; dec.flags_we = 1'b1; end
      OP_SUBI: begin dec.alu_op = ALU_SUB; dec.use_imm = 1'b1; dec.reg_we = 1'b1; dec.flags_we = 1'b1; end
      OP_SHL:  begin dec.alu_op = ALU_SHL; dec.reg_we = 1'b1; dec.flags_we = 1'b1; end
      OP_SHR:  begin dec.alu_op = ALU_SHR; dec.reg_we = 1'b1; dec.flags_we = 1'b1; end
      OP_CMP:  begin dec.alu_op = ALU_SUB; dec.flags_we = 1'b1; end
      OP_LD:   begin dec.mem_rd = 1'b1; dec.reg_we = 1'b1; end
      OP_ST:   begin dec.mem_wr = 1'b1; end
      OP_IN:   begin dec.in_rd = 1'b1; dec.reg_we = 1'b1; end
      OP_JMP:   dec.br_kind = BR_JMP;
      OP_RJMP:  dec.br_kind = BR_REL;
      OP_CALL:  dec.br_kind = BR_CALL;
      OP_ICALL: dec.br_kind = BR_ICALL;
      OP_RET:   dec.br_kind = BR_RET;
      OP_JZ:   begin dec.br_kind = BR_COND; dec.cond = CND_RZ;  end
      OP_JZNE: begin dec.br_kind = BR_COND; dec.cond = CND_RNZ; end
      OP_BREQ: begin dec.br_kind = BR_COND; dec.cond = CND_EQ;  end
      OP_BRNE: begin dec.br_kind = BR_COND; dec.cond = CND_NE;  end
      OP_BRGE: begin dec.br_kind = BR_COND; dec.cond = CND_GE;  end
      OP_BRLE: begin dec.br_kind = BR_COND; dec.cond = CND_LE;  end
      OP_HALT: dec.halt = 1'b1;
      default: ;
    endcase
  end

  assign is_branch   = (dec.br_kind != BR_NONE);
  assign predictable = is_branch && (dec.br_kind != BR_RET);

endmodule

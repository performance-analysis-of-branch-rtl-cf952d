// Shared types and constants of the 8-bit branch-prediction test processor.
//
// Instruction word (32 bits, one per 4-byte slot of instruction memory; the
// program counter is a byte address that steps by 4):
//   [31:24] opcode, [23:16] operand1 = {rd[3:0], rs[3:0]}, [15:0] operand2.
// Only the low three bits of rd/rs are used (eight 8-bit registers r0..r7).
// The opcodes of JZNE (0x12), CALL (0xB0), BREQ (0x15) and BRGE (0x16) follow
// the reference design; every other encoding is this design's own choice.
//
// The table nopred_latency() holds the number of clock cycles each branch
// costs when it is not predicted (from the reference latency table); a
// correctly predicted taken branch costs 2 cycles and RET always costs 3.
package bpu_pkg;

  localparam int unsigned XLEN      = 8;   // data width
  localparam int unsigned ALEN      = 16;  // instruction address width
  localparam int unsigned NREGS     = 8;

  typedef logic [XLEN-1:0] data_t;
  typedef logic [ALEN-1:0] addr_t;
  typedef logic [2:0]      rsel_t;

  typedef enum logic [7:0] {
    OP_NOP   = 8'h00,
    OP_LDI   = 8'h01,  // rd = imm8
    OP_MOV   = 8'h02,  // rd = rs
    OP_ADD   = 8'h03,  // rd = rd + rs
    OP_SUB   = 8'h04,  // rd = rd - rs
    OP_AND   = 8'h05,
    OP_OR    = 8'h06,
    OP_XOR   = 8'h07,
    OP_ADDI  = 8'h08,  // rd = rd + imm8
    OP_SUBI  = 8'h09,  // rd = rd - imm8
    OP_SHL   = 8'h0A,  // rd = rd << 1
    OP_SHR   = 8'h0B,  // rd = rd >> 1
    OP_CMP   = 8'h0C,  // flags of rd - rs
    OP_LD    = 8'h0D,  // rd = mem[imm8 + rs]
    OP_ST    = 8'h0E,  // mem[imm8 + rs] = rd
    OP_IN    = 8'h0F,  // rd = input port
    OP_JMP   = 8'h10,  // pc = imm16
    OP_JZ    = 8'h11,  // if (rd == 0) pc = imm16
    OP_JZNE  = 8'h12,  // if (rd != 0) pc = imm16
    OP_RJMP  = 8'h13,  // pc = pc + imm16 (two's complement byte offset)
    OP_BRNE  = 8'h14,  // if (!Z) pc = imm16
    OP_BREQ  = 8'h15,  // if (Z)  pc = imm16
    OP_BRGE  = 8'h16,  // if (N == V) pc = imm16   (signed >=)
    OP_BRLE  = 8'h17,  // if (Z || N != V) pc = imm16 (signed <=)
    OP_CALL  = 8'hB0,  // push pc+4, pc = imm16
    OP_ICALL = 8'hB1,  // push pc+4, pc = {rd, rs}
    OP_RET   = 8'hB2,  // pc = pop
    OP_HALT  = 8'hF0   // stop; cycle counter freezes
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_PASSB, ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SHL, ALU_SHR
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_NONE,    // not a control-transfer instruction
    BR_COND,    // conditional, absolute target
    BR_JMP,     // unconditional, absolute target
    BR_REL,     // unconditional, pc-relative target
    BR_CALL,    // call, absolute target
    BR_ICALL,   // call, target from register pair
    BR_RET      // return, target from stack (never predicted)
  } br_kind_e;

  typedef enum logic [2:0] {
    CND_ALWAYS, CND_RZ, CND_RNZ, CND_EQ, CND_NE, CND_GE, CND_LE
  } cond_e;

  typedef struct packed {
    logic z;  // zero
    logic n;  // negative (bit 7)
    logic c;  // carry / borrow / shifted-out bit
    logic v;  // signed overflow
  } flags_t;

  // Decoded instruction.
  typedef struct packed {
    logic [7:0] opcode;
    rsel_t      rd;
    rsel_t      rs;
    logic [15:0] imm;
    alu_op_e    alu_op;
    logic       use_imm;    // ALU operand B = imm8 instead of rs
    logic       reg_we;     // write rd
    logic       flags_we;   // update flags
    logic       mem_rd;     // rd = data memory
    logic       mem_wr;     // data memory = rd
    logic       in_rd;      // rd = input port
    br_kind_e   br_kind;
    cond_e      cond;
    logic       halt;
  } dec_t;

  // 2-bit predictor states (Fig. 3 of the reference design).
  typedef enum logic [1:0] {
    P_SNT = 2'b00,  // strongly not taken
    P_WNT = 2'b01,  // weakly not taken
    P_WT  = 2'b10,  // weakly taken
    P_ST  = 2'b11   // strongly taken
  } pred_state_e;

  // Cycles a branch takes when it is not predicted (or mispredicted),
  // counted from the cycle it enters execute to the cycle the next
  // instruction enters execute.
  function automatic int unsigned nopred_latency(logic [7:0] op);
    case (op)
      OP_CALL:  return 4;
      OP_JZNE:  return 5;
      OP_ICALL: return 3;
      OP_JZ:    return 5;
      OP_RJMP:  return 3;
      OP_JMP:   return 4;
      OP_BREQ:  return 5;
      OP_BRNE:  return 5;
      OP_RET:   return 3;
      OP_BRGE:  return 5;
      OP_BRLE:  return 5;
      default:  return 1;
    endcase
  endfunction

endpackage

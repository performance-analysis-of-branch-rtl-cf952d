// Testbench support: an assembler for the processor's instruction set and an
// instruction-level reference model that predicts, independently of the RTL,
// the final registers, data memory, BTB contents and the exact clock-cycle
// count of a program, with or without branch prediction.
//
// Cycle model: the first instruction reaches execute in cycle 2 after reset;
// an ordinary instruction costs 1 cycle; a branch costs 2 when it hits in
// the BTB and is correctly predicted taken, 1 when it hits and is correctly
// predicted not taken, and its unpredicted latency (5 conditional, 4 JMP and
// CALL, 3 RJMP, ICALL and RET) otherwise. The cycle counter stops one cycle
// after HALT reaches execute.
package tb_model_pkg;

  // ------------------------------------------------------------ assembler
  function automatic logic [31:0] enc(logic [7:0] op, int rd, int rs, logic [15:0] imm);
    return {op, 1'b0, 3'(rd), 1'b0, 3'(rs), imm};
  endfunction
  function automatic logic [31:0] NOP();                     return enc(8'h00, 0, 0, 0); endfunction
  function automatic logic [31:0] LDI(int rd, int v);        return enc(8'h01, rd, 0, 16'(v & 8'hFF)); endfunction
  function automatic logic [31:0] MOV(int rd, int rs);       return enc(8'h02, rd, rs, 0); endfunction
  function automatic logic [31:0] ADD(int rd, int rs);       return enc(8'h03, rd, rs, 0); endfunction
  function automatic logic [31:0] SUB(int rd, int rs);       return enc(8'h04, rd, rs, 0); endfunction
  function automatic logic [31:0] ANDR(int rd, int rs);      return enc(8'h05, rd, rs, 0); endfunction
  function automatic logic [31:0] ORR(int rd, int rs);       return enc(8'h06, rd, rs, 0); endfunction
  function automatic logic [31:0] XORR(int rd, int rs);      return enc(8'h07, rd, rs, 0); endfunction
  function automatic logic [31:0] ADDI(int rd, int v);       return enc(8'h08, rd, 0, 16'(v & 8'hFF)); endfunction
  function automatic logic [31:0] SUBI(int rd, int v);       return enc(8'h09, rd, 0, 16'(v & 8'hFF)); endfunction
  function automatic logic [31:0] SHL(int rd);               return enc(8'h0A, rd, 0, 0); endfunction
  function automatic logic [31:0] SHR(int rd);               return enc(8'h0B, rd, 0, 0); endfunction
  function automatic logic [31:0] CMP(int rd, int rs);       return enc(8'h0C, rd, rs, 0); endfunction
  function automatic logic [31:0] LD(int rd, int off, int rs); return enc(8'h0D, rd, rs, 16'(off & 8'hFF)); endfunction
  function automatic logic [31:0] ST(int rd, int off, int rs); return enc(8'h0E, rd, rs, 16'(off & 8'hFF)); endfunction
  function automatic logic [31:0] IN(int rd);                return enc(8'h0F, rd, 0, 0); endfunction
  function automatic logic [31:0] JMP(int a);                return enc(8'h10, 0, 0, 16'(a)); endfunction
  function automatic logic [31:0] JZ(int rd, int a);         return enc(8'h11, rd, 0, 16'(a)); endfunction
  function automatic logic [31:0] JZNE(int rd, int a);       return enc(8'h12, rd, 0, 16'(a)); endfunction
  function automatic logic [31:0] RJMP(int off);             return enc(8'h13, 0, 0, 16'(off)); endfunction
  function automatic logic [31:0] BRNE(int a);               return enc(8'h14, 0, 0, 16'(a)); endfunction
  function automatic logic [31:0] BREQ(int a);               return enc(8'h15, 0, 0, 16'(a)); endfunction
  function automatic logic [31:0] BRGE(int a);               return enc(8'h16, 0, 0, 16'(a)); endfunction
  function automatic logic [31:0] BRLE(int a);               return enc(8'h17, 0, 0, 16'(a)); endfunction
  function automatic logic [31:0] CALL(int a);               return enc(8'hB0, 0, 0, 16'(a)); endfunction
  function automatic logic [31:0] ICALL(int rh, int rl);     return enc(8'hB1, rh, rl, 0); endfunction
  function automatic logic [31:0] RET();                     return enc(8'hB2, 0, 0, 0); endfunction
  function automatic logic [31:0] HALT();                    return enc(8'hF0, 0, 0, 0); endfunction

  // Unpredicted latency per opcode.
  function automatic int lat_nopred(logic [7:0] op);
    case (op)
      8'h11, 8'h12, 8'h14, 8'h15, 8'h16, 8'h17: return 5;
      8'h10, 8'hB0:                             return 4;
      8'h13, 8'hB1, 8'hB2:                      return 3;
      default:                                  return 1;
    endcase
  endfunction

  function automatic bit is_branch_op(logic [7:0] op);
    return lat_nopred(op) > 1;
  endfunction

  // Workload: sum 1..n (n from the input port), n*5 by a subroutine call,
  // eight bytes derived from n written to data memory and bubble-sorted as
  // signed numbers. Results: r1 = n, r2 = sum mod 256, r3 = 5n mod 256,
  // r4 = smallest and r5 = largest byte.
  function automatic void workload(ref logic [31:0] p [128]);
    foreach (p[i]) p[i] = HALT();
    p[0]  = IN(1);
    p[1]  = LDI(2, 0);
    p[2]  = MOV(6, 1);
    p[3]  = JZ(6, 28);
    p[4]  = ADD(2, 6);
    p[5]  = SUBI(6, 1);
    p[6]  = JZNE(6, 16);
    p[7]  = LDI(3, 0);
    p[8]  = CALL(160);
    p[9]  = LDI(0, 0);
    p[10] = MOV(4, 1);
    p[11] = ADDI(4, 8'h5B);
    p[12] = ST(4, 0, 0);
    p[13] = ADDI(0, 1);
    p[14] = MOV(5, 0);
    p[15] = SUBI(5, 8);
    p[16] = JZNE(5, 44);
    p[17] = LDI(6, 7);
    p[18] = LDI(0, 0);
    p[19] = LD(4, 0, 0);
    p[20] = LD(5, 1, 0);
    p[21] = CMP(5, 4);
    p[22] = BRGE(100);
    p[23] = ST(5, 0, 0);
    p[24] = ST(4, 1, 0);
    p[25] = ADDI(0, 1);
    p[26] = MOV(7, 0);
    p[27] = SUBI(7, 7);
    p[28] = JZNE(7, 76);
    p[29] = SUBI(6, 1);
    p[30] = BRNE(72);
    p[31] = LDI(0, 0);
    p[32] = LD(4, 0, 0);
    p[33] = LD(5, 7, 0);
    p[34] = HALT();
    p[40] = LDI(7, 5);
    p[41] = ADD(3, 1);
    p[42] = SUBI(7, 1);
    p[43] = BRNE(164);
    p[44] = RET();
  endfunction

  // ------------------------------------------------------------ reference model
  class iss;
    logic [31:0] prog [128];
    logic [7:0]  r [8];
    logic [7:0]  dm [256];
    logic [15:0] stk [8];
    int          sp;
    bit          z, n, c, v;
    // BTB model
    bit          use_bpu;
    int          entries;
    bit          bv [8];
    logic [15:0] bb [8];
    logic [15:0] bt [8];
    int          fsm [8];
    int          wptr;
    // results
    longint      cycles;
    int          executed;
    int          mispredicts;
    int          fast_taken;
    int          fast_nt;
    int          misses;

    function new(bit bpu);
      use_bpu = bpu;
      entries = 8;
      foreach (prog[i]) prog[i] = 32'h0;
      foreach (dm[i]) dm[i] = 8'h00;
    endfunction

    function void flags8(logic [8:0] s, logic [7:0] y);
      z = (y == 0); n = y[7]; c = s[8];
    endfunction

    // Runs until HALT or max_instr instructions; returns 1 if HALT was reached.
    function bit run(logic [7:0] inp, int max_instr);
      logic [15:0] pc, tgt, seq;
      logic [31:0] w;
      logic [7:0]  op, a, b, y;
      logic [8:0]  s;
      int rd, rs, lat;
      bit taken;
      foreach (r[i]) r[i] = 0;
      foreach (stk[i]) stk[i] = 0;
      foreach (bv[i]) begin bv[i] = 0; bb[i] = 0; bt[i] = 0; fsm[i] = 1; end
      sp = 0; wptr = 0; z = 0; n = 0; c = 0; v = 0;
      pc = 0; cycles = 2; executed = 0;
      mispredicts = 0; fast_taken = 0; fast_nt = 0; misses = 0;
      while (executed < max_instr) begin
        w  = prog[pc[8:2]];
        op = w[31:24]; rd = int'(w[22:20]); rs = int'(w[18:16]);
        a  = r[rd]; b = r[rs];
        seq = pc + 4;
        executed++;
        if (op == 8'hF0) begin
          cycles = cycles + 1;
          return 1;
        end
        if (!is_branch_op(op)) begin
          cycles++;
          case (op)
            8'h01: r[rd] = w[7:0];
            8'h02: r[rd] = b;
            8'h03: begin s = {1'b0,a} + {1'b0,b}; y = s[7:0]; flags8(s, y); v = (a[7]==b[7]) && (y[7]!=a[7]); r[rd] = y; end
            8'h04: begin s = {1'b0,a} - {1'b0,b}; y = s[7:0]; flags8(s, y); v = (a[7]!=b[7]) && (y[7]!=a[7]); r[rd] = y; end
            8'h05: begin y = a & b; flags8(0, y); v = 0; r[rd] = y; end
            8'h06: begin y = a | b; flags8(0, y); v = 0; r[rd] = y; end
            8'h07: begin y = a ^ b; flags8(0, y); v = 0; r[rd] = y; end
            8'h08: begin s = {1'b0,a} + {1'b0,w[7:0]}; y = s[7:0]; flags8(s, y); v = (a[7]==w[7]) && (y[7]!=a[7]); r[rd] = y; end
            8'h09: begin s = {1'b0,a} - {1'b0,w[7:0]}; y = s[7:0]; flags8(s, y); v = (a[7]!=w[7]) && (y[7]!=a[7]); r[rd] = y; end
            8'h0A: begin y = {a[6:0],1'b0}; flags8({a[7],8'h0}, y); v = 0; r[rd] = y; end
            8'h0B: begin y = {1'b0,a[7:1]}; flags8({a[0],8'h0}, y); v = 0; r[rd] = y; end
            8'h0C: begin s = {1'b0,a} - {1'b0,b}; y = s[7:0]; flags8(s, y); v = (a[7]!=b[7]) && (y[7]!=a[7]); end
            8'h0D: r[rd] = dm[8'(w[7:0] + b)];
            8'h0E: dm[8'(w[7:0] + b)] = a;
            8'h0F: r[rd] = inp;
            default: ;
          endcase
          pc = seq;
          continue;
        end
        // control transfer
        taken = 1;
        tgt = w[15:0];
        case (op)
          8'h11: taken = (a == 0);
          8'h12: taken = (a != 0);
          8'h14: taken = !z;
          8'h15: taken = z;
          8'h16: taken = (n == v);
          8'h17: taken = z || (n != v);
          8'h13: tgt = pc + w[15:0];
          8'hB1: tgt = {a, b};
          8'hB2: tgt = stk[(sp + 7) % 8];
          default: ;
        endcase
        lat = lat_nopred(op);
        if (use_bpu && op != 8'hB2) begin
          int hit;
          hit = -1;
          for (int i = entries - 1; i >= 0; i--) if (bv[i] && bb[i] == pc) hit = i;
          if (hit >= 0) begin
            bit pt;
            pt = (fsm[hit] >= 2);
            if (pt == taken && (!taken || bt[hit] == tgt)) begin
              lat = pt ? 2 : 1;
              if (pt) fast_taken++; else fast_nt++;
            end else mispredicts++;
            fsm[hit] = taken ? ((fsm[hit] == 3) ? 3 : fsm[hit] + 1)
                             : ((fsm[hit] == 0) ? 0 : fsm[hit] - 1);
            bt[hit] = tgt;
          end else begin
            misses++;
            bv[wptr] = 1; bb[wptr] = pc; bt[wptr] = tgt; fsm[wptr] = taken ? 2 : 1;
            wptr = (wptr + 1) % entries;
          end
        end
        cycles += lat;
        if (op == 8'hB0 || op == 8'hB1) begin stk[sp % 8] = seq; sp = (sp + 1) % 8; end
        if (op == 8'hB2) sp = (sp + 7) % 8;
        pc = taken ? tgt : seq;
      end
      return 0;
    endfunction
  endclass

endpackage

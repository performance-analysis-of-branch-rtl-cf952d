// Pipelined 8-bit RISC processor with a branch prediction unit.
//
// Three stages: fetch (IF), decode (ID) and execute (EX); execute reads the
// register file, runs the ALU or the data memory and writes the result back
// in the same cycle, so an ordinary instruction takes one cycle and no
// operand bypass is needed. A 32-bit free-running counter (cycle) counts
// clock cycles from reset until a HALT instruction has executed.
//
// Branch handling, the subject of this design:
//  * Without prediction (USE_BPU = 0), and with prediction for a branch that
//    misses in the branch target buffer (BTB), for RET, and for a branch that
//    was mispredicted, the branch holds the execute stage for
//    nopred_latency(op) - 2 cycles, fetching stops and the younger
//    instructions are discarded; on its last execute cycle the resolved
//    address is loaded into the PC. The next instruction then reaches execute
//    nopred_latency(op) cycles after the branch did: 5 for conditional
//    branches, 4 for JMP and CALL, 3 for RJMP, ICALL and RET.
//  * With prediction, the decode stage looks a decoded branch up in the BTB.
//    On a hit predicted taken, the fetch is redirected to the stored target
//    and the fall-through instruction already fetched is dropped, so the
//    branch costs 2 cycles. On a hit predicted not taken the fall-through
//    path simply continues (1 cycle). In execute the branch is checked in
//    one cycle; when direction or target were wrong, wp pulses and the branch
//    continues as an unpredicted one (above).
//  * When a predictable branch completes, the BTB and its two-bit state
//    machine are updated (allocation on a miss, one FSM step on a hit).
//
// The cycle counts of the unpredicted branches and the 2-cycle predicted
// branch follow the reference latency table; how they arise inside the
// pipeline (the held execute cycles) is this design's own choice.
//
// btb_* and fsm_state show the predictor contents (all zero without it).
// Program loading: imem_we writes one byte of instruction memory per cycle;
// hold rst high while loading. in_port is read by the IN instruction.
module cpu
  import bpu_pkg::*;
#(
  parameter bit          USE_BPU     = 1'b1,
  parameter int unsigned BTB_ENTRIES = 8,
  parameter int unsigned IMEM_BYTES  = 512,
  parameter int unsigned DMEM_BYTES  = 256,
  parameter int unsigned RS_DEPTH    = 8
) (
  input  logic                          clk,
  input  logic                          rst,
  input  data_t                         in_port,
  // program loading
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_BYTES)-1:0] imem_waddr,
  input  logic [7:0]                    imem_wdata,
  // status
  output logic                          halted,
  output logic [31:0]                   cycle,
  output addr_t                         pc,
  output logic [7:0]                    state,     // opcode in execute (0 when empty)
  output logic                          ex_start,  // an instruction enters execute
  output data_t                         regs [NREGS],
  output logic [$clog2(RS_DEPTH)-1:0]   stack_ptr,
  output logic                          btb_valid  [BTB_ENTRIES],
  output addr_t                         btb_branch [BTB_ENTRIES],
  output addr_t                         btb_target [BTB_ENTRIES],
  output pred_state_e                   fsm_state  [BTB_ENTRIES],
  // branch events (one-cycle pulses)
  output logic                          branch,    // decode stage holds a branch
  output logic                          btbhit,    // ... that hit in the BTB
  output logic                          redirect,  // fetch redirected to a predicted target
  output logic                          wp,        // misprediction detected in execute
  output logic                          br_done,   // a branch completed execute
  output logic                          br_fast,   // ... in one execute cycle (predicted correctly)
  output logic                          btb_alloc, // a branch was entered in the BTB
  output logic                          ex_hold    // execute is held by an unpredicted branch
);

  localparam int unsigned BW = $clog2(BTB_ENTRIES);
  localparam int unsigned DW = $clog2(DMEM_BYTES);

  // ---------------------------------------------------------------- fetch
  addr_t       pc_f;
  logic [31:0] instr_f;

  imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk  (clk),
    .we   (imem_we),
    .waddr(imem_waddr),
    .wdata(imem_wdata),
    .raddr(pc_f),
    .rdata(instr_f)
  );

  // IF/ID register
  logic        fd_valid;
  addr_t       fd_pc;
  logic [31:0] fd_instr;

  // ---------------------------------------------------------------- decode
  dec_t dec_d;
  logic is_branch_d, predictable_d;

  decoder u_dec (
    .instr      (fd_instr),
    .dec        (dec_d),
    .is_branch  (is_branch_d),
    .predictable(predictable_d)
  );

  logic          bp_hit, bp_taken, bp_redirect;
  logic [BW-1:0] bp_idx;
  addr_t         bp_target, bp_next;

  // ID/EX register
  logic          de_valid;
  addr_t         de_pc;
  dec_t          de;
  logic          de_hit;
  logic [BW-1:0] de_idx;
  logic          de_ptaken;
  addr_t         de_ptarget;

  // ---------------------------------------------------------------- execute
  data_t  ra_val, rb_val, alu_b, alu_y, mem_rdata, wb_val;
  flags_t flags, alu_flags;
  addr_t  rs_top;
  logic [2:0] ex_cnt;   // remaining held cycles of an unpredicted branch
  logic   ex_fire;      // the instruction in execute takes effect this cycle

  regfile u_rf (
    .clk    (clk),
    .rst    (rst),
    .ra     (de.rd),
    .rb     (de.rs),
    .rdata_a(ra_val),
    .rdata_b(rb_val),
    .we     (ex_fire && de.reg_we),
    .wa     (de.rd),
    .wdata  (wb_val),
    .regs_o (regs)
  );

  assign alu_b = de.use_imm ? de.imm[7:0] : rb_val;

  alu u_alu (
    .op   (de.alu_op),
    .a    (ra_val),
    .b    (alu_b),
    .y    (alu_y),
    .flags(alu_flags)
  );

  logic [DW-1:0] dm_addr;
  assign dm_addr = DW'(de.imm[7:0] + rb_val);

  dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk  (clk),
    .we   (ex_fire && de.mem_wr),
    .addr (dm_addr),
    .wdata(ra_val),
    .rdata(mem_rdata)
  );

  always_comb begin
    if (de.mem_rd)     wb_val = mem_rdata;
    else if (de.in_rd) wb_val = in_port;
    else               wb_val = alu_y;
  end

  // Branch resolution.
  logic  is_br, br_taken, pred_ok, slow, ex_last, complete;
  addr_t br_target, seq_ex, next_ex;
  int unsigned held;

  assign is_br  = de_valid && (de.br_kind != BR_NONE);
  assign seq_ex = de_pc + addr_t'(4);

  always_comb begin
    unique case (de.cond)
      CND_ALWAYS: br_taken = 1'b1;
      CND_RZ:     br_taken = (ra_val == '0);
      CND_RNZ:    br_taken = (ra_val != '0);
      CND_EQ:     br_taken = flags.z;
      CND_NE:     br_taken = !flags.z;
      CND_GE:     br_taken = (flags.n == flags.v);
      CND_LE:     br_taken = flags.z || (flags.n != flags.v);
      default:    br_taken = 1'b0;
    endcase
    unique case (de.br_kind)
      BR_REL:   br_target = de_pc + de.imm;
      BR_ICALL: br_target = {ra_val, rb_val};
      BR_RET:   br_target = rs_top;
      default:  br_target = de.imm;
    endcase
  end

  assign next_ex = br_taken ? br_target : seq_ex;
  assign pred_ok = USE_BPU && de_hit &&
                   (de_ptaken == br_taken) && (!br_taken || de_ptarget == br_target);
  assign slow    = is_br && !pred_ok;
  assign held    = nopred_latency(de.opcode) - 2;
  assign ex_last = slow && ((ex_cnt == '0) ? (held <= 1) : (ex_cnt == 3'd1));
  assign complete = is_br && (pred_ok || ex_last);

  // An instruction executes its side effects exactly once: ordinary ones in
  // their single cycle, branches in their completing cycle.
  assign ex_fire = de_valid && !halted && (!is_br || complete);

  ret_stack #(.DEPTH(RS_DEPTH)) u_rs (
    .clk (clk),
    .rst (rst),
    .push(ex_fire && (de.br_kind == BR_CALL || de.br_kind == BR_ICALL)),
    .pop (ex_fire && (de.br_kind == BR_RET)),
    .data(seq_ex),
    .top (rs_top),
    .sp  (stack_ptr)
  );

  // ---------------------------------------------------------------- predictor
  logic upd_valid;
  assign upd_valid = USE_BPU && ex_fire && (de.br_kind != BR_NONE) && (de.br_kind != BR_RET);

  if (USE_BPU) begin : g_bpu
    bpu #(.ENTRIES(BTB_ENTRIES)) u_bpu (
      .clk         (clk),
      .rst         (rst),
      .lookup_valid(fd_valid && predictable_d),
      .lookup_pc   (fd_pc),
      .seq_pc      (pc_f + addr_t'(4)),
      .hit         (bp_hit),
      .hit_idx     (bp_idx),
      .pred_taken  (bp_taken),
      .pred_target (bp_target),
      .redirect    (bp_redirect),
      .next_pc     (bp_next),
      .upd_valid   (upd_valid),
      .upd_hit     (de_hit),
      .upd_idx     (de_idx),
      .upd_pc      (de_pc),
      .upd_taken   (br_taken),
      .upd_target  (br_target),
      .btb_valid   (btb_valid),
      .btb_branch  (btb_branch),
      .btb_target  (btb_target),
      .fsm_state   (fsm_state)
    );
  end else begin : g_no_bpu
    assign bp_hit      = 1'b0;
    assign bp_idx      = '0;
    assign bp_taken    = 1'b0;
    assign bp_target   = '0;
    assign bp_redirect = 1'b0;
    assign bp_next     = pc_f + addr_t'(4);
    always_comb begin
      for (int i = 0; i < BTB_ENTRIES; i++) begin
        btb_valid[i]  = 1'b0;
        btb_branch[i] = '0;
        btb_target[i] = '0;
        fsm_state[i]  = P_SNT;
      end
    end
  end

  // ---------------------------------------------------------------- pipeline control
  always_ff @(posedge clk) begin
    if (rst) begin
      pc_f     <= '0;
      fd_valid <= 1'b0;
      fd_pc    <= '0;
      fd_instr <= '0;
      de_valid <= 1'b0;
      de_pc    <= '0;
      de       <= '0;
      de_hit   <= 1'b0;
      de_idx   <= '0;
      de_ptaken  <= 1'b0;
      de_ptarget <= '0;
      ex_cnt   <= '0;
      flags    <= '0;
      halted   <= 1'b0;
      cycle    <= '0;
    end else if (!halted) begin
      cycle <= cycle + 1;

      if (ex_fire && de.flags_we) flags <= alu_flags;

      if (de_valid && de.halt) begin
        halted   <= 1'b1;
        fd_valid <= 1'b0;
        de_valid <= 1'b0;
      end else if (slow) begin
        // Unpredicted or mispredicted branch: hold execute, fetch nothing.
        fd_valid <= 1'b0;
        if (ex_last) begin
          ex_cnt   <= '0;
          de_valid <= 1'b0;
          pc_f     <= next_ex;
        end else begin
          ex_cnt <= (ex_cnt == '0) ? 3'(held - 1) : ex_cnt - 1'b1;
        end
      end else begin
        // Decode -> execute.
        de_valid   <= fd_valid;
        de_pc      <= fd_pc;
        de         <= dec_d;
        de_hit     <= bp_hit;
        de_idx     <= bp_idx;
        de_ptaken  <= bp_taken;
        de_ptarget <= bp_target;
        // Fetch -> decode; the selection logic picks the next fetch address.
        fd_pc    <= pc_f;
        fd_instr <= instr_f;
        if (fd_valid && bp_redirect) begin
          fd_valid <= 1'b0;       // drop the fall-through instruction
          pc_f     <= bp_target;
        end else begin
          fd_valid <= 1'b1;
          pc_f     <= bp_next;
        end
      end
    end
  end

  // ---------------------------------------------------------------- status
  assign pc        = pc_f;
  assign state     = de_valid ? de.opcode : 8'h00;
  assign ex_start  = de_valid && (ex_cnt == '0) && !halted;
  assign branch    = fd_valid && is_branch_d && !halted;
  assign btbhit    = fd_valid && bp_hit && !halted;
  assign redirect  = fd_valid && bp_redirect && !halted && !slow && !(de_valid && de.halt);
  assign wp        = is_br && !halted && USE_BPU && de_hit && !pred_ok && (ex_cnt == '0);
  assign br_done   = complete && !halted;
  assign br_fast   = is_br && pred_ok && !halted;
  assign btb_alloc = upd_valid && !de_hit;
  assign ex_hold   = slow && !halted;

  // ---------------------------------------------------------------- rules
  // A misprediction can only be reported for a branch that hit in the BTB.
  a_wp_needs_hit: assert property (@(posedge clk) disable iff (rst) wp |-> de_hit);
  // The decode stage never redirects fetch while execute holds a branch.
  a_no_redirect_in_hold: assert property (@(posedge clk) disable iff (rst) !(redirect && ex_hold));
  // A held branch leaves execute within four cycles.
  a_hold_bounded: assert property (@(posedge clk) disable iff (rst) ex_hold |-> ##[1:4] !ex_hold);

endmodule

// Branch prediction unit: branch target buffer + pattern history + selection
// logic.
//
// Lookup (decode stage, combinational): once the decoder has recognised a
// predictable branch (lookup_valid), its address is searched in the BTB. On a
// hit the entry's two-bit state machine gives the direction. The selection
// logic then chooses the next fetch address: the BTB target when the branch
// hits and is predicted taken (redirect = 1), otherwise the sequential
// address seq_pc supplied by the fetch stage, i.e. normal execution without
// prediction.
//
// Update (execute stage, on the clock edge): when a branch resolves
// (upd_valid) and it had hit (upd_hit), its state machine moves one step
// toward the real outcome and, if the real target differs from the stored
// one, the target is rewritten. When it had missed, the branch address and
// target are allocated in the BTB and the state machine of the same slot is
// initialised to weakly taken / weakly not taken from the outcome.
// The three parts and the lookup after decode follow the reference design;
// the target rewrite of an existing entry is this design's addition.
module bpu
  import bpu_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  // lookup
  input  logic                       lookup_valid,
  input  addr_t                      lookup_pc,
  input  addr_t                      seq_pc,
  output logic                       hit,
  output logic [$clog2(ENTRIES)-1:0] hit_idx,
  output logic                       pred_taken,
  output addr_t                      pred_target,
  output logic                       redirect,
  output addr_t                      next_pc,
  // update
  input  logic                       upd_valid,
  input  logic                       upd_hit,
  input  logic [$clog2(ENTRIES)-1:0] upd_idx,
  input  addr_t                      upd_pc,
  input  logic                       upd_taken,
  input  addr_t                      upd_target,
  // contents, for observation
  output logic                       btb_valid  [ENTRIES],
  output addr_t                      btb_branch [ENTRIES],
  output addr_t                      btb_target [ENTRIES],
  output pred_state_e                fsm_state  [ENTRIES]
);

  localparam int unsigned IW = $clog2(ENTRIES);

  logic          btb_hit;
  logic [IW-1:0] btb_idx;
  addr_t         btb_tgt;
  logic [IW-1:0] alloc_idx;
  logic          pht_taken;
  pred_state_e   pht_state;

  logic alloc, retarget;
  assign alloc    = upd_valid && !upd_hit;
  assign retarget = upd_valid &&  upd_hit && (btb_target[upd_idx] != upd_target);

  btb #(.ENTRIES(ENTRIES)) u_btb (
    .clk         (clk),
    .rst         (rst),
    .lookup_pc   (lookup_pc),
    .hit         (btb_hit),
    .hit_idx     (btb_idx),
    .hit_target  (btb_tgt),
    .alloc       (alloc),
    .alloc_pc    (upd_pc),
    .alloc_target(upd_target),
    .alloc_idx   (alloc_idx),
    .retarget    (retarget),
    .upd_idx     (upd_idx),
    .upd_target  (upd_target),
    .valid_o     (btb_valid),
    .branch_o    (btb_branch),
    .target_o    (btb_target)
  );

  pht #(.ENTRIES(ENTRIES)) u_pht (
    .clk     (clk),
    .rst     (rst),
    .rd_idx  (btb_idx),
    .rd_taken(pht_taken),
    .rd_state(pht_state),
    .init    (alloc),
    .update  (upd_valid && upd_hit),
    .wr_idx  (alloc ? alloc_idx : upd_idx),
    .taken   (upd_taken),
    .states  (fsm_state)
  );

  // Selection logic.
  assign hit         = lookup_valid && btb_hit;
  assign hit_idx     = btb_idx;
  assign pred_taken  = hit && pht_taken;
  assign pred_target = btb_tgt;
  assign redirect    = pred_taken;
  assign next_pc     = redirect ? btb_tgt : seq_pc;

endmodule

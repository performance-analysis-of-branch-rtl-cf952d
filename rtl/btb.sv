// Branch target buffer.
//
// ENTRIES slots, each holding a valid bit, the 16-bit address of a branch
// instruction and the 16-bit address it jumps to; with the default 8 entries
// the two address columns make up 32 bytes. Lookup is fully associative:
// the looked-up pc is compared with every stored branch address in the same
// cycle and hit/hit_idx/hit_target come out combinationally.
// A branch that missed is written when it executes (alloc): it takes the slot
// named by alloc_idx, which fills slots 0,1,2,... in order and then wraps
// round, replacing the oldest entry. A branch that hit but whose target
// changed (an indirect call) rewrites its target (retarget at upd_idx).
// Both writes happen on the rising clock edge; reset clears the valid bits.
// Size (8 x 16-bit branch address + 16-bit target) and the fill order follow
// the reference design; associative lookup, the valid bits and round-robin
// replacement when full are this design's choices.
module btb
  import bpu_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  // lookup
  input  addr_t                      lookup_pc,
  output logic                       hit,
  output logic [$clog2(ENTRIES)-1:0] hit_idx,
  output addr_t                      hit_target,
  // allocation of a new branch
  input  logic                       alloc,
  input  addr_t                      alloc_pc,
  input  addr_t                      alloc_target,
  output logic [$clog2(ENTRIES)-1:0] alloc_idx,
  // target rewrite of an existing entry
  input  logic                       retarget,
  input  logic [$clog2(ENTRIES)-1:0] upd_idx,
  input  addr_t                      upd_target,
  // contents, for observation
  output logic                       valid_o  [ENTRIES],
  output addr_t                      branch_o [ENTRIES],
  output addr_t                      target_o [ENTRIES]
);

  localparam int unsigned IW = $clog2(ENTRIES);

  logic  valid  [ENTRIES];
  addr_t br_adr [ENTRIES];
  addr_t tg_adr [ENTRIES];
  logic [IW-1:0] wptr;

  always_comb begin
    hit        = 1'b0;
    hit_idx    = '0;
    hit_target = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!hit && valid[i] && br_adr[i] == lookup_pc) begin
        hit        = 1'b1;
        hit_idx    = IW'(i);
        hit_target = tg_adr[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        valid[i]  <= 1'b0;
        br_adr[i] <= '0;
        tg_adr[i] <= '0;
      end
    end else if (alloc) begin
      valid[wptr]  <= 1'b1;
      br_adr[wptr] <= alloc_pc;
      tg_adr[wptr] <= alloc_target;
      wptr         <= (wptr == IW'(ENTRIES - 1)) ? '0 : wptr + 1'b1;
    end else if (retarget) begin
      tg_adr[upd_idx] <= upd_target;
    end
  end

  // Allocation and target rewrite are never requested together.
  a_one_write: assert property (@(posedge clk) disable iff (rst) !(alloc && retarget));

  assign alloc_idx = wptr;
  assign valid_o   = valid;
  assign branch_o  = br_adr;
  assign target_o  = tg_adr;

endmodule

// Pattern history: one two-bit predictor state machine per BTB entry.
//
// The entry at index rd_idx is read combinationally (prediction for the
// branch being looked up). On a clock edge, either the entry wr_idx is
// initialised from the first outcome of a newly allocated branch (init), or
// it is moved one step by the outcome of a branch that hit (update).
// The table is indexed exactly like the branch target buffer, so an entry's
// history belongs to the branch stored in the same BTB slot.
// One history per BTB entry follows the reference design's block diagram;
// the read/write port arrangement is this design's.
module pht
  import bpu_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [$clog2(ENTRIES)-1:0] rd_idx,
  output logic                       rd_taken,
  output pred_state_e                rd_state,
  input  logic                       init,
  input  logic                       update,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic                       taken,
  output pred_state_e                states [ENTRIES]
);

  logic pred [ENTRIES];

  for (genvar i = 0; i < ENTRIES; i++) begin : g_fsm
    twobit_fsm u_fsm (
      .clk          (clk),
      .rst          (rst),
      .init         (init   && (wr_idx == i)),
      .update       (update && (wr_idx == i)),
      .taken        (taken),
      .state        (states[i]),
      .predict_taken(pred[i])
    );
  end

  assign rd_taken = pred[rd_idx];
  assign rd_state = states[rd_idx];

endmodule

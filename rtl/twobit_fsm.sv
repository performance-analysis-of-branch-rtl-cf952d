// Two-bit dynamic branch predictor state machine.
//
// Four states: strongly not taken, weakly not taken, weakly taken, strongly
// taken. The prediction is "taken" in the two taken states. Each resolved
// taken outcome moves the state one step toward strongly taken and each
// not-taken outcome one step toward strongly not taken, saturating at both
// ends. When a branch is seen for the first time (init) the state is loaded
// with weakly taken if it was taken and weakly not taken otherwise, as the
// reference design describes.
//
// Interface: init and update are sampled on the rising clock edge, init has
// priority; taken gives the branch outcome for both. state/predict_taken are
// the registered current state (no combinational path from the inputs).
// Reset (synchronous, active high) puts the machine in weakly not taken,
// a choice of this design.
// The four states, the prediction rule and the first-outcome initialisation
// follow the reference design; the encoding and reset state are this design's.
module twobit_fsm
  import bpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        update,
  input  logic        taken,
  output pred_state_e state,
  output logic        predict_taken
);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= P_WNT;
    end else if (init) begin
      state <= taken ? P_WT : P_WNT;
    end else if (update) begin
      unique case (state)
        P_SNT: state <= taken ? P_WNT : P_SNT;
        P_WNT: state <= taken ? P_WT  : P_SNT;
        P_WT:  state <= taken ? P_ST  : P_WNT;
        P_ST:  state <= taken ? P_ST  : P_WT;
        default: state <= P_WNT;
      endcase
    end
  end

  assign predict_taken = (state == P_WT) || (state == P_ST);

endmodule

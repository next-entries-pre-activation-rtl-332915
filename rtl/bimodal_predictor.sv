// bimodal_predictor: next-state logic of the 2-bit direction predictor held in
// each BTB entry.
//
// Given the entry's current state and the resolved direction of the branch,
// it returns the new state, the new predicted direction and whether the
// predicted direction changed. The transitions are those of the predictor's
// state diagram: WT-T->ST, ST-T->ST, ST-NT->WT, WT-NT->SNT, WNT-T->ST,
// WNT-NT->SNT, SNT-NT->SNT, SNT-T->WNT. The weak states thus jump straight to
// the opposite strong state on a misprediction, so the predicted direction
// changes only on WT->SNT and WNT->ST; the one-direction NBET relies on that
// to know when its record must be rewritten.
//
// Purely combinational; no clock.
module bimodal_predictor
  import btb_pkg::*;
(
  input  pred_state_t state_i,    // current state
  input  logic        taken_i,    // resolved direction (1 = taken)
  output pred_state_t state_o,    // next state
  output logic        pred_o,     // predicted direction in the next state
  output logic        changed_o   // predicted direction differs from before
);

  always_comb begin
    unique case (state_i)
      ST:      state_o = taken_i ? ST  : WT;
      WT:      state_o = taken_i ? ST  : SNT;
      WNT:     state_o = taken_i ? ST  : SNT;
      SNT:     state_o = taken_i ? WNT : SNT;
      default: state_o = state_i;
    endcase
  end

  assign pred_o    = pred_dir(state_o);
  assign changed_o = pred_dir(state_o) != pred_dir(state_i);

endmodule

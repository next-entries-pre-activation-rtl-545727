// bimodal_counter: next-state logic of the 2-bit bimodal predictor kept in
// every BTB entry, and the "predicted direction changed" flag that the
// one-direction NBET uses to decide whether to record a new next location.
//
// Purely combinational. Transitions follow the document's state diagram: only
// WT -> SNT and WNT -> ST change the predicted direction, and those are the
// only updates after which the NBET field must be rewritten. The state
// encoding (top bit = predicted direction) is this design's own.
//
// Ports: state/taken in; next_state, pred_taken (direction predicted by the
// current state) and dir_changed out.
module bimodal_counter
  import btb_pkg::*;
(
  input  bp_state_t state,
  input  logic      taken,
  output bp_state_t next_state,
  output logic      pred_taken,
  output logic      dir_changed
);
  always_comb begin
    next_state  = bp_next(state, taken);
    pred_taken  = bp_pred(state);
    dir_changed = bp_pred(next_state) != bp_pred(state);
  end
endmodule

// btb_pkg: types and constants shared by the drowsy BTB blocks.
//
// The predictor states are the four states of the 2-bit direction predictor
// kept in every BTB entry (strongly/weakly taken, weakly/strongly not taken).
// A newly inserted branch starts in WT. The binary encoding is this design's
// own choice: the upper bit is the predicted direction.
package btb_pkg;

  typedef enum logic [1:0] {
    SNT = 2'b00,   // strongly not taken
    WNT = 2'b01,   // weakly not taken
    WT  = 2'b10,   // weakly taken
    ST  = 2'b11    // strongly taken
  } pred_state_t;

  // Predicted direction of a predictor state (1 = taken).
  function automatic logic pred_dir(pred_state_t s);
    return (s == WT) || (s == ST);
  endfunction

  // Power mode of one BTB/NBET row.
  typedef enum logic [1:0] {
    PM_ACTIVE = 2'b00,   // full supply, row accessible
    PM_DROWSY = 2'b01,   // low supply, data kept, no access
    PM_WAKING = 2'b10    // supply ramping back up, not yet accessible
  } pmode_t;

endpackage

// drowsy_btb: set-associative branch target buffer whose entries can be put
// into a drowsy (low-leakage, state-preserving) mode.
//
// Each entry holds a valid bit, the tag of the branch PC, the branch target
// and a 2-bit direction predictor. The PC is split, from the top, into
// tag | set index | instruction offset.
//
// Lookup (fetch stage, combinational): the set is selected by the index bits
// and the tags of all ways are compared; the way encoder turns the matches
// into a way number, giving the BTB location {set, way}. A match on an ACTIVE
// entry is a hit: lk_hit_o, the predicted direction and the target are
// returned in the same cycle and lk_idx_o names the entry. A match on an
// entry that is not ACTIVE raises lk_stall_o instead and wakes the entry on
// demand; fetch must hold the PC and retry, paying the wake-up latency. A
// tag mismatch is a plain miss and wakes nothing.
//
// Update (execute stage, written on the rising edge): a resolved branch
// already in the BTB gets its predictor advanced (and its target refreshed if
// taken); a taken branch not in the BTB is inserted in weakly-taken state,
// into the first invalid way of its set or else the way named by the set's
// round-robin pointer. A not-taken branch that is not present is ignored.
// upd_fire_o marks a write, upd_idx_o its location, upd_insert_o an insertion
// and upd_changed_o that the predicted direction changed (an insertion counts
// as a change). A write to a drowsy entry wakes it on demand; the write itself
// is not delayed (this design's choice: the execute-stage write is assumed to
// be buffered off the critical path).
//
// Power modes come from power_mode_ctrl: deact_i and preact_i (one line per
// entry, index = set * WAYS + way) feed it, active_o/drowsy_o report it, and
// touch_o marks entries accessed, woken or pre-activated this cycle for the
// decay counters. Lookup and update may address the same entry in one cycle;
// the lookup sees the contents before the update.
//
// Geometry (512 entries, 4 ways) follows the evaluated configuration; the
// 32-bit address, 4-byte instructions, full-width target and the
// round-robin replacement are this design's choices.
module drowsy_btb
  import btb_pkg::*;
#(
  parameter int unsigned SETS     = 128,
  parameter int unsigned WAYS     = 4,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned OFFSET_W = 2,
  parameter int unsigned WAKE_LAT = 1,
  localparam int unsigned ENTRIES = SETS * WAYS,
  localparam int unsigned SET_W   = $clog2(SETS),
  localparam int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned IDX_W   = $clog2(ENTRIES),
  localparam int unsigned TAG_W   = ADDR_W - SET_W - OFFSET_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup port
  input  logic               lk_en_i,
  input  logic [ADDR_W-1:0]  lk_pc_i,
  output logic               lk_hit_o,      // hit on an active entry
  output logic               lk_stall_o,    // hit on a sleeping entry: retry
  output logic               lk_taken_o,    // predicted direction
  output logic [ADDR_W-1:0]  lk_target_o,   // predicted target
  output logic [IDX_W-1:0]   lk_idx_o,      // BTB location {set, way}
  // update port
  input  logic               upd_valid_i,
  input  logic [ADDR_W-1:0]  upd_pc_i,
  input  logic               upd_taken_i,
  input  logic [ADDR_W-1:0]  upd_target_i,
  output logic               upd_fire_o,
  output logic               upd_insert_o,
  output logic               upd_changed_o,
  output logic [IDX_W-1:0]   upd_idx_o,
  // power management
  input  logic [ENTRIES-1:0] deact_i,
  input  logic [ENTRIES-1:0] preact_i,
  output logic [ENTRIES-1:0] active_o,
  output logic [ENTRIES-1:0] drowsy_o,
  output logic [ENTRIES-1:0] wake_start_o,
  output logic [ENTRIES-1:0] touch_o
);

  // ---------------------------------------------------------------- storage
  logic              valid  [ENTRIES];
  logic [TAG_W-1:0]  tag    [ENTRIES];
  logic [ADDR_W-1:0] target [ENTRIES];
  pred_state_t       pstate [ENTRIES];
  logic [WAY_W-1:0]  rr     [SETS];

  function automatic logic [IDX_W-1:0] loc(logic [SET_W-1:0] s, logic [WAY_W-1:0] w);
    return IDX_W'(s) * IDX_W'(WAYS) + IDX_W'(w);
  endfunction

  // ---------------------------------------------------------------- lookup
  logic [SET_W-1:0] lk_set;
  logic [TAG_W-1:0] lk_tag;
  logic [WAYS-1:0]  lk_match;
  logic             lk_any;
  logic [WAY_W-1:0] lk_way;

  assign lk_set = lk_pc_i[OFFSET_W +: SET_W];
  assign lk_tag = lk_pc_i[ADDR_W-1 -: TAG_W];

  always_comb begin
    for (int w = 0; w < int'(WAYS); w++)
      lk_match[w] = valid[loc(lk_set, WAY_W'(w))] && tag[loc(lk_set, WAY_W'(w))] == lk_tag;
  end

  way_encoder #(.WAYS(WAYS)) u_lk_enc (.match_i(lk_match), .hit_o(lk_any), .way_o(lk_way));

  assign lk_idx_o    = loc(lk_set, lk_way);
  assign lk_hit_o    = lk_en_i && lk_any && active_o[lk_idx_o];
  assign lk_stall_o  = lk_en_i && lk_any && !active_o[lk_idx_o];
  assign lk_taken_o  = lk_hit_o && pred_dir(pstate[lk_idx_o]);
  assign lk_target_o = target[lk_idx_o];

  // ---------------------------------------------------------------- update
  logic [SET_W-1:0] up_set;
  logic [TAG_W-1:0] up_tag;
  logic [WAYS-1:0]  up_match;
  logic             up_any;
  logic [WAY_W-1:0] up_way;
  logic [WAY_W-1:0] victim;
  logic             have_free;
  pred_state_t      next_state;
  logic             pred_changed;

  assign up_set = upd_pc_i[OFFSET_W +: SET_W];
  assign up_tag = upd_pc_i[ADDR_W-1 -: TAG_W];

  always_comb begin
    for (int w = 0; w < int'(WAYS); w++)
      up_match[w] = valid[loc(up_set, WAY_W'(w))] && tag[loc(up_set, WAY_W'(w))] == up_tag;
  end

  way_encoder #(.WAYS(WAYS)) u_up_enc (.match_i(up_match), .hit_o(up_any), .way_o(up_way));

  // victim: lowest invalid way, else the round-robin pointer
  always_comb begin
    have_free = 1'b0;
    victim    = rr[up_set];
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      if (!valid[loc(up_set, WAY_W'(w))]) begin
        have_free = 1'b1;
        victim    = WAY_W'(w);
      end
    end
  end

  bimodal_predictor u_pred (
    .state_i   (pstate[loc(up_set, up_way)]),
    .taken_i   (upd_taken_i),
    .state_o   (next_state),
    .pred_o    (),
    .changed_o (pred_changed)
  );

  assign upd_fire_o    = upd_valid_i && (up_any || upd_taken_i);
  assign upd_insert_o  = upd_valid_i && !up_any && upd_taken_i;
  assign upd_idx_o     = up_any ? loc(up_set, up_way) : loc(up_set, victim);
  assign upd_changed_o = upd_insert_o || (upd_fire_o && pred_changed);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) begin
        valid[i]  <= 1'b0;
        pstate[i] <= WT;
      end
      for (int s = 0; s < int'(SETS); s++) rr[s] <= '0;
    end else if (upd_fire_o) begin
      if (upd_insert_o) begin
        valid[upd_idx_o]  <= 1'b1;
        pstate[upd_idx_o] <= WT;
        if (!have_free) rr[up_set] <= (rr[up_set] == WAY_W'(WAYS - 1)) ? '0 : rr[up_set] + WAY_W'(1);
      end else begin
        pstate[upd_idx_o] <= next_state;
      end
    end
  end

  // tag and target payload (qualified by valid, no reset needed)
  always_ff @(posedge clk) begin
    if (upd_fire_o && upd_insert_o) tag[upd_idx_o] <= up_tag;
    if (upd_fire_o && upd_taken_i)  target[upd_idx_o] <= upd_target_i;
  end

  // ---------------------------------------------------------------- power
  logic [ENTRIES-1:0] wake_req;

  always_comb begin
    wake_req = '0;
    if (lk_stall_o) wake_req[lk_idx_o]  = 1'b1;
    if (upd_fire_o) wake_req[upd_idx_o] = 1'b1;
  end

  always_comb begin
    touch_o = wake_req | preact_i;
    if (lk_hit_o) touch_o[lk_idx_o] = 1'b1;
  end

  power_mode_ctrl #(.ENTRIES(ENTRIES), .WAKE_LAT(WAKE_LAT)) u_pm (
    .clk, .rst_n,
    .deact_i      (deact_i),
    .preact_i     (preact_i),
    .wake_i       (wake_req),
    .active_o     (active_o),
    .drowsy_o     (drowsy_o),
    .wake_start_o (wake_start_o)
  );

  // a tag occurs at most once per set
  a_one_match: assert property (@(posedge clk) disable iff (!rst_n) $countones(lk_match) <= 1)
    else $error("drowsy_btb: duplicate tag in set");

  initial begin
    assert (WAYS >= 2 && (WAYS & (WAYS - 1)) == 0 && (SETS & (SETS - 1)) == 0)
      else $error("drowsy_btb: SETS and WAYS must be powers of two, WAYS >= 2");
  end

endmodule

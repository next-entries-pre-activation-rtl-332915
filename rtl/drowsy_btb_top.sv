// drowsy_btb_top: drowsy branch target buffer with decay deactivation and
// next-BTB-entry pre-activation.
//
// Idea: most BTB rows sit unused for long stretches, so they can be held in a
// state-preserving low-supply (drowsy) mode. Waking a row costs a cycle, and a
// fetch that hits a sleeping row stalls. To hide that cost, a Next BTB Entry
// Table (NBET) remembers, for every branch in the BTB, where in the BTB the
// branch that follows it lives. When a branch hits in the BTB, its NBET row is
// read and the next branch's row is woken ahead of time, so rows can be put
// to sleep after a short idle time (the decay interval, 128 cycles).
//
// Blocks and wiring:
//   drowsy_btb        BTB storage, lookup, update and per-row power modes
//   location_register LR: location (+ DIR bit) of the last branch written
//   nbet_one_dir /    NBET write (from LR and the current update), lookup
//   nbet_two_dir      (from the BTB hit) and pre-activation registers
//   preact_circuit    decodes the pre-activation registers per row
//   decay_ctrl        global/local counters, deactivation per row
//   deact_gate        masks deactivation of the row held in LR
//
// ONE_DIR = 1 (default) selects the one-direction policy, which keeps one
// NBET field per row along the predicted direction and is the evaluated best
// configuration; ONE_DIR = 0 selects the two-direction policy (Taken and
// Non-taken fields, two pre-activation registers).
//
// Timing: lookup results are combinational in the cycle of the request;
// stall_o asks fetch to hold the PC. A hit in cycle t pre-activates the
// next row in cycle t+2, so it is ACTIVE from cycle t+3 with the default
// one-cycle wake-up. Updates take effect on the rising edge.
module drowsy_btb_top #(
  parameter bit          ONE_DIR         = 1'b1,
  parameter int unsigned SETS            = 128,
  parameter int unsigned WAYS            = 4,
  parameter int unsigned ADDR_W          = 32,
  parameter int unsigned OFFSET_W        = 2,
  parameter int unsigned WAKE_LAT        = 1,
  parameter int unsigned DECAY_INTERVAL  = 128,
  parameter int unsigned GLOBAL_INTERVAL = DECAY_INTERVAL / 4,
  localparam int unsigned ENTRIES = SETS * WAYS,
  localparam int unsigned SET_W   = $clog2(SETS),
  localparam int unsigned WAY_W   = $clog2(WAYS),
  localparam int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // fetch-stage lookup
  input  logic               lookup_en_i,
  input  logic [ADDR_W-1:0]  lookup_pc_i,
  output logic               hit_o,
  output logic               stall_o,
  output logic               pred_taken_o,
  output logic [ADDR_W-1:0]  target_o,
  // execute-stage update
  input  logic               upd_valid_i,
  input  logic [ADDR_W-1:0]  upd_pc_i,
  input  logic               upd_taken_i,
  input  logic [ADDR_W-1:0]  upd_target_i,
  // power status per BTB row (index = set * WAYS + way)
  output logic [ENTRIES-1:0] active_o,
  output logic [ENTRIES-1:0] drowsy_o,
  output logic [ENTRIES-1:0] preact_o,
  output logic [ENTRIES-1:0] deact_o,
  output logic [ENTRIES-1:0] wake_start_o
);

  localparam int unsigned NREG = ONE_DIR ? 1 : 2;

  logic [IDX_W-1:0]   lk_idx;
  logic               upd_fire, upd_insert, upd_changed;
  logic [IDX_W-1:0]   upd_idx;
  logic [ENTRIES-1:0] touch, decay_deact;
  logic               lr_valid, lr_dir;
  logic [SET_W-1:0]   lr_set;
  logic [WAY_W-1:0]   lr_way;
  logic [IDX_W-1:0]   lr_idx;
  logic [NREG-1:0]    pa_valid;
  logic [IDX_W-1:0]   pa_idx [NREG];

  drowsy_btb #(
    .SETS(SETS), .WAYS(WAYS), .ADDR_W(ADDR_W), .OFFSET_W(OFFSET_W), .WAKE_LAT(WAKE_LAT)
  ) u_btb (
    .clk, .rst_n,
    .lk_en_i       (lookup_en_i),
    .lk_pc_i       (lookup_pc_i),
    .lk_hit_o      (hit_o),
    .lk_stall_o    (stall_o),
    .lk_taken_o    (pred_taken_o),
    .lk_target_o   (target_o),
    .lk_idx_o      (lk_idx),
    .upd_valid_i   (upd_valid_i),
    .upd_pc_i      (upd_pc_i),
    .upd_taken_i   (upd_taken_i),
    .upd_target_i  (upd_target_i),
    .upd_fire_o    (upd_fire),
    .upd_insert_o  (upd_insert),
    .upd_changed_o (upd_changed),
    .upd_idx_o     (upd_idx),
    .deact_i       (deact_o),
    .preact_i      (preact_o),
    .active_o      (active_o),
    .drowsy_o      (drowsy_o),
    .wake_start_o  (wake_start_o),
    .touch_o       (touch)
  );

  location_register #(.SET_W(SET_W), .WAY_W(WAY_W), .ONE_DIR(ONE_DIR)) u_lr (
    .clk, .rst_n,
    .upd_fire_i    (upd_fire),
    .upd_set_i     (upd_idx[IDX_W-1 -: SET_W]),
    .upd_way_i     (upd_idx[WAY_W-1:0]),
    .upd_taken_i   (upd_taken_i),
    .upd_changed_i (upd_changed),
    .valid_o       (lr_valid),
    .set_o         (lr_set),
    .way_o         (lr_way),
    .dir_o         (lr_dir)
  );

  assign lr_idx = {lr_set, lr_way};

  if (ONE_DIR) begin : g_one
    nbet_one_dir #(.SETS(SETS), .WAYS(WAYS)) u_nbet (
      .clk, .rst_n,
      .upd_fire_i   (upd_fire),
      .upd_insert_i (upd_insert),
      .upd_idx_i    (upd_idx),
      .lr_valid_i   (lr_valid),
      .lr_idx_i     (lr_idx),
      .lr_change_i  (lr_dir),
      .lk_hit_i     (hit_o),
      .lk_idx_i     (lk_idx),
      .pa_valid_o   (pa_valid[0]),
      .pa_idx_o     (pa_idx[0])
    );
  end else begin : g_two
    nbet_two_dir #(.SETS(SETS), .WAYS(WAYS)) u_nbet (
      .clk, .rst_n,
      .upd_fire_i   (upd_fire),
      .upd_insert_i (upd_insert),
      .upd_idx_i    (upd_idx),
      .lr_valid_i   (lr_valid),
      .lr_idx_i     (lr_idx),
      .lr_dir_i     (lr_dir),
      .lk_hit_i     (hit_o),
      .lk_idx_i     (lk_idx),
      .pa_valid_o   (pa_valid),
      .pa_idx_o     (pa_idx)
    );
  end

  preact_circuit #(.ENTRIES(ENTRIES), .NREG(NREG)) u_preact (
    .pa_valid_i (pa_valid),
    .pa_idx_i   (pa_idx),
    .preact_o   (preact_o)
  );

  decay_ctrl #(
    .ENTRIES(ENTRIES), .DECAY_INTERVAL(DECAY_INTERVAL), .GLOBAL_INTERVAL(GLOBAL_INTERVAL)
  ) u_decay (
    .clk, .rst_n,
    .touch_i (touch),
    .tick_o  (),
    .deact_o (decay_deact)
  );

  deact_gate #(.ENTRIES(ENTRIES)) u_gate (
    .deact_i    (decay_deact),
    .lr_valid_i (lr_valid),
    .lr_idx_i   (lr_idx),
    .deact_o    (deact_o)
  );

endmodule

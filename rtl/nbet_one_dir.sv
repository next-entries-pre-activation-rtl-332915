// nbet_one_dir: Next BTB Entry Table for the one-direction pre-activation
// policy, with its write circuit, lookup circuit and one pre-activation
// register.
//
// One row per BTB entry, indexed by {set, way}, holding a valid bit and the
// BTB location of the next branch along the direction the branch predictor
// currently predicts for this branch. The row is written only when the
// location register's Change bit is set, that is when the previous branch was
// newly inserted (it starts weakly taken, so its taken path is recorded) or
// its predicted direction flipped (WT->SNT or WNT->ST); the branch that
// followed it was then reached along the new predicted path. A row is
// cleared when its BTB entry is reallocated to another branch; the clear wins
// over a write to the same row.
//
// Lookup: a BTB hit in cycle t is latched in the BTB location register; in
// cycle t+1 the row is read into the pre-activation register, which drives
// the pre-activation circuit in cycle t+2.
module nbet_one_dir #(
  parameter int unsigned SETS  = 128,
  parameter int unsigned WAYS  = 4,
  localparam int unsigned ENTRIES = SETS * WAYS,
  localparam int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // write side (execute stage)
  input  logic             upd_fire_i,    // a branch is written into the BTB
  input  logic             upd_insert_i,  // ... into a newly allocated entry
  input  logic [IDX_W-1:0] upd_idx_i,     // its BTB location {set, way}
  input  logic             lr_valid_i,    // location register
  input  logic [IDX_W-1:0] lr_idx_i,
  input  logic             lr_change_i,   // previous branch's prediction changed
  // lookup side (fetch stage)
  input  logic             lk_hit_i,
  input  logic [IDX_W-1:0] lk_idx_i,
  // pre-activation register
  output logic             pa_valid_o,
  output logic [IDX_W-1:0] pa_idx_o
);

  logic             rvalid [ENTRIES];
  logic [IDX_W-1:0] rloc   [ENTRIES];

  logic             blr_valid;
  logic [IDX_W-1:0] blr_idx;

  logic wr_en;
  assign wr_en = upd_fire_i && lr_valid_i && lr_change_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) rvalid[i] <= 1'b0;
    end else begin
      if (wr_en)                       rvalid[lr_idx_i]  <= 1'b1;
      if (upd_fire_i && upd_insert_i)  rvalid[upd_idx_i] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) rloc[lr_idx_i] <= upd_idx_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blr_valid  <= 1'b0;
      blr_idx    <= '0;
      pa_valid_o <= 1'b0;
      pa_idx_o   <= '0;
    end else begin
      blr_valid <= lk_hit_i;
      if (lk_hit_i) blr_idx <= lk_idx_i;
      pa_valid_o <= blr_valid && rvalid[blr_idx];
      pa_idx_o   <= rloc[blr_idx];
    end
  end

endmodule

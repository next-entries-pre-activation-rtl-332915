// nbet_two_dir: Next BTB Entry Table for the two-direction pre-activation
// policy, with its write circuit, lookup circuit and the two pre-activation
// registers.
//
// The table has one row per BTB entry, indexed by the BTB location
// {set, way}. A row has a Taken field and a Non-taken field, each a valid bit
// plus the BTB location of the branch that followed this one along that path.
//
// Write: when a branch is written into the BTB (upd_fire_i), the location
// register names the previous branch written (its row) and its direction
// (its field); the current branch's location is stored there. When the
// current branch was just inserted into a replaced BTB entry (upd_insert_i),
// the row of that entry is cleared, since it described the evicted branch;
// the clear wins if both hit the same row.
//
// Lookup: a BTB lookup hit in cycle t latches its location in the BTB
// location register. In cycle t+1 the row is read and its valid fields are
// loaded into the pre-activation registers, whose contents drive the
// pre-activation circuit in cycle t+2. Registers whose field is invalid, or
// that were not loaded by a hit, read as invalid.
//
// The row storage is reset to invalid; that is this design's choice.
module nbet_two_dir #(
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
  input  logic             lr_dir_i,      // 1 = previous branch was taken
  // lookup side (fetch stage)
  input  logic             lk_hit_i,      // BTB lookup hit this cycle
  input  logic [IDX_W-1:0] lk_idx_i,      // location of the hit entry
  // pre-activation registers: [0] Taken field, [1] Non-taken field
  output logic [1:0]       pa_valid_o,
  output logic [IDX_W-1:0] pa_idx_o [2]
);

  // field 0 = Taken, field 1 = Non-taken
  logic             fvalid [2][ENTRIES];
  logic [IDX_W-1:0] floc   [2][ENTRIES];

  logic             blr_valid;   // BTB location register
  logic [IDX_W-1:0] blr_idx;

  // demultiplexer: direction bit of LR selects the field to write
  logic fsel;
  assign fsel = lr_dir_i ? 1'b0 : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < 2; f++)
        for (int i = 0; i < int'(ENTRIES); i++) fvalid[f][i] <= 1'b0;
    end else begin
      if (upd_fire_i && lr_valid_i) begin
        fvalid[fsel][lr_idx_i] <= 1'b1;
      end
      if (upd_fire_i && upd_insert_i) begin
        fvalid[0][upd_idx_i] <= 1'b0;
        fvalid[1][upd_idx_i] <= 1'b0;
      end
    end
  end

  // location payload, no reset needed (qualified by the valid bits)
  always_ff @(posedge clk) begin
    if (upd_fire_i && lr_valid_i) floc[fsel][lr_idx_i] <= upd_idx_i;
  end

  // lookup: BTB location register, then the pre-activation registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blr_valid  <= 1'b0;
      blr_idx    <= '0;
      pa_valid_o <= '0;
      pa_idx_o[0] <= '0;
      pa_idx_o[1] <= '0;
    end else begin
      blr_valid <= lk_hit_i;
      if (lk_hit_i) blr_idx <= lk_idx_i;
      for (int f = 0; f < 2; f++) begin
        pa_valid_o[f] <= blr_valid && fvalid[f][blr_idx];
        pa_idx_o[f]   <= floc[f][blr_idx];
      end
    end
  end

endmodule

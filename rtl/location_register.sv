// location_register: the Location Register (LR) of the NBET write path.
//
// Every time a branch is written into the BTB in the execute stage (it was
// taken, or it was already present) the LR captures where that branch lives
// in the BTB (set from the index bits of its PC, way from the tag-match
// encoder or the replacement choice) and one DIR bit. The next BTB write uses
// the LR to find the NBET row of this branch and stores its own location
// there. With the two-direction policy (ONE_DIR = 0) DIR is the resolved
// direction and selects the Taken or Non-taken NBET field. With the
// one-direction policy (ONE_DIR = 1) DIR says whether the predicted direction
// of the branch changed (a new insertion counts as a change), and the NBET
// row is rewritten only if it did.
//
// Timing: loaded on the rising edge when upd_fire_i is high; valid_o is low
// from reset until the first load.
module location_register #(
  parameter int unsigned SET_W   = 7,
  parameter int unsigned WAY_W   = 2,
  parameter bit          ONE_DIR = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upd_fire_i,     // a branch is written into the BTB
  input  logic [SET_W-1:0] upd_set_i,      // its set
  input  logic [WAY_W-1:0] upd_way_i,      // its way
  input  logic             upd_taken_i,    // resolved direction
  input  logic             upd_changed_i,  // predicted direction changed / inserted
  output logic             valid_o,
  output logic [SET_W-1:0] set_o,
  output logic [WAY_W-1:0] way_o,
  output logic             dir_o           // Taken? (two-dir) or Change? (one-dir)
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      set_o   <= '0;
      way_o   <= '0;
      dir_o   <= 1'b0;
    end else if (upd_fire_i) begin
      valid_o <= 1'b1;
      set_o   <= upd_set_i;
      way_o   <= upd_way_i;
      dir_o   <= ONE_DIR ? upd_changed_i : upd_taken_i;
    end
  end

endmodule

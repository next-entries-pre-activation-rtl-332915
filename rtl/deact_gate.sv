// deact_gate: keeps the most recently updated BTB/NBET entry awake.
//
// The entry held in the location register (LR) is the NBET row that the next
// branch update will write. If execution stays in a long basic block the decay
// policy could put that row to sleep before the write arrives, so its
// deactivation is masked: the LR index is decoded to a one-hot vector and
// each deactivation output is deact_i[i] AND NOT sel[i] (the inverter/NOR
// arrangement of the original circuit). Purely combinational.
module deact_gate #(
  parameter int unsigned ENTRIES = 512,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic [ENTRIES-1:0] deact_i,     // deactivation from the decay policy
  input  logic               lr_valid_i,  // LR holds a location
  input  logic [IDX_W-1:0]   lr_idx_i,    // entry index {set, way} held in LR
  output logic [ENTRIES-1:0] deact_o      // deactivation to the drowsy BTB
);

  logic [ENTRIES-1:0] sel;

  always_comb begin
    sel = '0;
    if (lr_valid_i) sel[lr_idx_i] = 1'b1;
    deact_o = deact_i & ~sel;
  end

endmodule

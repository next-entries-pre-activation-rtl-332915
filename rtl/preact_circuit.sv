// preact_circuit: pre-activation circuit.
//
// Each pre-activation register holds a valid bit and the BTB entry index
// {set, way} read from the NBET. Every valid register is decoded to a
// one-hot vector and the vectors are ORed, giving one pre-activation line per
// BTB entry for the power mode controller. NREG = 2 for the two-direction
// policy (Taken and Non-taken fields), 1 for the one-direction policy.
// Purely combinational.
module preact_circuit #(
  parameter int unsigned ENTRIES = 512,
  parameter int unsigned NREG    = 2,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic [NREG-1:0]  pa_valid_i,         // pre-activation register valid
  input  logic [IDX_W-1:0] pa_idx_i [NREG],    // pre-activation register contents
  output logic [ENTRIES-1:0] preact_o          // pre-activation signal per entry
);

  always_comb begin
    preact_o = '0;
    for (int r = 0; r < int'(NREG); r++) begin
      if (pa_valid_i[r]) preact_o[pa_idx_i[r]] = 1'b1;
    end
  end

endmodule

// way_encoder: turns the per-way tag-match vector of one BTB set into the
// number of the matching way, which becomes the Way field of a BTB location.
//
// At most one way of a set holds a given tag, so the vector is one-hot or
// zero; hit_o tells which. If several bits were set the lowest way would win.
// Purely combinational.
module way_encoder #(
  parameter int unsigned WAYS  = 4,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0]  match_i,  // tag comparator outputs, one per way
  output logic             hit_o,    // some way matched
  output logic [WAY_W-1:0] way_o     // number of the matching way
);

  always_comb begin
    way_o = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (match_i[w]) way_o = WAY_W'(w);
    end
  end

  assign hit_o = |match_i;

endmodule

// selector: hardwired longest-match selector of the IFPLUT engine.
//
// It takes the N match lengths ML_1..ML_N produced by the partial lookup tables and
// produces N port-select signals PS_1..PS_N, one per egress port. It is built from N
// comparator slices (comp_slice), slice j driving PS_j. PS_j is true when ML_j exceeds all
// other match lengths, so for unicast routing at most one PS is true, and none when no
// PLUT matched.
//
// Interface: ml[N] in (index k holds the ML of the PLUT of port k+1), ps[N] out.
// Combinational; the engine registers its output.
module selector #(
  parameter int unsigned N    = 16,
  parameter int unsigned ML_W = 5
) (
  input  logic [N-1:0][ML_W-1:0] ml,
  output logic [N-1:0]           ps
);

  for (genvar j = 0; j < N; j++) begin : g_slice
    comp_slice #(.N(N), .ML_W(ML_W), .J(j)) u_comp (
      .ml (ml),
      .ps (ps[j])
    );
  end

endmodule

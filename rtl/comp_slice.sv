// comp_slice: one slice (Comp_j) of the hardwired longest-match selector.
//
// The slice owns egress port J. It compares ML_J with each of the other N-1 match lengths
// in a greater-than cell and ANDs the N-1 results: PS_J is 1 only when ML_J is strictly
// greater than every other ML. Because ML = 0 means "no match", PS_J is never set when
// no PLUT matched. Within a valid partitioned table two non-zero match lengths can never
// be equal, so at most one slice of the selector fires.
//
// Interface: ml[N] (all match lengths, index = port - 1) in, ps out. Combinational; the
// AND of N-1 terms is left to synthesis, which builds a log2(N)-deep tree.
module comp_slice #(
  parameter int unsigned N    = 16,
  parameter int unsigned ML_W = 5,
  parameter int unsigned J    = 0
) (
  input  logic [N-1:0][ML_W-1:0] ml,
  output logic                   ps
);

  logic [N-1:0] gt;   // gt[i]: ML_J > ML_i; the slice's own position is a constant 1

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      gt[i] = (i == J) ? 1'b1 : (ml[J] > ml[i]);
    end
  end

  assign ps = &gt;

endmodule

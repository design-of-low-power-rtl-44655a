// Set 1 of the comparison resolution module: N psi-type cells.
//
// Each cell compares one bit pair A_k, B_k and raises the termination flag
// D_k when the two bits differ, which tells Sets 2 and 4 that every bit of
// lower significance must be suppressed. Following the reduced-gate cell of
// the proposed comparator, each cell is built only from AND and NOT gates:
// it forms the two one-sided codes A_k & ~B_k (A bit greater) and
// ~A_k & B_k (B bit greater), and D_k is their union. At most one of the two
// codes is high, so the union is the XOR of the bits.
//
// Interface: a, b operands (N bits), d termination flags (N bits).
// Timing: purely combinational, one gate level plus the union.
module cmp_set1_psi #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] d
);

  logic [N-1:0] a_gt;  // A_k = 1, B_k = 0
  logic [N-1:0] b_gt;  // A_k = 0, B_k = 1

  always_comb begin
    a_gt = a & ~b;
    b_gt = ~a & b;
    d    = a_gt | b_gt;
  end

endmodule

// Set 2 of the comparison resolution module: one Sigma2-type cell per
// 4-bit partition.
//
// A Sigma2 cell is a NOR of the four termination flags of its partition, so
// its output is 1 ("continue") exactly when all four bit pairs of the
// partition are equal, and 0 ("terminate") when a decision can be taken
// inside the partition. Fan-in is four, as in the described structure.
//
// Interface: d termination flags from Set 1 (N bits, bit N-1 = MSB);
// peq one flag per partition, indexed by rank (0 = most significant
// partition). A short last partition (N not a multiple of 4) NORs fewer flags.
// Timing: purely combinational, one NOR level.
module cmp_set2_sigma
  import cmp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]           d,
  output logic [num_parts(N)-1:0] peq
);

  localparam int unsigned P = num_parts(N);

  always_comb begin
    logic [P-1:0] any_diff;
    any_diff = '0;
    for (int unsigned k = 0; k < N; k++) begin
      any_diff[part_of(N, k)] = any_diff[part_of(N, k)] | d[k];
    end
    peq = ~any_diff;
  end

endmodule

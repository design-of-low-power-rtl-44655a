// Set 4 of the comparison resolution module: N Omega-type cells.
//
// The Omega cell of bit k decides whether bit k is the first differing bit
// of the operands, which is the only bit allowed onto the buses. It ANDs
//   - the bit's own termination flag D_k (the bits differ),
//   - the Set 3 enable of the bit's partition (all more significant
//     partitions are equal),
//   - the inverted termination flags of the more significant bits of the
//     same partition.
// The fan-in therefore grows from two for a partition's MSB to five for its
// LSB, matching the described cell sizes. Its output drives the select input
// of the Set 5 multiplexer of the same bit.
//
// Interface: d termination flags (N bits), en partition enables (rank 0 =
// most significant partition), sel one select per bit.
// Timing: purely combinational, one AND level.
module cmp_set4_omega
  import cmp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]            d,
  input  logic [num_parts(N)-1:0] en,
  output logic [N-1:0]            sel
);

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      sel[k] = d[k] & en[part_of(N, k)];
      // more significant bits of the same partition sit at k+1 .. k+pos
      for (int unsigned j = 1; j <= pos_of(N, k); j++) begin
        sel[k] = sel[k] & ~d[k + j];
      end
    end
  end

endmodule

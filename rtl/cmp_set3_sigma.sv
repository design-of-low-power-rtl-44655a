// Set 3 of the comparison resolution module: Sigma3-type cells.
//
// Set 3 does no comparing of its own. It turns the partition-equal flags of
// Set 2 into one enable per partition, en[r] = 1 when every partition more
// significant than partition r is equal, so that Set 4 may let partition r
// drive the buses. To keep every cell at a fan-in of at most four it is built
// in two levels, as described for the structure:
//   level 1  inside each 16-bit cluster (four partitions), cells that AND the
//            flags of the first one, two, three and four partitions; the last
//            of them says the whole cluster is equal;
//   level 2  cells that combine the "cluster equal" results of all more
//            significant clusters, e.g. the fifth cell of a 32-bit comparator
//            joins the outcome of the 16 MSBs (fan-in two) with the local
//            prefix of the second cluster.
// The level-2 prefix is written as a plain AND over the clusters above; for
// widths up to 64 bits this is again a fan-in of at most four (a wider
// comparator would need a further level, which this RTL leaves to synthesis).
//
// At the default 8-bit width there are only two partitions, so the set
// reduces to en[0] = 1 and en[1] = peq[0]; both levels appear from 20 bits.
//
// Interface: peq per-partition equal flags (rank 0 = most significant),
// en per-partition enable, en[0] is always 1.
// Timing: purely combinational, two AND levels.
module cmp_set3_sigma
  import cmp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [num_parts(N)-1:0] peq,
  output logic [num_parts(N)-1:0] en
);

  localparam int unsigned P = num_parts(N);
  localparam int unsigned C = num_clusters(N);

  logic [P-1:0] local_pre;   // all partitions above r within r's cluster are equal
  logic [C-1:0] cluster_eq;  // every partition of the cluster is equal
  logic [C-1:0] cluster_pre; // every cluster above c is equal

  // Level 1: prefix AND inside each cluster.
  always_comb begin
    cluster_eq = '1;
    for (int unsigned r = 0; r < P; r++) begin
      local_pre[r] = 1'b1;
      for (int unsigned q = (r / CLUSTER_PARTS) * CLUSTER_PARTS; q < r; q++) begin
        local_pre[r] = local_pre[r] & peq[q];
      end
      cluster_eq[r / CLUSTER_PARTS] = cluster_eq[r / CLUSTER_PARTS] & peq[r];
    end
  end

  // Level 2: prefix AND across clusters, then join with the local prefix.
  always_comb begin
    for (int unsigned c = 0; c < C; c++) begin
      cluster_pre[c] = 1'b1;
      for (int unsigned q = 0; q < c; q++) begin
        cluster_pre[c] = cluster_pre[c] & cluster_eq[q];
      end
    end
    for (int unsigned r = 0; r < P; r++) begin
      en[r] = cluster_pre[r / CLUSTER_PARTS] & local_pre[r];
    end
  end

endmodule

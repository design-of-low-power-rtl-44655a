// Shared constants and types of the parallel-prefix magnitude comparator.
//
// Operand bits are numbered N-1 (MSB) down to 0 (LSB). The comparison tree
// cuts the operands into 4-bit partitions counted from the MSB end: partition
// rank 0 holds bits N-1..N-4, rank 1 the next four bits, and so on. When N is
// not a multiple of four the least significant partition is the short one
// (a choice of this design; the described configurations use 8 and 32 bits).
// Partitions are gathered four at a time into 16-bit clusters by Set 3.
//
// The decision code is the pair {Lb, Rb}: 00 equal, 10 A > B, 01 A < B;
// 11 cannot occur.
package cmp_pkg;

  // Width of one partition of the operands and of the decision OR network.
  localparam int unsigned PART_W = 4;
  // Partitions combined by one level of Set 3 (a 16-bit cluster).
  localparam int unsigned CLUSTER_PARTS = 4;

  typedef enum logic [1:0] {
    CMP_EQ = 2'b00,
    CMP_LT = 2'b01,
    CMP_GT = 2'b10
  } cmp_code_e;

  // Number of 4-bit partitions of an n-bit operand.
  function automatic int unsigned num_parts(input int unsigned n);
    return (n + PART_W - 1) / PART_W;
  endfunction

  // Number of 16-bit clusters of an n-bit operand.
  function automatic int unsigned num_clusters(input int unsigned n);
    return (num_parts(n) + CLUSTER_PARTS - 1) / CLUSTER_PARTS;
  endfunction

  // Partition rank (0 = most significant partition) of bit k of an n-bit operand.
  function automatic int unsigned part_of(input int unsigned n, input int unsigned k);
    return (n - 1 - k) / PART_W;
  endfunction

  // Position of bit k inside its partition, 0 being the partition's MSB.
  function automatic int unsigned pos_of(input int unsigned n, input int unsigned k);
    return (n - 1 - k) % PART_W;
  endfunction

endpackage

// Parallel-prefix magnitude comparator (top level).
//
// Compares two N-bit unsigned operands A and B and reports A > B, A < B or
// A = B. The comparison resolution module finds the most significant
// differing bit with a parallel-prefix tree of small cells and marks it on a
// left bus (A bit is 1) or a right bus (B bit is 1); all other bus bits stay
// 0, which keeps switching low. The decision module ORs each bus down to one
// bit, giving the code {Lb, Rb}. The default width is the 8-bit proposed
// configuration; the structure scales to any width (32 bits is the other
// size described) with cell fan-in bounded by five.
//
// Interface: a, b operands; left_bus, right_bus the encoded partial results;
// lb, rb the decision bits; code {lb, rb}; a_gt_b, a_lt_b, a_eq_b.
// Timing: purely combinational, no clock or reset; results settle one
// propagation delay after the operands change.
module prefix_comparator
  import cmp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] left_bus,
  output logic [N-1:0] right_bus,
  output logic         lb,
  output logic         rb,
  output cmp_code_e    code,
  output logic         a_gt_b,
  output logic         a_lt_b,
  output logic         a_eq_b
);

  cmp_resolution #(.N(N)) u_resolution (
    .a        (a),
    .b        (b),
    .left_bus (left_bus),
    .right_bus(right_bus)
  );

  cmp_decision #(.N(N)) u_decision (
    .left_bus (left_bus),
    .right_bus(right_bus),
    .lb       (lb),
    .rb       (rb),
    .code     (code),
    .a_gt_b   (a_gt_b),
    .a_lt_b   (a_lt_b),
    .a_eq_b   (a_eq_b)
  );

endmodule

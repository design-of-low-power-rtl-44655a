// Decision module of the parallel-prefix comparator.
//
// ORs all bits of the left bus into Lb and all bits of the right bus into Rb.
// Each OR is a NOR-NAND network: the bus is cut into 4-bit groups, each
// group is NORed (fan-in four), and the group results are NANDed. The pair
// {Lb, Rb} is the comparison result: 00 A = B, 10 A > B, 01 A < B; 11 cannot
// occur because the resolution module never drives both buses. The decoded
// flags a_gt_b, a_lt_b, a_eq_b are the three outputs of a magnitude
// comparator; the decode is this design's addition for convenience.
//
// Interface: left_bus, right_bus (N bits); lb, rb; code {lb, rb} as
// cmp_code_e; a_gt_b, a_lt_b, a_eq_b.
// Timing: purely combinational, a NOR level and a NAND level (the NAND has
// N/4 inputs).
module cmp_decision
  import cmp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] left_bus,
  input  logic [N-1:0] right_bus,
  output logic         lb,
  output logic         rb,
  output cmp_code_e    code,
  output logic         a_gt_b,
  output logic         a_lt_b,
  output logic         a_eq_b
);

  localparam int unsigned P = num_parts(N);

  logic [P-1:0] left_nor;   // NOR of one 4-bit group of the left bus
  logic [P-1:0] right_nor;  // NOR of one 4-bit group of the right bus

  always_comb begin
    logic [P-1:0] left_or;
    logic [P-1:0] right_or;
    left_or  = '0;
    right_or = '0;
    for (int unsigned k = 0; k < N; k++) begin
      left_or[part_of(N, k)]  = left_or[part_of(N, k)]  | left_bus[k];
      right_or[part_of(N, k)] = right_or[part_of(N, k)] | right_bus[k];
    end
    left_nor  = ~left_or;
    right_nor = ~right_or;
    lb = ~(&left_nor);
    rb = ~(&right_nor);
    code   = cmp_code_e'({lb, rb});
    a_gt_b = lb & ~rb;
    a_lt_b = rb & ~lb;
    a_eq_b = ~lb & ~rb;
  end

  always_comb begin
    assert (!(lb && rb)) else $error("decision code 11 is not possible");
  end

endmodule

// Comparison resolution module of the parallel-prefix comparator.
//
// Scans the operands from MSB to LSB in parallel rather than rippling, and
// encodes the outcome on two N-bit buses:
//   left_k = 1, right_k = 0   A_k > B_k and every more significant bit is equal
//   left_k = 0, right_k = 1   A_k < B_k and every more significant bit is equal
//   left_k = 0, right_k = 0   otherwise
// so each bus carries at most one high bit, at the first differing position.
// It is the chain of five cell sets:
//   Set 1 (psi)    per-bit termination flags D_k = A_k != B_k
//   Set 2 (Sigma2) per 4-bit partition: NOR of its flags (partition equal)
//   Set 3 (Sigma3) per partition: all more significant partitions equal
//   Set 4 (Omega)  per bit: first differing bit, used as mux select
//   Set 5 (phi)    per bit: select (A_k, B_k) or 00 onto the buses
// Set 1 feeds both Set 2 and Set 4.
//
// Interface: a, b operands (N bits, bit N-1 = MSB); left_bus, right_bus.
// Timing: purely combinational; the depth is set by Sets 1-5 and grows only
// through the Set 3 levels as N grows.
module cmp_resolution
  import cmp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] left_bus,
  output logic [N-1:0] right_bus
);

  localparam int unsigned P = num_parts(N);

  logic [N-1:0] d;    // Set 1 termination flags
  logic [P-1:0] peq;  // Set 2 partition-equal flags
  logic [P-1:0] en;   // Set 3 partition enables
  logic [N-1:0] sel;  // Set 4 multiplexer selects

  cmp_set1_psi   #(.N(N)) u_set1 (.a(a), .b(b), .d(d));
  cmp_set2_sigma #(.N(N)) u_set2 (.d(d), .peq(peq));
  cmp_set3_sigma #(.N(N)) u_set3 (.peq(peq), .en(en));
  cmp_set4_omega #(.N(N)) u_set4 (.d(d), .en(en), .sel(sel));
  cmp_set5_phi   #(.N(N)) u_set5 (.a(a), .b(b), .sel(sel),
                                  .left_bus(left_bus), .right_bus(right_bus));

  // Bus rules: never more than one high bit on a bus, never on both.
  always_comb begin
    assert ($onehot0(left_bus))  else $error("left bus has more than one high bit");
    assert ($onehot0(right_bus)) else $error("right bus has more than one high bit");
    assert ($onehot0(left_bus | right_bus)) else $error("both buses are high");
  end

endmodule

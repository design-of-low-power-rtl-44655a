// Set 5 of the comparison resolution module: N phi-type cells.
//
// Each phi cell is a two-input, 2-bit-wide multiplexer. With its select from
// Set 4 high it passes the bit pair (A_k, B_k) onto the left bus and the
// right bus; otherwise it drives the hard-wired code 00. Because the select
// is high only for the first differing bit, the pair passed is always 10
// (A greater) or 01 (B greater), and at most one bit of each bus is high.
//
// Interface: a, b operands, sel selects from Set 4, left_bus and right_bus
// (N bits each, bit N-1 = MSB).
// Timing: purely combinational, one multiplexer level.
module cmp_set5_phi #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] sel,
  output logic [N-1:0] left_bus,
  output logic [N-1:0] right_bus
);

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      {left_bus[k], right_bus[k]} = sel[k] ? {a[k], b[k]} : 2'b00;
    end
  end

endmodule

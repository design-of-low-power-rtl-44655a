// End-to-end self-checking testbench of the parallel-prefix comparator.
//
// Four instances run side by side on their own operands:
//   N = 4   the worked 4-bit example (A = 1000, B = 0101 gives A > B, with
//           only the MSB set on the left bus), then all 4-bit pairs;
//   N = 8   the default width, every operand pair;
//   N = 32  random pairs, pairs differing first at each bit, equal pairs;
//   N = 64  the same at 64 bits (four 16-bit clusters in Set 3).
// Each result is checked against the reference model: both buses, Lb, Rb,
// the code and the decoded flags. The testbench also counts how often each
// mechanism of the structure was used and fails if one never was:
// each outcome (>, <, =), termination inside every partition rank, every
// Omega fan-in (first difference at each position within a partition), and
// in the 32 and 64-bit comparators a first difference below the first
// 16-bit cluster (the second Set 3 level).
module tb_prefix_comparator;
  import cmp_pkg::*;
  import cmp_ref_pkg::*;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_gt = 0, n_lt = 0, n_eq = 0;
  int n_rank[16];
  int n_pos[4];
  int n_cluster2 = 0;

  logic [3:0]  a4,  b4,  l4,  r4;
  logic [7:0]  a8,  b8,  l8,  r8;
  logic [31:0] a32, b32, l32, r32;
  logic [63:0] a64, b64, l64, r64;
  logic lb4, rb4, gt4, lt4, eq4, lb8, rb8, gt8, lt8, eq8;
  logic lb32, rb32, gt32, lt32, eq32, lb64, rb64, gt64, lt64, eq64;
  cmp_code_e c4, c8, c32, c64;

  prefix_comparator #(.N(4)) dut4 (.a(a4), .b(b4), .left_bus(l4), .right_bus(r4),
    .lb(lb4), .rb(rb4), .code(c4), .a_gt_b(gt4), .a_lt_b(lt4), .a_eq_b(eq4));
  prefix_comparator #(.N(8)) dut8 (.a(a8), .b(b8), .left_bus(l8), .right_bus(r8),
    .lb(lb8), .rb(rb8), .code(c8), .a_gt_b(gt8), .a_lt_b(lt8), .a_eq_b(eq8));
  prefix_comparator #(.N(32)) dut32 (.a(a32), .b(b32), .left_bus(l32), .right_bus(r32),
    .lb(lb32), .rb(rb32), .code(c32), .a_gt_b(gt32), .a_lt_b(lt32), .a_eq_b(eq32));
  prefix_comparator #(.N(64)) dut64 (.a(a64), .b(b64), .left_bus(l64), .right_bus(r64),
    .lb(lb64), .rb(rb64), .code(c64), .a_gt_b(gt64), .a_lt_b(lt64), .a_eq_b(eq64));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int unsigned n, input word_t a, input word_t b,
                       input word_t gl, input word_t gr, input logic lb, input logic rb,
                       input cmp_code_e c, input logic gt, input logic lt, input logic eq);
    int k;
    logic egt, elt;
    k = first_diff(a, b, n);
    egt = (k >= 0) && a[k];
    elt = (k >= 0) && b[k];
    checks++;
    if (gl !== exp_left(a, b, n) || gr !== exp_right(a, b, n) || lb !== egt || rb !== elt ||
        c !== cmp_code_e'({egt, elt}) || gt !== egt || lt !== elt || eq !== (k < 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h left=%h right=%h lb=%b rb=%b gt=%b lt=%b eq=%b",
                 what, a, b, gl, gr, lb, rb, gt, lt, eq);
    end
    // mechanism coverage
    if (k < 0) n_eq++;
    else begin
      if (egt) n_gt++; else n_lt++;
      n_rank[(int'(n) - 1 - k) / 4]++;
      n_pos[(int'(n) - 1 - k) % 4]++;
      if (n >= 32 && (int'(n) - 1 - k) >= 16) n_cluster2++;
    end
  endtask

  // b equal to a above bit k, different at bit k, random below
  function automatic word_t diff_at(input word_t a, input int k);
    word_t low;
    low = (word_t'(1) << k) - 1;
    return a ^ (word_t'(1) << k) ^ (rand_word(64) & low);
  endfunction

  initial begin
    foreach (n_rank[i]) n_rank[i] = 0;
    foreach (n_pos[i]) n_pos[i] = 0;

    // worked 4-bit example
    a4 = 4'b1000; b4 = 4'b0101; #1;
    checks++;
    if (l4 !== 4'b1000 || r4 !== 4'b0000 || {lb4, rb4} !== 2'b10 || c4 !== CMP_GT || !gt4) begin
      failures++;
      $display("FAIL 4-bit example: left=%b right=%b LbRb=%b%b", l4, r4, lb4, rb4);
    end
    for (int i = 0; i < 256; i++) begin
      a4 = 4'(i); b4 = 4'(i >> 4); #1;
      check("N=4", 4, word_t'(a4), word_t'(b4), word_t'(l4), word_t'(r4), lb4, rb4, c4, gt4, lt4, eq4);
    end

    for (int i = 0; i < 65536; i++) begin
      a8 = 8'(i); b8 = 8'(i >> 8); #1;
      check("N=8", 8, word_t'(a8), word_t'(b8), word_t'(l8), word_t'(r8), lb8, rb8, c8, gt8, lt8, eq8);
    end

    for (int i = 0; i < 4000; i++) begin
      a32 = $urandom;
      case (i % 3)
        0: b32 = $urandom;
        1: b32 = 32'(diff_at(word_t'(a32), i % 32));
        default: b32 = (i % 9 == 2) ? a32 : 32'(diff_at(word_t'(a32), 31 - (i % 32)));
      endcase
      #1;
      check("N=32", 32, word_t'(a32), word_t'(b32), word_t'(l32), word_t'(r32), lb32, rb32, c32, gt32, lt32, eq32);
    end

    for (int i = 0; i < 4000; i++) begin
      a64 = rand_word(64);
      case (i % 3)
        0: b64 = rand_word(64);
        1: b64 = diff_at(a64, i % 64);
        default: b64 = (i % 9 == 2) ? a64 : diff_at(a64, 63 - (i % 64));
      endcase
      #1;
      check("N=64", 64, a64, b64, l64, r64, lb64, rb64, c64, gt64, lt64, eq64);
    end

    $display("outcomes: gt=%0d lt=%0d eq=%0d", n_gt, n_lt, n_eq);
    $display("first difference in second or later 16-bit cluster: %0d", n_cluster2);
    for (int p = 0; p < 4; p++) $display("first difference at partition position %0d (Omega fan-in %0d): %0d", p, p + 2, n_pos[p]);
    for (int r = 0; r < 16; r++) $display("first difference in partition rank %0d: %0d", r, n_rank[r]);
    checks++; if (n_gt == 0) begin failures++; $display("FAIL: A > B never seen"); end
    checks++; if (n_lt == 0) begin failures++; $display("FAIL: A < B never seen"); end
    checks++; if (n_eq == 0) begin failures++; $display("FAIL: A = B never seen"); end
    checks++; if (n_cluster2 == 0) begin failures++; $display("FAIL: second Set 3 level never used"); end
    for (int p = 0; p < 4; p++) begin
      checks++; if (n_pos[p] == 0) begin failures++; $display("FAIL: position %0d never first", p); end
    end
    for (int r = 0; r < 16; r++) begin
      checks++; if (n_rank[r] == 0) begin failures++; $display("FAIL: rank %0d never first", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

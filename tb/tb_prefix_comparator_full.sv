// Full-size self-checking testbench of the parallel-prefix comparator at its
// default width (8 bits, no parameter override). Every one of the 65,536
// operand pairs is applied and the buses, Lb, Rb, the code and the decoded
// flags are checked against the reference model. Each outcome (>, <, =) and
// a first difference at each of the eight bit positions must occur.
module tb_prefix_comparator_full;
  import cmp_pkg::*;
  import cmp_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_gt = 0, n_lt = 0, n_eq = 0;
  int n_bit[8];

  logic [7:0] a, b, lbus, rbus;
  logic lb, rb, gt, lt, eq;
  cmp_code_e code;

  prefix_comparator dut (.a(a), .b(b), .left_bus(lbus), .right_bus(rbus),
    .lb(lb), .rb(rb), .code(code), .a_gt_b(gt), .a_lt_b(lt), .a_eq_b(eq));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_bit[i]) n_bit[i] = 0;
    for (int i = 0; i < 65536; i++) begin
      int k;
      logic egt, elt;
      a = 8'(i); b = 8'(i >> 8); #1;
      k = first_diff(word_t'(a), word_t'(b), 8);
      egt = (k >= 0) && a[k];
      elt = (k >= 0) && b[k];
      if (k < 0) n_eq++; else begin n_bit[k]++; if (egt) n_gt++; else n_lt++; end
      checks++;
      if (word_t'(lbus) !== exp_left(word_t'(a), word_t'(b), 8) ||
          word_t'(rbus) !== exp_right(word_t'(a), word_t'(b), 8) ||
          lb !== egt || rb !== elt || code !== cmp_code_e'({egt, elt}) ||
          gt !== egt || lt !== elt || eq !== (k < 0)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h left=%h right=%h lb=%b rb=%b", a, b, lbus, rbus, lb, rb);
      end
    end
    $display("outcomes: gt=%0d lt=%0d eq=%0d", n_gt, n_lt, n_eq);
    checks++; if (n_gt == 0 || n_lt == 0 || n_eq == 0) begin failures++; $display("FAIL: an outcome never seen"); end
    for (int k = 0; k < 8; k++) begin
      checks++; if (n_bit[k] == 0) begin failures++; $display("FAIL: bit %0d never first", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

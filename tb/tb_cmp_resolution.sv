// Self-checking testbench of the comparison resolution module (Sets 1-5).
// Checks the left and right buses against the reference model for every
// 8-bit operand pair, for random and near-equal 32-bit pairs, and for a
// 13-bit width whose last partition is short.
module tb_cmp_resolution;
  import cmp_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  a8,  b8,  l8,  r8;
  logic [31:0] a32, b32, l32, r32;
  logic [12:0] a13, b13, l13, r13;

  cmp_resolution           dut8  (.a(a8),  .b(b8),  .left_bus(l8),  .right_bus(r8));
  cmp_resolution #(.N(32)) dut32 (.a(a32), .b(b32), .left_bus(l32), .right_bus(r32));
  cmp_resolution #(.N(13)) dut13 (.a(a13), .b(b13), .left_bus(l13), .right_bus(r13));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input word_t a, input word_t b, input int unsigned n,
                       input word_t gl, input word_t gr);
    checks++;
    if (gl !== exp_left(a, b, n) || gr !== exp_right(a, b, n)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h left=%h right=%h exp %h %h", what, a, b, gl, gr,
                 exp_left(a, b, n), exp_right(a, b, n));
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        check("N=8", word_t'(a8), word_t'(b8), 8, word_t'(l8), word_t'(r8));
      end
    end
    for (int i = 0; i < 5000; i++) begin
      a32 = $urandom;
      // half the pairs differ only from a chosen bit down, so every
      // partition and both clusters see the first difference
      b32 = (i % 2 == 0) ? $urandom : a32 ^ ((32'd1 << (i % 32)) | ($urandom & ((32'd1 << (i % 32)) - 1)));
      if (i % 97 == 0) b32 = a32;
      #1;
      check("N=32", word_t'(a32), word_t'(b32), 32, word_t'(l32), word_t'(r32));
    end
    for (int i = 0; i < 3000; i++) begin
      a13 = 13'($urandom);
      b13 = a13 ^ 13'((32'd1 << (i % 13)) | ($urandom & ((32'd1 << (i % 13)) - 1)));
      #1;
      check("N=13", word_t'(a13), word_t'(b13), 13, word_t'(l13), word_t'(r13));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

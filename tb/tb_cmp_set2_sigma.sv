// Self-checking testbench of Set 2 (Sigma2 cells).
// Drives all 8-bit flag patterns, random 32-bit patterns and a 10-bit width
// with a short last partition; a partition's output must be 1 exactly when
// none of its termination flags is set. Partition rank 0 is the MSB end.
module tb_cmp_set2_sigma;
  int checks = 0, failures = 0;

  logic [7:0]  d8;   logic [1:0] p8;
  logic [31:0] d32;  logic [7:0] p32;
  logic [9:0]  d10;  logic [2:0] p10;

  cmp_set2_sigma           dut8  (.d(d8),  .peq(p8));
  cmp_set2_sigma #(.N(32)) dut32 (.d(d32), .peq(p32));
  cmp_set2_sigma #(.N(10)) dut10 (.d(d10), .peq(p10));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      d8 = 8'(i);
      #1;
      check("N=8 rank0", p8[0], d8[7:4] == 4'h0);
      check("N=8 rank1", p8[1], d8[3:0] == 4'h0);
    end
    for (int i = 0; i < 3000; i++) begin
      // sparse patterns so that equal partitions are common
      d32 = $urandom & $urandom & $urandom & $urandom;
      #1;
      for (int r = 0; r < 8; r++) check("N=32", p32[r], d32[31 - 4*r -: 4] == 4'h0);
    end
    for (int i = 0; i < 1024; i++) begin
      d10 = 10'(i);
      #1;
      check("N=10 rank0", p10[0], d10[9:6] == 4'h0);
      check("N=10 rank1", p10[1], d10[5:2] == 4'h0);
      check("N=10 rank2", p10[2], d10[1:0] == 2'h0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

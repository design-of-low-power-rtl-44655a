// Self-checking testbench of Set 3 (Sigma3 cells).
// Drives every pattern of partition-equal flags for 8, 32 and 64-bit
// comparators (2, 8 and 16 partitions). The enable of partition r must be 1
// exactly when every partition of lower rank (more significant) is equal;
// 32 and 64 bits exercise the second level across 16-bit clusters.
module tb_cmp_set3_sigma;
  int checks = 0, failures = 0;

  logic [1:0]  q8,  e8;
  logic [7:0]  q32, e32;
  logic [15:0] q64, e64;

  cmp_set3_sigma           dut8  (.peq(q8),  .en(e8));
  cmp_set3_sigma #(.N(32)) dut32 (.peq(q32), .en(e32));
  cmp_set3_sigma #(.N(64)) dut64 (.peq(q64), .en(e64));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: mask of ranks below r, all of them set in q
  function automatic logic [15:0] ref_en(input logic [15:0] q, input int p);
    logic [15:0] e;
    for (int r = 0; r < p; r++) begin
      logic [15:0] m;
      m = (16'd1 << r) - 16'd1;
      e[r] = ((q & m) == m);
    end
    for (int r = p; r < 16; r++) e[r] = 1'b0;
    return e;
  endfunction

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      q8 = 2'(i); #1;
      check("N=8", 16'(e8), ref_en(16'(q8), 2));
    end
    for (int i = 0; i < 256; i++) begin
      q32 = 8'(i); #1;
      check("N=32", 16'(e32), ref_en(16'(q32), 8));
    end
    for (int i = 0; i < 65536; i++) begin
      q64 = 16'(i); #1;
      check("N=64", e64, ref_en(q64, 16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

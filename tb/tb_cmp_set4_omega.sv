// Self-checking testbench of Set 4 (Omega cells).
// For every flag pattern of an 8-bit comparator and every pair of partition
// enables, and for random 32-bit patterns, the select of bit k must be 1
// exactly when bit k is the most significant set flag of its 4-bit partition
// and the partition is enabled.
module tb_cmp_set4_omega;
  int checks = 0, failures = 0;

  logic [7:0]  d8,  s8;  logic [1:0] e8;
  logic [31:0] d32, s32; logic [7:0] e32;

  cmp_set4_omega           dut8  (.d(d8),  .en(e8),  .sel(s8));
  cmp_set4_omega #(.N(32)) dut32 (.d(d32), .en(e32), .sel(s32));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: leading one of each 4-bit slice, gated by its enable
  function automatic logic [31:0] ref_sel(input logic [31:0] d, input logic [7:0] en, input int n);
    logic [31:0] s;
    s = '0;
    for (int r = 0; r < n / 4; r++) begin
      int top;
      top = n - 1 - 4 * r;
      if (en[r]) begin
        for (int k = top; k > top - 4; k--) begin
          if (d[k]) begin
            s[k] = 1'b1;
            break;
          end
        end
      end
    end
    return s;
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 4; j++) begin
        d8 = 8'(i); e8 = 2'(j); #1;
        check("N=8", 32'(s8), ref_sel(32'(d8), 8'(e8), 8));
      end
    end
    for (int i = 0; i < 4000; i++) begin
      d32 = $urandom & $urandom; e32 = 8'($urandom); #1;
      check("N=32", s32, ref_sel(d32, e32, 32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

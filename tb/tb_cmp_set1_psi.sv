// Self-checking testbench of Set 1 (psi cells).
// Drives every 8-bit operand pair and random 32-bit pairs, and checks the
// termination flag D_k = 1 exactly where the operand bits differ.
module tb_cmp_set1_psi;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, d8;
  logic [31:0] a32, b32, d32;

  cmp_set1_psi            dut8  (.a(a8),  .b(b8),  .d(d8));
  cmp_set1_psi #(.N(32))  dut32 (.a(a32), .b(b32), .d(d32));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (d8[k] != (a8[k] != b8[k])) begin
            failures++;
            if (failures < 10) $display("FAIL N=8 a=%h b=%h bit %0d d=%b", a8, b8, k, d8[k]);
          end
        end
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a32 = $urandom; b32 = (i % 2 == 0) ? $urandom : a32 ^ (32'd1 << (i % 32));
      #1;
      checks++;
      if (d32 != (a32 ^ b32)) begin
        failures++;
        if (failures < 10) $display("FAIL N=32 a=%h b=%h d=%h", a32, b32, d32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

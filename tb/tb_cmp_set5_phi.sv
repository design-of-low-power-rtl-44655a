// Self-checking testbench of Set 5 (phi cells).
// Drives every 8-bit operand pair with random selects: bit k of the left and
// right bus must be (A_k, B_k) when selected and 00 otherwise.
module tb_cmp_set5_phi;
  int checks = 0, failures = 0;

  logic [7:0] a, b, sel, lbus, rbus;

  cmp_set5_phi dut (.a(a), .b(b), .sel(sel), .left_bus(lbus), .right_bus(rbus));

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
        a = 8'(i); b = 8'(j); sel = 8'($urandom);
        #1;
        checks++;
        if (lbus !== (a & sel) || rbus !== (b & sel)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h sel=%h left=%h right=%h", a, b, sel, lbus, rbus);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

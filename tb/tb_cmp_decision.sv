// Self-checking testbench of the decision module.
// Drives every legal bus state of an 8-bit and a 32-bit comparator (both
// buses zero, or one high bit on exactly one bus) and checks Lb, Rb, the
// code and the three decoded flags.
module tb_cmp_decision;
  import cmp_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  l8,  r8;
  logic [31:0] l32, r32;
  logic lb8, rb8, gt8, lt8, eq8, lb32, rb32, gt32, lt32, eq32;
  cmp_code_e c8, c32;

  cmp_decision dut8 (.left_bus(l8), .right_bus(r8), .lb(lb8), .rb(rb8), .code(c8),
                     .a_gt_b(gt8), .a_lt_b(lt8), .a_eq_b(eq8));
  cmp_decision #(.N(32)) dut32 (.left_bus(l32), .right_bus(r32), .lb(lb32), .rb(rb32), .code(c32),
                                .a_gt_b(gt32), .a_lt_b(lt32), .a_eq_b(eq32));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // which: 0 none, 1 left bus, 2 right bus
  task automatic check(input string what, input int which,
                       input logic lb, input logic rb, input cmp_code_e c,
                       input logic gt, input logic lt, input logic eq);
    logic [1:0] exp;
    exp = (which == 1) ? 2'b10 : (which == 2) ? 2'b01 : 2'b00;
    checks++;
    if ({lb, rb} !== exp || c !== cmp_code_e'(exp) || gt !== (which == 1) ||
        lt !== (which == 2) || eq !== (which == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s which=%0d lb=%b rb=%b gt=%b lt=%b eq=%b",
                                  what, which, lb, rb, gt, lt, eq);
    end
  endtask

  initial begin
    for (int which = 0; which < 3; which++) begin
      for (int k = 0; k < 32; k++) begin
        l8  = (which == 1 && k < 8) ? 8'd1 << k : 8'd0;
        r8  = (which == 2 && k < 8) ? 8'd1 << k : 8'd0;
        l32 = (which == 1) ? 32'd1 << k : 32'd0;
        r32 = (which == 2) ? 32'd1 << k : 32'd0;
        #1;
        if (k < 8 || which == 0) check("N=8", (k < 8) ? which : 0, lb8, rb8, c8, gt8, lt8, eq8);
        check("N=32", which, lb32, rb32, c32, gt32, lt32, eq32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

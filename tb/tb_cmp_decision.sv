// tb_cmp_decision: self-checking test of the decision module. Drives the bus
// patterns the resolution module can produce (all zero, or a single 1 on one
// bus) at every position, plus random multi-bit patterns on one bus, and checks the
// three flags against "is the bus non-zero" worked out by counting ones.
module tb_cmp_decision;
  localparam int unsigned N = 16;

  logic [N-1:0] left_bus, right_bus;
  logic a_gt_b, a_eq_b, a_lt_b;
  int checks = 0, failures = 0;

  cmp_decision #(.N(N)) dut (.left_bus(left_bus), .right_bus(right_bus),
                             .a_gt_b(a_gt_b), .a_eq_b(a_eq_b), .a_lt_b(a_lt_b));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] l, input logic [N-1:0] r);
    logic gt, lt;
    left_bus  = l;
    right_bus = r;
    #1;
    gt = $countones(l) > 0;
    lt = $countones(r) > 0;
    checks++;
    if (a_gt_b !== gt || a_lt_b !== lt || a_eq_b !== (!gt && !lt)) begin
      failures++;
      $display("FAIL left=%b right=%b got gt=%b eq=%b lt=%b", l, r, a_gt_b, a_eq_b, a_lt_b);
    end
  endtask

  initial begin
    apply('0, '0);
    for (int k = 0; k < int'(N); k++) begin
      apply(N'(1) << k, '0);
      apply('0, N'(1) << k);
    end
    // Random non-zero patterns on one bus at a time (the other bus is zero,
    // as the resolution module guarantees).
    for (int i = 0; i < 2000; i++) begin
      if (i % 2 == 0) apply(N'($urandom), '0);
      else            apply('0, N'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

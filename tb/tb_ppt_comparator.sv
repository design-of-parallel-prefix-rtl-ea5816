// tb_ppt_comparator: end-to-end test of the comparator at its default width
// (16 bits, no parameter override).
//
// Checks a_gt_b / a_eq_b / a_lt_b against the simulator's own unsigned
// compare, and the two buses against a scan for the first differing bit.
// Stimulus: directed corner cases, the 8-bit worked example zero-extended
// (0x005D vs 0x0069, first difference at bit 5, a < b), and random pairs that
// share a random-length top part and differ at a chosen bit.
//
// Mechanisms counted, each of which must occur at least once:
//   * termination at every bit position, for a > b and for a < b;
//   * the equal outcome (both buses zero);
//   * suppression inside a partition: a lower bit of the same 4-bit partition
//     also differs but must not reach the buses (Omega in-partition product);
//   * suppression across partitions: a bit in a less significant partition
//     also differs and must be blocked (Sigma-2/Sigma-3 prefix).
module tb_ppt_comparator;
  localparam int unsigned N = 16;

  logic [N-1:0] a, b, left_bus, right_bus;
  logic a_gt_b, a_eq_b, a_lt_b;
  int checks = 0, failures = 0;
  int hit_gt [N];
  int hit_lt [N];
  int n_eq = 0, n_sup_in = 0, n_sup_across = 0;

  ppt_comparator dut (
    .a(a), .b(b), .a_gt_b(a_gt_b), .a_eq_b(a_eq_b), .a_lt_b(a_lt_b),
    .left_bus(left_bus), .right_bus(right_bus)
  );

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    logic [N-1:0] el, er;
    int p;
    a  = ta;
    b  = tb_;
    el = '0;
    er = '0;
    p  = -1;
    for (int k = int'(N) - 1; k >= 0; k--) begin
      if (ta[k] != tb_[k]) begin
        p = k;
        break;
      end
    end
    if (p < 0) begin
      n_eq++;
    end else begin
      if (ta[p]) begin el[p] = 1'b1; hit_gt[p]++; end
      else       begin er[p] = 1'b1; hit_lt[p]++; end
      for (int k = p - 1; k >= 0; k--) begin
        if (ta[k] != tb_[k]) begin
          if (k / 4 == p / 4) n_sup_in++; else n_sup_across++;
        end
      end
    end
    #1;
    checks++;
    if (a_gt_b !== (ta > tb_) || a_lt_b !== (ta < tb_) || a_eq_b !== (ta == tb_)) begin
      failures++;
      $display("FAIL a=%h b=%h gt=%b eq=%b lt=%b", ta, tb_, a_gt_b, a_eq_b, a_lt_b);
    end
    checks++;
    if (left_bus !== el || right_bus !== er) begin
      failures++;
      $display("FAIL a=%h b=%h left=%b right=%b exp %b %b", ta, tb_, left_bus, right_bus, el, er);
    end
  endtask

  initial begin
    logic [N-1:0] x, z;
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);
    apply(16'h8000, 16'h7FFF);
    apply(16'h0001, 16'h0000);
    apply(16'h005D, 16'h0069);
    checks++;
    if (right_bus !== 16'h0020 || left_bus !== '0 || !a_lt_b) begin
      failures++;
      $display("FAIL worked example: left=%b right=%b lt=%b", left_bus, right_bus, a_lt_b);
    end
    for (int i = 0; i < 20000; i++) begin
      x = N'($urandom);
      z = x;
      if (i % 8 == 1) begin
        z = N'($urandom);
      end else if (i % 8 != 0) begin
        int p;
        p = $urandom_range(0, N - 1);
        z[p] = ~x[p];
        for (int k = 0; k < p; k++) z[k] = 1'($urandom);
      end
      apply(x, z);
    end
    for (int k = 0; k < int'(N); k++) begin
      checks++;
      if (hit_gt[k] == 0 || hit_lt[k] == 0) begin
        failures++;
        $display("FAIL termination at bit %0d: gt %0d lt %0d times", k, hit_gt[k], hit_lt[k]);
      end
    end
    checks++;
    if (n_eq == 0 || n_sup_in == 0 || n_sup_across == 0) begin
      failures++;
      $display("FAIL coverage: equal %0d, in-partition %0d, cross-partition %0d",
               n_eq, n_sup_in, n_sup_across);
    end
    $display("equal=%0d in-partition suppressions=%0d cross-partition suppressions=%0d",
             n_eq, n_sup_in, n_sup_across);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

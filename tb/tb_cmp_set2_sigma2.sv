// tb_cmp_set2_sigma2: self-checking test of the Set 2 (Sigma-2) partition
// flags. Sparse random termination-flag patterns make both equal and unequal
// partitions common; each flag is checked against a compare of its 4-bit
// slice with zero.
module tb_cmp_set2_sigma2;
  localparam int unsigned N  = 16;
  localparam int unsigned NP = N / 4;

  logic [N-1:0]  d;
  logic [NP-1:0] c2;
  int checks = 0, failures = 0;
  int seen_eq = 0, seen_ne = 0;

  cmp_set2_sigma2 #(.N(N)) dut (.d(d), .c2(c2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      for (int k = 0; k < int'(N); k++) d[k] = ($urandom_range(0, 7) == 0);
      if (i == 0) d = '0;
      if (i == 1) d = '1;
      #1;
      for (int q = 0; q < int'(NP); q++) begin
        logic exp_eq;
        exp_eq = (d[4*q +: 4] == 4'b0000);
        if (exp_eq) seen_eq++; else seen_ne++;
        checks++;
        if (c2[q] !== exp_eq) begin
          failures++;
          $display("FAIL d=%b partition %0d c2=%b", d, q, c2[q]);
        end
      end
    end
    checks++;
    if (seen_eq == 0 || seen_ne == 0) begin
      failures++;
      $display("FAIL coverage eq=%0d ne=%0d", seen_eq, seen_ne);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

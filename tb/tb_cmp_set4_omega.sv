// tb_cmp_set4_omega: self-checking test of the Set 4 (Omega) cells at 16 and
// 64 bits. Random sparse termination flags and random prefix enables are
// applied; the expected select for each bit is worked out by scanning its
// partition from the top for the first set flag and gating it with the
// enable of the partition above (always on for the top partition).
module tb_cmp_set4_omega;
  logic [15:0] d_a, y_a;
  logic [3:0]  c3_a;
  logic [63:0] d_b, y_b;
  logic [15:0] c3_b;
  int checks = 0, failures = 0;
  int hits[64];

  cmp_set4_omega #(.N(16)) dut_a (.d(d_a), .c3(c3_a), .y(y_a));
  cmp_set4_omega #(.N(64)) dut_b (.d(d_b), .c3(c3_b), .y(y_b));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] expected(input logic [63:0] d, input logic [15:0] c3, input int n);
    logic [63:0] y;
    y = '0;
    for (int q = 0; q < n / 4; q++) begin
      logic en;
      en = (q == n / 4 - 1) ? 1'b1 : c3[q+1];
      for (int k = 4 * q + 3; k >= 4 * q; k--) begin
        if (d[k]) begin
          y[k] = en;
          break;
        end
      end
    end
    return y;
  endfunction

  task automatic check(input string tag, input logic [63:0] d, input logic [15:0] c3,
                       input logic [63:0] y, input int n);
    logic [63:0] e;
    e = expected(d, c3, n);
    for (int k = 0; k < n; k++) begin
      checks++;
      if (y[k] !== e[k]) begin
        failures++;
        $display("FAIL %s d=%h c3=%h bit %0d y=%b exp=%b", tag, d, c3, k, y[k], e[k]);
      end
      if (n == 16 && y[k]) hits[k]++;
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      for (int k = 0; k < 64; k++) d_b[k] = ($urandom_range(0, 3) == 0);
      for (int k = 0; k < 16; k++) d_a[k] = ($urandom_range(0, 3) == 0);
      c3_a = 4'($urandom);
      c3_b = 16'($urandom);
      #1;
      check("N16", 64'(d_a), 16'(c3_a), 64'(y_a), 16);
      check("N64", d_b, c3_b, y_b, 64);
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (hits[k] == 0) begin
        failures++;
        $display("FAIL select of bit %0d never asserted", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

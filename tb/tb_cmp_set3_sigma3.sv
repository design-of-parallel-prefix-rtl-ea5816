// tb_cmp_set3_sigma3: self-checking test of the Set 3 (Sigma-3) prefix cells
// at three widths: 16 bits (4 partitions, one level), 64 bits (16 partitions,
// two levels) and 256 bits (64 partitions, three levels). Partition flags are
// mostly 1 with a few random 0s; each output is checked against "no 0 at or
// above this partition", worked out with a shift.
module tb_cmp_set3_sigma3;
  logic [3:0]  c2_a, c3_a;
  logic [15:0] c2_b, c3_b;
  logic [63:0] c2_c, c3_c;
  int checks = 0, failures = 0;

  cmp_set3_sigma3 #(.N(16))  dut_a (.c2(c2_a), .c3(c3_a));
  cmp_set3_sigma3 #(.N(64))  dut_b (.c2(c2_b), .c3(c3_b));
  cmp_set3_sigma3 #(.N(256)) dut_c (.c2(c2_c), .c3(c3_c));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected prefix flag: all bits of v from q up to np-1 are 1.
  function automatic logic exp_prefix(input logic [63:0] v, input int np, input int q);
    logic [63:0] mask;
    mask = ((np == 64) ? '1 : ((64'd1 << np) - 64'd1)) >> q << q;
    return (v & mask) == mask;
  endfunction

  task automatic check(input string tag, input logic [63:0] c2v, input logic [63:0] c3v,
                       input int np);
    for (int q = 0; q < np; q++) begin
      checks++;
      if (c3v[q] !== exp_prefix(c2v, np, q)) begin
        failures++;
        $display("FAIL %s c2=%h partition %0d c3=%b", tag, c2v, q, c3v[q]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] r;
      r = '1;
      // Clear zero to two random partition flags; sometimes none.
      for (int z = 0; z < $urandom_range(0, 2); z++) r[$urandom_range(0, 63)] = 1'b0;
      c2_c = r;
      c2_b = '1;
      for (int z = 0; z < $urandom_range(0, 2); z++) c2_b[$urandom_range(0, 15)] = 1'b0;
      c2_a = 4'($urandom);
      #1;
      check("N16",  64'(c2_a), 64'(c3_a), 4);
      check("N64",  64'(c2_b), 64'(c3_b), 16);
      check("N256", c2_c,      c3_c,      64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

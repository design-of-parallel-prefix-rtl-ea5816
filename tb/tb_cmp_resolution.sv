// tb_cmp_resolution: self-checking test of the comparison resolution module
// (Sets 1 to 5) at 8, 16 and 64 bits. Operand pairs are equal, or share a
// random-length common top part and then differ at a chosen bit with random
// bits below. The expected buses are worked out by scanning from the MSB for
// the first differing bit: a single 1 on the left bus there if a is larger,
// on the right bus if b is, and all zeros if equal. The 8-bit instance also
// runs the worked example A = 0101_1101, B = 0110_1001 (first difference at
// bit 5, right bus 0010_0000).
module tb_cmp_resolution;
  localparam int NW = 3;
  localparam int unsigned WIDTHS [NW] = '{8, 16, 64};

  int checks = 0, failures = 0, done = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int unsigned N = WIDTHS[g];
    logic [N-1:0] a, b, left_bus, right_bus;
    int hits [N];

    cmp_resolution #(.N(N)) dut (.a(a), .b(b), .left_bus(left_bus), .right_bus(right_bus));

    task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb_);
      logic [N-1:0] el, er;
      a  = ta;
      b  = tb_;
      el = '0;
      er = '0;
      for (int k = int'(N) - 1; k >= 0; k--) begin
        if (ta[k] != tb_[k]) begin
          if (ta[k]) el[k] = 1'b1; else er[k] = 1'b1;
          hits[k]++;
          break;
        end
      end
      #1;
      checks++;
      if (left_bus !== el || right_bus !== er) begin
        failures++;
        $display("FAIL N=%0d a=%h b=%h left=%b right=%b exp %b %b",
                 N, ta, tb_, left_bus, right_bus, el, er);
      end
    endtask

    initial begin
      logic [N-1:0] x, z;
      if (N == 8) apply(N'(8'b0101_1101), N'(8'b0110_1001));
      for (int i = 0; i < 3000; i++) begin
        for (int k = 0; k < int'(N); k++) x[k] = 1'($urandom);
        z = x;
        if (i % 10 != 0) begin
          int p;
          p = $urandom_range(0, N - 1);
          z[p] = ~x[p];
          for (int k = 0; k < p; k++) z[k] = 1'($urandom);
        end
        apply(x, z);
      end
      for (int k = 0; k < int'(N); k++) begin
        checks++;
        if (hits[k] == 0) begin
          failures++;
          $display("FAIL N=%0d first difference never at bit %0d", N, k);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

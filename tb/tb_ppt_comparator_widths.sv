// tb_ppt_comparator_widths: the comparator at other widths, to exercise the
// scalable structure. Instances at 8 bits (the worked example A = 0101_1101,
// B = 0110_1001 must give A < B with the right bus 0010_0000, and all 65536
// operand pairs are swept), 32, 64, 128
// and 256 bits (one, two, two, three and three Sigma-3 levels). Random pairs
// with a random-length equal top part are checked against the simulator's
// unsigned compare.
module tb_ppt_comparator_widths;
  localparam int NW = 5;
  localparam int unsigned WIDTHS [NW] = '{8, 32, 64, 128, 256};

  int checks = 0, failures = 0, done = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int unsigned N = WIDTHS[g];
    logic [N-1:0] a, b, left_bus, right_bus;
    logic a_gt_b, a_eq_b, a_lt_b;

    ppt_comparator #(.N(N)) dut (
      .a(a), .b(b), .a_gt_b(a_gt_b), .a_eq_b(a_eq_b), .a_lt_b(a_lt_b),
      .left_bus(left_bus), .right_bus(right_bus)
    );

    initial begin
      if (N == 8) begin
        a = N'(8'b0101_1101);
        b = N'(8'b0110_1001);
        #1;
        checks++;
        if (!a_lt_b || a_gt_b || a_eq_b || left_bus !== '0 || right_bus !== N'(8'b0010_0000)) begin
          failures++;
          $display("FAIL worked example left=%b right=%b", left_bus, right_bus);
        end
        // Exhaustive sweep of all 8-bit operand pairs.
        for (int x = 0; x < 256; x++) begin
          for (int z = 0; z < 256; z++) begin
            a = N'(x);
            b = N'(z);
            #1;
            checks++;
            if (a_gt_b !== (x > z) || a_lt_b !== (x < z) || a_eq_b !== (x == z)) begin
              failures++;
              $display("FAIL N=8 a=%h b=%h gt=%b eq=%b lt=%b", a, b, a_gt_b, a_eq_b, a_lt_b);
            end
          end
        end
      end
      for (int i = 0; i < 4000; i++) begin
        for (int k = 0; k < int'(N); k++) a[k] = 1'($urandom);
        b = a;
        if (i % 10 != 0) begin
          int p;
          p = $urandom_range(0, N - 1);
          b[p] = ~a[p];
          for (int k = 0; k < p; k++) b[k] = 1'($urandom);
        end
        #1;
        checks++;
        if (a_gt_b !== (a > b) || a_lt_b !== (a < b) || a_eq_b !== (a == b)
            || $countones(left_bus) + $countones(right_bus) != ((a == b) ? 0 : 1)) begin
          failures++;
          $display("FAIL N=%0d a=%h b=%h gt=%b eq=%b lt=%b", N, a, b, a_gt_b, a_eq_b, a_lt_b);
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

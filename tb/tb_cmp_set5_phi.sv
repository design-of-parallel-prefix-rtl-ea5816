// tb_cmp_set5_phi: self-checking test of the Set 5 (Phi) 2-bit multiplexers.
// Random operands and random selects; each bus bit must carry the operand
// bit when selected and 0 otherwise.
module tb_cmp_set5_phi;
  localparam int unsigned N = 16;

  logic [N-1:0] a, b, y, left_bus, right_bus;
  int checks = 0, failures = 0;

  cmp_set5_phi #(.N(N)) dut (.a(a), .b(b), .y(y), .left_bus(left_bus), .right_bus(right_bus));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = N'($urandom);
      b = N'($urandom);
      y = N'($urandom);
      #1;
      for (int k = 0; k < int'(N); k++) begin
        checks++;
        if (left_bus[k] !== (y[k] ? a[k] : 1'b0) || right_bus[k] !== (y[k] ? b[k] : 1'b0)) begin
          failures++;
          $display("FAIL a=%h b=%h y=%h bit %0d got %b%b", a, b, y, k, left_bus[k], right_bus[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cmp_set1_psi: self-checking test of the Set 1 (Psi) termination flags.
// Drives random and directed operand pairs into a 16-bit instance and checks
// every flag bit against a per-bit inequality test. Purely combinational DUT,
// so each vector is checked 1 time unit after it is applied.
module tb_cmp_set1_psi;
  localparam int unsigned N = 16;

  logic [N-1:0] a, b, d;
  int checks = 0, failures = 0;

  cmp_set1_psi #(.N(N)) dut (.a(a), .b(b), .d(d));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    a = ta;
    b = tb_;
    #1;
    for (int k = 0; k < int'(N); k++) begin
      checks++;
      if (d[k] !== (a[k] != b[k])) begin
        failures++;
        $display("FAIL a=%h b=%h bit %0d d=%b", a, b, k, d[k]);
      end
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply(16'hAAAA, 16'h5555);
    apply(16'h1234, 16'h1234);
    for (int i = 0; i < 2000; i++) apply(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

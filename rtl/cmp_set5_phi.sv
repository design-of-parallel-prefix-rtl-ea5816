// cmp_set5_phi: Set 5 of the comparison resolution module.
//
// One Phi cell per bit is a 2-bit-wide, two-input multiplexer. When its
// Omega select y[k] is 1 it passes the operand bits, the left-bus bit taking
// a[k] and the right-bus bit b[k]; otherwise it drives the constant 00.
// Because y is one-hot or zero, at most one position on the two buses is
// non-zero, and at that position exactly one of left/right is 1.
//
// Interface: a, b operands and y selects in; left and right N-bit buses out.
// Purely combinational.
module cmp_set5_phi #(
  parameter int unsigned N = cmp_pkg::CMP_WIDTH_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] y,
  output logic [N-1:0] left_bus,
  output logic [N-1:0] right_bus
);

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      {left_bus[k], right_bus[k]} = y[k] ? {a[k], b[k]} : 2'b00;
    end
  end

endmodule

// cmp_set1_psi: Set 1 of the comparison resolution module.
//
// One Psi cell per bit position computes the termination flag
// d[k] = a[k] ^ b[k]: a 1 says the operands differ at that bit, so the
// comparison can stop there if nothing more significant differed.
// All vectors in this design are indexed by bit weight (bit N-1 is the MSB).
//
// Interface: a, b operands in, d flags out. Purely combinational, no clock.
module cmp_set1_psi #(
  parameter int unsigned N = cmp_pkg::CMP_WIDTH_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] d
);

  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      d[k] = a[k] ^ b[k];
    end
  end

endmodule

// cmp_set2_sigma2: Set 2 of the comparison resolution module.
//
// One Sigma-2 cell per 4-bit partition NORs the four termination flags of its
// partition: c2[q] = 1 when bits 4q+3..4q of the operands are all equal.
// Partition q covers bits 4q+3 down to 4q, so partition N/4-1 is the most
// significant one. Fan-in is four per cell, as the design intends.
//
// Interface: d flags from Set 1 in, c2 partition-equal flags out.
// Purely combinational.
module cmp_set2_sigma2 #(
  parameter int unsigned N = cmp_pkg::CMP_WIDTH_DEFAULT
) (
  input  logic [N-1:0]                  d,
  output logic [N/cmp_pkg::PART_W-1:0]  c2
);

  localparam int unsigned NP = N / cmp_pkg::PART_W;

  always_comb begin
    for (int q = 0; q < int'(NP); q++) begin
      c2[q] = ~(d[4*q+3] | d[4*q+2] | d[4*q+1] | d[4*q]);
    end
  end

endmodule

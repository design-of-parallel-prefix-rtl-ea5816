// cmp_set4_omega: Set 4 of the comparison resolution module.
//
// One Omega cell per bit decides whether its bit is the most significant bit
// at which the operands differ:
//   y[k] = above_eq(q) & d[k] & ~d[k+1] & ... & ~d[4q+3]
// where q = k/4 is the bit's partition and above_eq(q) = c3[q+1] says every
// more significant partition is equal (taken as 1 for the top partition,
// which has nothing above it). Within a partition the cell looks only at the
// more significant bits of that same partition, so the largest cell (the
// partition's LSB) has a fan-in of five. At most one y bit is ever set.
//
// Interface: d flags from Set 1 and c3 prefix flags from Set 3 in, y select
// lines to the Set 5 multiplexers out. Purely combinational.
module cmp_set4_omega #(
  parameter int unsigned N = cmp_pkg::CMP_WIDTH_DEFAULT
) (
  input  logic [N-1:0]                 d,
  input  logic [N/cmp_pkg::PART_W-1:0] c3,
  output logic [N-1:0]                 y
);

  localparam int unsigned NP = N / cmp_pkg::PART_W;

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned q;
      logic        en;
      q  = k / cmp_pkg::PART_W;
      en = (q == NP - 1) ? 1'b1 : c3[q+1];
      y[k] = en & d[k];
      for (int unsigned i = k + 1; i < cmp_pkg::PART_W * (q + 1); i++) begin
        y[k] = y[k] & ~d[i];
      end
    end
  end

endmodule

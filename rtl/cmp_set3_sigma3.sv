// cmp_set3_sigma3: Set 3 of the comparison resolution module.
//
// Sigma-3 cells carry no comparison of their own: they combine the Sigma-2
// partition flags so that c3[q] = 1 exactly when partitions N/4-1 down to q
// (partition q and every more significant one) are all equal. The Omega cells
// of partition q-1 use c3[q] as their "everything above is equal" enable.
//
// The cells are arranged as LEVELS levels of N/4 cells each. At level l a cell
// ANDs its own previous-level value with up to three previous-level values
// taken 4**(l-1), 2*4**(l-1) and 3*4**(l-1) partitions further up, so no cell
// has a fan-in above four. After LEVELS = ceil(log4(N/4)) levels each cell
// spans all partitions above it. For the default N = 16 this is a single level
// of four cells whose fan-in is 1, 2, 3 and 4, as in the reference layout.
// The radix-4 multi-level arrangement for wider operands is this design's
// choice; the document only fixes N/4 cells per level.
//
// Interface: c2 in, c3 out, both indexed by partition (N/4-1 = most
// significant). Purely combinational.
module cmp_set3_sigma3 #(
  parameter int unsigned N = cmp_pkg::CMP_WIDTH_DEFAULT
) (
  input  logic [N/cmp_pkg::PART_W-1:0] c2,
  output logic [N/cmp_pkg::PART_W-1:0] c3
);

  localparam int unsigned NP     = N / cmp_pkg::PART_W;
  localparam int unsigned LEVELS = cmp_pkg::prefix_levels(NP);

  // cur holds the outputs of the previous level (the Sigma-2 flags before
  // level 1); nxt those of the level being formed.
  always_comb begin
    logic [NP-1:0] cur;
    logic [NP-1:0] nxt;
    int unsigned   stride;
    cur    = c2;
    stride = 1;
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      for (int unsigned q = 0; q < NP; q++) begin
        nxt[q] = cur[q];
        for (int unsigned j = 1; j < 4; j++) begin
          if (q + j * stride < NP) begin
            nxt[q] = nxt[q] & cur[q + j * stride];
          end
        end
      end
      cur    = nxt;
      stride = stride * 4;
    end
    c3 = cur;
  end

endmodule

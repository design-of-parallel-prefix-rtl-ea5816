// cmp_decision: decision module of the parallel prefix comparator.
//
// OR-scans each bus and derives the three results:
//   a_gt_b = OR of the left bus, a_lt_b = OR of the right bus,
//   a_eq_b = NOR(a_gt_b, a_lt_b).
// Each scan is done in two levels, grouped like the rest of the comparator:
// first one 4-input OR per 4-bit partition, then one OR across the partition
// results. The grouping follows the reference layout; building the second
// level as a single wide OR is this design's choice (at N = 16 it has four
// inputs).
//
// Interface: left_bus and right_bus from the resolution module in; the three
// result flags out, exactly one of which is 1. Purely combinational.
module cmp_decision #(
  parameter int unsigned N = cmp_pkg::CMP_WIDTH_DEFAULT
) (
  input  logic [N-1:0] left_bus,
  input  logic [N-1:0] right_bus,
  output logic         a_gt_b,
  output logic         a_eq_b,
  output logic         a_lt_b
);

  localparam int unsigned NP = N / cmp_pkg::PART_W;

  logic [NP-1:0] left_grp;
  logic [NP-1:0] right_grp;

  always_comb begin
    for (int unsigned q = 0; q < NP; q++) begin
      left_grp[q]  = |left_bus[4*q +: 4];
      right_grp[q] = |right_bus[4*q +: 4];
    end
  end

  assign a_gt_b = |left_grp;
  assign a_lt_b = |right_grp;
  assign a_eq_b = ~(a_gt_b | a_lt_b);

  // The resolution module never sets both buses, so exactly one result holds.
  always_comb begin
    assert final ($onehot({a_gt_b, a_eq_b, a_lt_b}))
      else $error("cmp_decision: both buses non-zero");
  end

endmodule

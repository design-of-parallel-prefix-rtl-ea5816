// ppt_comparator: N-bit unsigned magnitude comparator built on an MSB-to-LSB
// parallel prefix tree.
//
// The comparison resolution module finds the most significant bit at which
// the operands differ and places (a[k], b[k]) at that position on the left and
// right buses, zeros everywhere else; the decision module OR-scans the buses.
// Fan-in stays at five or below and fan-out at four or below whatever N is,
// except for the second level of the decision OR, which grows as N/4.
//
// Ports: a, b (N-bit unsigned operands); a_gt_b, a_eq_b, a_lt_b (exactly one
// is 1). The buses are brought out too, for observation. The circuit is purely
// combinational: no clock and no reset, results follow the inputs after the
// combinational delay. Default N = 16; N must be a multiple of 4.
module ppt_comparator #(
  parameter int unsigned N = cmp_pkg::CMP_WIDTH_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         a_gt_b,
  output logic         a_eq_b,
  output logic         a_lt_b,
  output logic [N-1:0] left_bus,
  output logic [N-1:0] right_bus
);

  cmp_resolution #(.N(N)) u_resolution (
    .a         (a),
    .b         (b),
    .left_bus  (left_bus),
    .right_bus (right_bus)
  );

  cmp_decision #(.N(N)) u_decision (
    .left_bus  (left_bus),
    .right_bus (right_bus),
    .a_gt_b    (a_gt_b),
    .a_eq_b    (a_eq_b),
    .a_lt_b    (a_lt_b)
  );

endmodule

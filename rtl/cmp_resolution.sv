// cmp_resolution: comparison resolution module of the parallel prefix
// comparator.
//
// Five sets of cells turn the two operands into the left and right buses:
//   Set 1 (Psi)     d = a ^ b, one termination flag per bit
//   Set 2 (Sigma-2) one "partition equal" flag per 4-bit partition
//   Set 3 (Sigma-3) prefix of those flags from the MSB side
//   Set 4 (Omega)   one-hot marker of the most significant differing bit
//   Set 5 (Phi)     drives (a[k], b[k]) onto the buses at that bit, 00 elsewhere
// If the operands are equal both buses are all zero. Otherwise exactly one bit
// of one bus is 1: left_bus when a is the larger operand, right_bus when b is.
//
// N must be a multiple of 4 (the partition width). Purely combinational:
// the buses are valid one combinational delay after a and b change.
// Simulation assertions check the bus encoding rule above.
module cmp_resolution #(
  parameter int unsigned N = cmp_pkg::CMP_WIDTH_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] left_bus,
  output logic [N-1:0] right_bus
);

  localparam int unsigned NP = N / cmp_pkg::PART_W;

  if (N < cmp_pkg::PART_W || N % cmp_pkg::PART_W != 0) begin : g_bad_width
    $error("cmp_resolution: N must be a positive multiple of 4");
  end

  logic [N-1:0]  d;
  logic [NP-1:0] c2;
  logic [NP-1:0] c3;
  logic [N-1:0]  y;

  cmp_set1_psi    #(.N(N)) u_set1 (.a(a), .b(b), .d(d));
  cmp_set2_sigma2 #(.N(N)) u_set2 (.d(d), .c2(c2));
  cmp_set3_sigma3 #(.N(N)) u_set3 (.c2(c2), .c3(c3));
  cmp_set4_omega  #(.N(N)) u_set4 (.d(d), .c3(c3), .y(y));
  cmp_set5_phi    #(.N(N)) u_set5 (.a(a), .b(b), .y(y),
                                   .left_bus(left_bus), .right_bus(right_bus));

  // Bus encoding rule: at most one bit set across both buses, and none at all
  // exactly when the operands are equal.
  always_comb begin
    assert final ($onehot0({left_bus, right_bus}))
      else $error("cmp_resolution: more than one bus bit set");
    assert final ((left_bus == '0 && right_bus == '0) == (a == b))
      else $error("cmp_resolution: buses disagree with operand equality");
  end

endmodule

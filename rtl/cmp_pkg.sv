// cmp_pkg: constants and elaboration-time helpers shared by the parallel
// prefix comparator.
//
// The comparator splits its N-bit operands into partitions of PART_W = 4 bits,
// the partition size used by the Sigma-2 cells and the first level of the OR
// network. prefix_levels() gives the number of radix-4 prefix levels the
// Sigma-3 set needs so that every partition sees all partitions above it; at
// the default width of 16 bits this is one level, as in the reference layout.
// The radix-4 prefix arrangement is this design's own choice.
package cmp_pkg;

  // Default operand width: the 16-bit comparator that was characterised.
  localparam int unsigned CMP_WIDTH_DEFAULT = 16;

  // Bits per partition (one Sigma-2 cell, one group of four Omega/Phi cells).
  localparam int unsigned PART_W = 4;

  // Number of radix-4 prefix levels needed to combine `parts` partition flags:
  // the smallest L with 4**L >= parts, and at least one level.
  function automatic int unsigned prefix_levels(input int unsigned parts);
    int unsigned l;
    longint unsigned span;
    l    = 1;
    span = 4;
    while (span < longint'(parts)) begin
      span = span * 4;
      l    = l + 1;
    end
    return l;
  endfunction

endpackage

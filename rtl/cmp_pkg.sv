// Shared constants of the partitioned magnitude comparator.
//
// The comparator splits both operands into partitions of PART_W bits. Every
// stage below works on whole partitions, so the operand width must be a
// multiple of PART_W. The partition width of 4 follows the design description;
// the helper function is only a convenience for sizing ports.
package cmp_pkg;

  // Bits per partition ("nibble").
  localparam int unsigned PART_W = 4;

  // Number of partitions for an operand of n bits.
  function automatic int unsigned num_parts(int unsigned n);
    return n / PART_W;
  endfunction

endpackage : cmp_pkg

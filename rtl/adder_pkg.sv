// Shared types for the parallel-prefix binary adder.
//
// A prefix adder carries, for every group of bit positions i:j, a pair of
// signals: the group generate G (the group produces a carry on its own) and
// the group propagate P (a carry entering the group leaves it). gp_t bundles
// that pair so the pre-processing stage, the black and grey cells and the
// adder tree all pass the same two-bit record.
package adder_pkg;

  typedef struct packed {
    logic g;  // group generate
    logic p;  // group propagate
  } gp_t;

  // Number of Kogge-Stone levels needed to cover n prefix positions.
  function automatic int unsigned prefix_levels(int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

endpackage

// Grey cell of the prefix network.
//
// Computes only the generate half of the black cell:
//   G_i:j = G_i:k OR (P_i:k AND G_k-1:j)
// It is used where the lower group already reaches down to the carry in, so
// the merged group's G is final (it is the carry out of bit i) and its P is
// never needed. Purely combinational, one AND-OR.
module grey_cell
  import adder_pkg::*;
(
  input  gp_t  hi,    // upper group i:k
  input  logic lo_g,  // generate of lower group k-1:-1
  output logic g      // generate of merged group i:-1
);

  always_comb g = hi.g | (hi.p & lo_g);

endmodule

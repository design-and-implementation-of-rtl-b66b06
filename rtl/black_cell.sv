// Black cell of the prefix network.
//
// Merges the (G,P) pair of an upper group i:k with that of the adjacent lower
// group k-1:j into the pair of the whole group i:j:
//   P_i:j = P_i:k AND P_k-1:j
//   G_i:j = G_i:k OR (P_i:k AND G_k-1:j)
// These two equations are the ones the design is built on. The cell is purely
// combinational: one AND for P, one AND-OR for G.
module black_cell
  import adder_pkg::*;
(
  input  gp_t hi,   // upper group i:k
  input  gp_t lo,   // lower group k-1:j
  output gp_t out   // merged group i:j
);

  always_comb begin
    out.p = hi.p & lo.p;
    out.g = hi.g | (hi.p & lo.g);
  end

endmodule

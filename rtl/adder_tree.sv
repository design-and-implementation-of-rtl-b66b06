// Adder tree: the carry-generation prefix network of the binary adder
// (stage 2).
//
// Input gp[k] is the (G,P) pair of prefix position k: position 0 is the carry
// in, position i+1 is bit i. The tree computes, for every position k, the
// group generate G_k:0 over all positions at and below k, which is the carry
// out of bit k-1. Output carry[i] is therefore the carry into bit i:
// carry[0] = c0, carry[WIDTH] = carry out of the adder.
//
// Arrangement: Kogge-Stone. Level l (1..LEVELS) combines every node k with the
// node DIST = 2^(l-1) positions below it. A node whose span already reaches
// position 0 is passed on unchanged. A node whose partner's span reaches
// position 0 only needs the merged G, so it uses a grey cell; every other
// combining node uses a black cell. LEVELS = ceil(log2(WIDTH+1)), which is 6
// for the 32-bit adder. The network is purely combinational, with logic depth
// LEVELS cells. carry[0] is the carry-in generate passed straight through.
//
// The black/grey cell equations follow the design description; the
// description does not name the arrangement of the cells, and Kogge-Stone is
// this implementation's choice for its log-depth, fully parallel carries.
module adder_tree
  import adder_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  gp_t            gp [WIDTH+1],
  output logic [WIDTH:0] carry
);

  localparam int unsigned N      = WIDTH + 1;
  localparam int unsigned LEVELS = prefix_levels(N);

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    gp_t node [N];

    if (l == 0) begin : g_in
      for (genvar k = 0; k < N; k++) begin : g_k
        assign node[k] = gp[k];
      end
    end else begin : g_comb
      localparam int unsigned DIST = 1 << (l - 1);
      for (genvar k = 0; k < N; k++) begin : g_k
        if (k < DIST) begin : g_pass
          assign node[k] = g_lvl[l-1].node[k];
        end else if (k < 2 * DIST) begin : g_grey
          logic g;
          grey_cell u_grey (
            .hi  (g_lvl[l-1].node[k]),
            .lo_g(g_lvl[l-1].node[k-DIST].g),
            .g   (g)
          );
          // The span now includes the carry-in position, whose P is 0.
          assign node[k] = '{g: g, p: 1'b0};
        end else begin : g_black
          black_cell u_black (
            .hi (g_lvl[l-1].node[k]),
            .lo (g_lvl[l-1].node[k-DIST]),
            .out(node[k])
          );
        end
      end
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_out
    assign carry[k] = g_lvl[LEVELS].node[k].g;
  end

endmodule

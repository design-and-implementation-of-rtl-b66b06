// Binary adder: a WIDTH-bit parallel-prefix adder, sum = a + b + c0.
//
// Three stages, in the order of the design's block diagram:
//   1. pre_processing  - bit propagate P = a XOR b and generate G = a AND b;
//                        the carry in becomes an extra position below bit 0.
//   2. adder_tree      - Kogge-Stone network of black and grey cells that
//                        turns the bit (G,P) pairs into the carry into every
//                        bit in ceil(log2(WIDTH+1)) cell levels.
//   3. post_processing - sum_i = P_i XOR carry_i, and the carry out.
// Bit-pair ordering of the operands (a_i with b_i) is plain wiring.
//
// Interface: operands a, b and carry in c0; outputs sum and carry out c32.
// The port names and the 32-bit width are those of the design; the name c32
// is kept for any WIDTH. The adder is purely combinational: no clock, no
// reset, results valid one propagation delay after the inputs change.
module binary_adder
  import adder_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c0,
  output logic [WIDTH-1:0] sum,
  output logic             c32
);

  gp_t              gp [WIDTH+1];
  logic [WIDTH-1:0] p_bit;
  logic [WIDTH:0]   carry;

  pre_processing #(.WIDTH(WIDTH)) u_pre (
    .a    (a),
    .b    (b),
    .c0   (c0),
    .gp   (gp),
    .p_bit(p_bit)
  );

  adder_tree #(.WIDTH(WIDTH)) u_tree (
    .gp   (gp),
    .carry(carry)
  );

  post_processing #(.WIDTH(WIDTH)) u_post (
    .p_bit(p_bit),
    .carry(carry),
    .sum  (sum),
    .cout (c32)
  );

endmodule

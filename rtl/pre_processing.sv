// Pre-processing stage of the binary adder (stage 1).
//
// For every bit i it forms the bit propagate P_i = a_i XOR b_i and the bit
// generate G_i = a_i AND b_i, one gate level per signal. The carry in c0 is
// placed below bit 0 as an extra prefix position with G = c0 and P = 0, so
// the adder tree can fold it in with ordinary grey cells.
//
// Interface: gp[0] is the carry-in position, gp[i+1] belongs to bit i.
// p_bit repeats the bit propagates for the post-processing sum.
// Purely combinational. gp[0].p is a constant 0 by construction.
//
// The propagate/generate split and the one-gate delay follow the design
// description; using an AND (not an OR) for generate, and the carry-in
// position, are choices made here so that the sum is exact.
module pre_processing
  import adder_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c0,
  output gp_t              gp [WIDTH+1],
  output logic [WIDTH-1:0] p_bit
);

  always_comb begin
    p_bit = a ^ b;
    gp[0] = '{g: c0, p: 1'b0};
    for (int i = 0; i < WIDTH; i++) begin
      gp[i+1] = '{g: a[i] & b[i], p: a[i] ^ b[i]};
    end
  end

endmodule

// Post-processing stage of the binary adder (stage 3).
//
// Forms each sum bit from the bit propagate and the carry into that bit:
//   sum_i = P_i XOR carry_i,  carry_i = G_i-1:-1 from the adder tree,
// and passes the carry out of the top bit as cout (a plain wire from the
// adder tree). Purely combinational.
//
// The design description only says that sum and carry are produced here; the
// XOR form is the standard prefix-adder sum and is this implementation's
// reading of it.
module post_processing #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] p_bit,  // a XOR b
  input  logic [WIDTH:0]   carry,  // carry[i] = carry into bit i
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  always_comb begin
    sum  = p_bit ^ carry[WIDTH-1:0];
    cout = carry[WIDTH];
  end

endmodule

// Self-checking testbench for adder_tree.
//
// Drives arbitrary (G,P) patterns, including ones no pre-processing stage
// would produce, into a 32-bit tree and into a 13-bit tree (a width that is
// not one less than a power of two). The reference is a serial ripple over
// the positions: carry[0] = G_0, carry[k] = G_k | (P_k & carry[k-1]).
// Long all-propagate runs are forced often so carries cross many levels.
module tb_adder_tree;
  import adder_pkg::*;

  localparam int unsigned W1 = 32;
  localparam int unsigned W2 = 13;

  gp_t          gp1 [W1+1];
  gp_t          gp2 [W2+1];
  logic [W1:0]  carry1;
  logic [W2:0]  carry2;
  int           checks = 0, failures = 0;

  adder_tree                dut1 (.gp(gp1), .carry(carry1));
  adder_tree #(.WIDTH(W2)) dut2 (.gp(gp2), .carry(carry2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        ref_c;
    int unsigned mode;
    for (int t = 0; t < 400; t++) begin
      mode = $urandom_range(3);
      foreach (gp1[k]) begin
        gp1[k].g = 1'($urandom());
        gp1[k].p = 1'($urandom());
        // Mostly-propagate patterns make long carry chains.
        if (mode == 0 && k > 0) gp1[k] = '{g: ($urandom_range(15) == 0), p: 1'b1};
        if (mode == 1 && k > 0) gp1[k] = '{g: 1'b0, p: 1'b1};
      end
      foreach (gp2[k]) gp2[k] = gp1[k];
      #1;
      ref_c = gp1[0].g;
      for (int k = 0; k <= W1; k++) begin
        if (k > 0) ref_c = gp1[k].g | (gp1[k].p & ref_c);
        checks++;
        if (carry1[k] !== ref_c) begin
          failures++;
          $display("FAIL W=%0d carry[%0d]=%b expected %b", W1, k, carry1[k], ref_c);
        end
        if (k <= W2) begin
          checks++;
          if (carry2[k] !== ref_c) begin
            failures++;
            $display("FAIL W=%0d carry[%0d]=%b expected %b", W2, k, carry2[k], ref_c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

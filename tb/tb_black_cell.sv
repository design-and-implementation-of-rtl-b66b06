// Self-checking testbench for black_cell.
//
// Applies all 16 combinations of the two input (G,P) pairs. The reference
// does not reuse the cell's equations: a group (G,P) is treated as the carry
// function cout = G | (P & cin), and the merged group must act, for both
// values of cin, as the upper group applied after the lower one; its P must
// be 1 exactly when both groups pass a carry through.
module tb_black_cell;
  import adder_pkg::*;

  gp_t hi, lo, out;
  int  checks = 0, failures = 0;

  black_cell dut (.hi(hi), .lo(lo), .out(out));

  function automatic logic carry_through(gp_t grp, logic cin);
    if (grp.g) return 1'b1;
    if (grp.p) return cin;
    return 1'b0;
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      #1;
      for (int cin = 0; cin < 2; cin++) begin
        checks++;
        if (carry_through(out, 1'(cin)) !==
            carry_through(hi, carry_through(lo, 1'(cin)))) begin
          failures++;
          $display("FAIL g: hi=%b lo=%b cin=%0d out=%b", hi, lo, cin, out);
        end
      end
      checks++;
      if (out.p !== (hi.p && lo.p)) begin
        failures++;
        $display("FAIL p: hi=%b lo=%b out=%b", hi, lo, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for grey_cell.
//
// Applies all 8 combinations of the upper group (G,P) and the lower group's
// G. The reference treats the upper group as a carry function: the merged
// generate is the carry the upper group emits when the lower group's carry
// enters it (1 if it generates, the incoming carry if it propagates, else 0).
module tb_grey_cell;
  import adder_pkg::*;

  gp_t  hi;
  logic lo_g, g;
  int   checks = 0, failures = 0;

  grey_cell dut (.hi(hi), .lo_g(lo_g), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g;
    for (int v = 0; v < 8; v++) begin
      {hi.g, hi.p, lo_g} = 3'(v);
      #1;
      case ({hi.g, hi.p})
        2'b10, 2'b11: exp_g = 1'b1;
        2'b01:        exp_g = lo_g;
        default:      exp_g = 1'b0;
      endcase
      checks++;
      if (g !== exp_g) begin
        failures++;
        $display("FAIL hi=%b lo_g=%b g=%b expected %b", hi, lo_g, g, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

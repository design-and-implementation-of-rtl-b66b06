// Self-checking testbench for pre_processing.
//
// Drives corner and random operands and checks every bit: the generate must
// be 1 exactly when both operand bits are 1, the propagate exactly when one
// of them is 1, and the carry-in position must hold c0 with propagate 0.
// The reference counts the ones in each bit pair rather than using gates.
module tb_pre_processing;
  import adder_pkg::*;

  localparam int unsigned WIDTH = 32;

  logic [WIDTH-1:0] a, b, p_bit;
  logic             c0;
  gp_t              gp [WIDTH+1];
  int               checks = 0, failures = 0;

  pre_processing dut (
    .a(a), .b(b), .c0(c0), .gp(gp), .p_bit(p_bit)
  );

  task automatic check_now();
    int ones;
    #1;
    checks++;
    if (gp[0].g !== c0 || gp[0].p !== 1'b0) begin
      failures++;
      $display("FAIL carry-in position: c0=%b gp[0]=%b", c0, gp[0]);
    end
    for (int i = 0; i < WIDTH; i++) begin
      ones = int'(a[i]) + int'(b[i]);
      checks++;
      if (gp[i+1].g !== (ones == 2) || gp[i+1].p !== (ones == 1) ||
          p_bit[i] !== (ones == 1)) begin
        failures++;
        $display("FAIL bit %0d: a=%b b=%b gp=%b p_bit=%b", i, a[i], b[i],
                 gp[i+1], p_bit[i]);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; c0 = 1'b0; check_now();
    a = '1; b = '1; c0 = 1'b1; check_now();
    a = '1; b = '0; c0 = 1'b0; check_now();
    a = 32'hAAAA_AAAA; b = 32'h5555_5555; c0 = 1'b1; check_now();
    repeat (200) begin
      a = $urandom(); b = $urandom(); c0 = 1'($urandom());
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

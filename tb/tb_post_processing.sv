// Self-checking testbench for post_processing.
//
// Drives random bit propagates and carries and checks each sum bit against
// the parity of the propagate and the incoming carry, computed by counting,
// and the carry out against the top carry.
module tb_post_processing;

  localparam int unsigned WIDTH = 32;

  logic [WIDTH-1:0] p_bit, sum;
  logic [WIDTH:0]   carry;
  logic             cout;
  int               checks = 0, failures = 0;

  post_processing dut (
    .p_bit(p_bit), .carry(carry), .sum(sum), .cout(cout)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) begin
      p_bit = $urandom();
      carry = {1'($urandom()), 32'($urandom())};
      #1;
      for (int i = 0; i < WIDTH; i++) begin
        checks++;
        if (sum[i] !== ((int'(p_bit[i]) + int'(carry[i])) % 2 == 1)) begin
          failures++;
          $display("FAIL sum bit %0d: p=%b c=%b s=%b", i, p_bit[i], carry[i], sum[i]);
        end
      end
      checks++;
      if (cout !== carry[WIDTH]) begin
        failures++;
        $display("FAIL cout=%b carry[%0d]=%b", cout, WIDTH, carry[WIDTH]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end, self-checking testbench for binary_adder at its default
// 32-bit width (no parameter override).
//
// Each test applies a, b and c0, waits one time unit for the combinational
// result, and compares {c32, sum} with a 33-bit integer addition done in the
// testbench. Directed cases cover zero, all-ones, alternating patterns and
// single-bit carries; random cases follow, with a share of operands built so
// that a carry must cross the whole word.
//
// The testbench also counts how often each mechanism of the adder was
// exercised and fails if one never was:
//   carry_in    - c0 = 1 changed the sum
//   carry_out   - c32 = 1 (the sum overflowed 32 bits)
//   full_chain  - a carry entering at the bottom propagated through all 32
//                 bits (every bit of a XOR b set, c0 = 1)
//   long_chain  - a carry travelled through at least 16 propagating bits,
//                 so it passed the tree's deepest levels
//   no_carry    - no bit produced or passed a carry
module tb_binary_adder;

  localparam int unsigned WIDTH = 32;

  logic [WIDTH-1:0] a, b, sum;
  logic             c0, c32;
  int               checks = 0, failures = 0;
  int               n_carry_in = 0, n_carry_out = 0, n_full_chain = 0;
  int               n_long_chain = 0, n_no_carry = 0;

  binary_adder dut (.a(a), .b(b), .c0(c0), .sum(sum), .c32(c32));

  // Longest run of bits through which a carry actually travelled.
  function automatic int longest_carry_run(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y,
                                           logic cin);
    int run = 0, best = 0;
    logic c = cin;
    for (int i = 0; i < WIDTH; i++) begin
      if ((x[i] ^ y[i]) && c) run++;
      else run = 0;
      if (run > best) best = run;
      c = (x[i] & y[i]) | ((x[i] ^ y[i]) & c);
    end
    return best;
  endfunction

  task automatic apply(logic [WIDTH-1:0] av, logic [WIDTH-1:0] bv, logic cv);
    logic [WIDTH:0] expected;
    int             run;
    a = av; b = bv; c0 = cv;
    #1;
    expected = {1'b0, av} + {1'b0, bv} + {{WIDTH{1'b0}}, cv};
    checks++;
    if ({c32, sum} !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h c0=%b: got c32=%b sum=%h, expected c32=%b sum=%h",
               av, bv, cv, c32, sum, expected[WIDTH], expected[WIDTH-1:0]);
    end
    run = longest_carry_run(av, bv, cv);
    if (cv && ((av ^ bv) != 0 || (av & bv) == 0)) n_carry_in++;
    if (expected[WIDTH]) n_carry_out++;
    if (cv && (av ^ bv) == '1) n_full_chain++;
    if (run >= 16) n_long_chain++;
    if (!cv && (av & bv) == 0) n_no_carry++;
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] r;
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);                   // carry through all 32 bits
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1'b0);
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    apply(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    apply(32'h0000_FFFF, 32'h0000_0001, 1'b0);
    for (int i = 0; i < WIDTH; i++) begin
      apply(32'(1) << i, 32'(1) << i, 1'b0);       // generate at bit i
      apply(~(32'(1) << i), 32'(1) << i, 1'b1);    // full propagate
    end
    repeat (5000) begin
      r = $urandom();
      case ($urandom_range(3))
        0:       apply(r, ~r, 1'($urandom()));          // all-propagate word
        1:       apply(r, ~r ^ (32'(1) << $urandom_range(WIDTH-1)), 1'($urandom()));
        default: apply($urandom(), $urandom(), 1'($urandom()));
      endcase
    end

    $display("mechanisms: carry_in=%0d carry_out=%0d full_chain=%0d long_chain=%0d no_carry=%0d",
             n_carry_in, n_carry_out, n_full_chain, n_long_chain, n_no_carry);
    if (n_carry_in == 0)   begin failures++; $display("FAIL carry_in never exercised");   end
    if (n_carry_out == 0)  begin failures++; $display("FAIL carry_out never exercised");  end
    if (n_full_chain == 0) begin failures++; $display("FAIL full_chain never exercised"); end
    if (n_long_chain == 0) begin failures++; $display("FAIL long_chain never exercised"); end
    if (n_no_carry == 0)   begin failures++; $display("FAIL no_carry never exercised");   end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

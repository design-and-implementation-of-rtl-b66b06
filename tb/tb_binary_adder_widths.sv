// Self-checking testbench for binary_adder at widths other than 32.
//
// Widths 1, 2, 3 and 4 are checked exhaustively (every a, b and c0); widths
// 7, 16 and 64 with corner and random operands. Every result is compared
// with an integer addition in the testbench. This confirms that the prefix
// tree's level count and its grey/black cell placement are correct for any
// WIDTH, not just the default.
module tb_binary_adder_widths;

  int checks = 0, failures = 0;

  logic [0:0]  a1, b1, s1;   logic c1, o1;
  logic [1:0]  a2, b2, s2;   logic c2, o2;
  logic [2:0]  a3, b3, s3;   logic c3, o3;
  logic [3:0]  a4, b4, s4;   logic c4, o4;
  logic [6:0]  a7, b7, s7;   logic c7, o7;
  logic [15:0] a16, b16, s16; logic c16, o16;
  logic [63:0] a64, b64, s64; logic c64, o64;

  binary_adder #(.WIDTH(1))  d1  (.a(a1),  .b(b1),  .c0(c1),  .sum(s1),  .c32(o1));
  binary_adder #(.WIDTH(2))  d2  (.a(a2),  .b(b2),  .c0(c2),  .sum(s2),  .c32(o2));
  binary_adder #(.WIDTH(3))  d3  (.a(a3),  .b(b3),  .c0(c3),  .sum(s3),  .c32(o3));
  binary_adder #(.WIDTH(4))  d4  (.a(a4),  .b(b4),  .c0(c4),  .sum(s4),  .c32(o4));
  binary_adder #(.WIDTH(7))  d7  (.a(a7),  .b(b7),  .c0(c7),  .sum(s7),  .c32(o7));
  binary_adder #(.WIDTH(16)) d16 (.a(a16), .b(b16), .c0(c16), .sum(s16), .c32(o16));
  binary_adder #(.WIDTH(64)) d64 (.a(a64), .b(b64), .c0(c64), .sum(s64), .c32(o64));

  task automatic check(int unsigned w, longint unsigned got_sum, bit got_cout,
                       longint unsigned av, longint unsigned bv, bit cv);
    // Add in two 32-bit halves so 64-bit operands need no wider integer.
    longint unsigned lo, hi, mask, exp_sum;
    bit exp_cout;
    lo = (av & 64'hFFFF_FFFF) + (bv & 64'hFFFF_FFFF) + 64'(cv);
    hi = (av >> 32) + (bv >> 32) + (lo >> 32);
    exp_sum = (hi << 32) | (lo & 64'hFFFF_FFFF);
    if (w == 64) begin
      exp_cout = hi[32];
    end else begin
      mask = (64'd1 << w) - 1;
      exp_cout = exp_sum[w];
      exp_sum = exp_sum & mask;
    end
    checks++;
    if (got_sum !== exp_sum || got_cout !== exp_cout) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h c0=%b: got %b/%h expected %b/%h",
               w, av, bv, cv, got_cout, got_sum, exp_cout, exp_sum);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned r, s;
    bit              c, prop;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a1 = 1'(x); b1 = 1'(y); c1 = 1'(ci);
          a2 = 2'(x); b2 = 2'(y); c2 = 1'(ci);
          a3 = 3'(x); b3 = 3'(y); c3 = 1'(ci);
          a4 = 4'(x); b4 = 4'(y); c4 = 1'(ci);
          #1;
          if (x < 2 && y < 2) check(1, 64'(s1), o1, 64'(a1), 64'(b1), c1);
          if (x < 4 && y < 4) check(2, 64'(s2), o2, 64'(a2), 64'(b2), c2);
          if (x < 8 && y < 8) check(3, 64'(s3), o3, 64'(a3), 64'(b3), c3);
          check(4, 64'(s4), o4, 64'(a4), 64'(b4), c4);
        end
    repeat (2000) begin
      r    = {$urandom(), $urandom()};
      c    = 1'($urandom());
      prop = ($urandom_range(2) == 0);
      s    = prop ? ~r : {$urandom(), $urandom()};
      a7 = 7'(r);   b7 = 7'(s);   c7 = c;
      a16 = 16'(r); b16 = 16'(s); c16 = c;
      a64 = r;      b64 = s;      c64 = c;
      #1;
      check(7,  64'(s7),  o7,  64'(a7),  64'(b7),  c7);
      check(16, 64'(s16), o16, 64'(a16), 64'(b16), c16);
      check(64, s64,      o64, a64,      b64,      c64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

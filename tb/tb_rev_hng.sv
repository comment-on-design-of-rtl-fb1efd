// tb_rev_hng: exhaustive self-check of the HNG full-adder gate.
//
// Applies all sixteen input patterns, one per clock cycle. References are
// arithmetic: with n = A + B + C, R must be n mod 2 and S must be
// (n div 2) xor D; P and Q must return A and B. With D = 0 this is the full
// adder 2*S + R = A + B + C. Reversibility is checked by requiring sixteen
// distinct output patterns. A watchdog ends the run with a failure after 400
// cycles.
module tb_rev_hng;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, c, d, p, q, r, s;
  int   checks = 0;
  int   failures = 0;
  logic [15:0] seen = '0;

  rev_hng dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (abcd=%0d%0d%0d%0d -> pqrs=%0d%0d%0d%0d)", what, a, b, c, d, p, q, r, s);
    end
  endtask

  initial begin
    int n;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk);
      {a, b, c, d} = 4'(v);
      #1;
      n = int'(a) + int'(b) + int'(c);
      check(p == a, "P = A");
      check(q == b, "Q = B");
      check(int'(r) == n % 2, "R = sum");
      check(int'(s) == ((n / 2) ^ int'(d)), "S = carry xor D");
      if (d == 1'b0) check(2 * int'(s) + int'(r) == n, "full adder with D=0");
      check(!seen[{p, q, r, s}], "outputs distinct (reversible)");
      seen[{p, q, r, s}] = 1'b1;
    end
    check(seen == 16'hffff, "all output patterns reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rev_peres: exhaustive self-check of the Peres gate.
//
// Applies all eight input patterns, one per clock cycle, and compares the
// outputs with arithmetic reference values: P = A, Q = (A + B) mod 2 and
// R = (A*B + C) mod 2. With C = 0 it checks the half-adder reading
// (2*R + Q = A + B), and it checks reversibility: all eight output patterns
// must differ. A watchdog ends the run with a failure after 200 cycles.
module tb_rev_peres;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, c, p, q, r;
  int   checks = 0;
  int   failures = 0;
  logic [7:0] seen = '0;

  rev_peres dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (a=%0d b=%0d c=%0d -> p=%0d q=%0d r=%0d)", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      {a, b, c} = 3'(v);
      #1;
      check(p == a, "P = A");
      check(32'(q) == (int'(a) + int'(b)) % 2, "Q = A xor B");
      check(32'(r) == (int'(a) * int'(b) + int'(c)) % 2, "R = AB xor C");
      if (c == 1'b0) check(2 * int'(r) + int'(q) == int'(a) + int'(b), "half adder with C=0");
      check(!seen[{p, q, r}], "outputs distinct (reversible)");
      seen[{p, q, r}] = 1'b1;
    end
    check(seen == 8'hff, "all output patterns reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

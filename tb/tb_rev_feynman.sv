// tb_rev_feynman: exhaustive self-check of the Feynman gate.
//
// Applies all four input patterns, one per clock cycle, and compares P and Q
// with values computed arithmetically (Q is (A + B) mod 2). It also checks that
// the gate is reversible: the four output patterns must all differ, and with
// B = 0 both outputs must equal A (the copying circuit). A watchdog ends the
// run with a failure if it has not finished after 100 cycles.
module tb_rev_feynman;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, p, q;
  int   checks = 0;
  int   failures = 0;
  logic [3:0] seen = '0;

  rev_feynman dut (.a(a), .b(b), .p(p), .q(q));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (a=%0d b=%0d p=%0d q=%0d)", what, a, b, p, q);
    end
  endtask

  initial begin
    for (int v = 0; v < 4; v++) begin
      @(negedge clk);
      {a, b} = 2'(v);
      #1;
      check(p == a, "P = A");
      check(32'(q) == (int'(a) + int'(b)) % 2, "Q = A xor B");
      if (b == 1'b0) check(p == a && q == a, "copy with B=0");
      check(!seen[{p, q}], "outputs distinct (reversible)");
      seen[{p, q}] = 1'b1;
    end
    check(seen == 4'hf, "all output patterns reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rev_mult4x4: end-to-end check of the reversible 4x4 multiplier.
//
// Runs the top at its default size through every one of the 256 operand pairs,
// one pair per clock cycle (the circuit is combinational, so each result is
// sampled 1 ns after the operands change). For each pair it checks:
//   - the product p against an arithmetic model of the HNG/PG network, built
//     from the operand integers (partial products by shifting, full adders as
//     integer sums split into sum and carry);
//   - the 32 partial-product garbage outputs (x_i and x_i xor y_j) and the 18
//     garbage outputs of the addition network;
// The P garbage output of each Peres gate is the Feynman copy of x_i that the
// gate received, so checking it checks the copying circuits as well.
// It counts how often each mechanism of the design acted: a Feynman copy
// carrying a 1, the carry out of each of the eight HNG gates, a carry passed
// from the first to the second HNG of the same column (these carries are
// internal and are counted on the model once the outputs have matched it),
// and the final carry P7.
// One that never acts is a failure. It also reports, without counting them as
// failures, the operand pairs for which the network's result differs from x*y.
// A watchdog ends the run with a failure after 1000 cycles.
module tb_rev_mult4x4;

  import revmul_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [OPW-1:0]         x, y;
  logic [PRODW-1:0]       p;
  pp_garbage_t            ppg;
  logic [ADD_GARBAGE-1:0] ag;

  rev_mult4x4 dut (.x(x), .y(y), .p(p), .pp_garbage(ppg), .add_garbage(ag));

  int n_copy1 = 0;
  int n_hng_carry[1:8];
  int n_in_column = 0;
  int n_p7 = 0;
  int n_exact = 0;

  function automatic int bitof(input int v, input int k);
    return (v / (1 << k)) % 2;
  endfunction

  // Model of the network: product and garbage for operands xi, yi. Also
  // returns the carry out of each HNG gate.
  task automatic model(input int xi, input int yi, output int pr, output logic [17:0] gr,
                       output logic [8:1] hc);
    int t[4][4];
    int n, c, s;
    int pb[8];
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) t[i][j] = bitof(xi, i) * bitof(yi, j);
    gr = '0;
    pb[0] = t[0][0];
    n = t[1][0] + t[0][1];      pb[1] = n % 2; c = n / 2;  gr[0] = 1'(t[1][0]);
    n = t[2][0] + t[1][1] + c;  s = n % 2; c = n / 2; hc[1] = 1'(c);
    gr[1] = 1'(t[2][0]); gr[2] = 1'(t[1][1]);
    n = s + t[0][2] + c;        pb[2] = n % 2; c = n / 2; hc[2] = 1'(c);
    gr[3] = 1'(s); gr[4] = 1'(t[0][2]);
    n = t[3][0] + t[2][1] + c;  s = n % 2; c = n / 2; hc[3] = 1'(c);
    gr[5] = 1'(t[3][0]); gr[6] = 1'(t[2][1]); gr[7] = 1'(s);
    n = s + t[1][2] + c;        s = n % 2; c = n / 2; hc[4] = 1'(c);
    gr[8] = 1'(t[1][2]); gr[9] = 1'(s);
    n = s + t[0][3] + c;        pb[3] = n % 2; c = n / 2; hc[5] = 1'(c);
    gr[10] = 1'(t[0][3]);
    n = t[3][1] + t[2][2] + c;  s = n % 2; c = n / 2; hc[6] = 1'(c);
    gr[11] = 1'(t[3][1]); gr[12] = 1'(t[2][2]); gr[13] = 1'(s);
    n = s + t[1][3] + c;        pb[4] = n % 2; c = n / 2; hc[7] = 1'(c);
    gr[14] = 1'(t[1][3]);
    n = t[2][3] + t[3][2] + c;  pb[5] = n % 2; c = n / 2; hc[8] = 1'(c);
    gr[15] = 1'(t[2][3]); gr[16] = 1'(t[3][2]);
    n = t[3][3] + c;            pb[6] = n % 2; pb[7] = n / 2;
    gr[17] = 1'(t[3][3]);
    pr = 0;
    for (int k = 0; k < 8; k++) pr += pb[k] << k;
  endtask

  task automatic check(input bit cond, input string what, input int xi, input int yi);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s x=%0d y=%0d", what, xi, yi);
    end
  endtask

  initial begin
    int          pe;
    logic [17:0] ge;
    logic [8:1]  hce;
    foreach (n_hng_carry[k]) n_hng_carry[k] = 0;
    for (int v = 0; v < 256; v++) begin
      @(negedge clk);
      x = 4'(v % 16);
      y = 4'(v / 16);
      #1;
      model(int'(x), int'(y), pe, ge, hce);
      check(int'(p) == pe, "product", int'(x), int'(y));
      check(ag == ge, "adder garbage", int'(x), int'(y));
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          check(ppg[i][j].p == x[i] && ppg[i][j].q == (x[i] ^ y[j]),
                "partial-product garbage", int'(x), int'(y));
          // P of each Peres gate is the Feynman copy of x_i it received.
          n_copy1 += int'(ppg[i][j].p);
        end
      // Carries are internal; they are taken from the model, which the
      // product and the 18 adder garbage bits have just been matched against.
      for (int k = 1; k <= 8; k++) n_hng_carry[k] += int'(hce[k]);
      // First HNG of a multi-gate column handing its carry to the next gate
      // of the same column: HNG 1, 3, 4 and 6.
      n_in_column += int'(hce[1]) + int'(hce[3]) + int'(hce[4]) + int'(hce[6]);
      n_p7 += int'(p[7]);
      if (int'(p) == int'(x) * int'(y)) n_exact++;
      else if (v < 64) $display("note: x=%0d y=%0d gives %0d, x*y=%0d", x, y, p, int'(x) * int'(y));
    end
    check(n_copy1 > 0, "Feynman copy never carried a 1", 0, 0);
    for (int k = 1; k <= 8; k++) check(n_hng_carry[k] > 0, $sformatf("HNG %0d never carried", k), 0, 0);
    check(n_in_column > 0, "in-column carry never happened", 0, 0);
    check(n_p7 > 0, "P7 never set", 0, 0);
    $display("mechanisms: copies carrying 1=%0d in-column carries=%0d P7 set=%0d", n_copy1,
             n_in_column, n_p7);
    for (int k = 1; k <= 8; k++) $display("  HNG %0d carry out set %0d times", k, n_hng_carry[k]);
    $display("operand pairs whose result equals x*y: %0d of 256", n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

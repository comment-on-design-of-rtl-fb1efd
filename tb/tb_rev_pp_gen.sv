// tb_rev_pp_gen: self-check of the reversible partial-product generator.
//
// The default 4x4 instance is driven with all 256 operand pairs, one pair per
// clock cycle. A second instance with N = 6 is driven with 500 random pairs to
// exercise the parameterised copying structure. For every pair and every (i,j)
// the testbench checks pp[i][j] = x_i*y_j and the two garbage outputs of that
// Peres gate (P = x_i, Q = (x_i + y_j) mod 2), all computed from the operand
// integers by shifting and arithmetic. A watchdog ends the run with a failure
// after 2000 cycles.
module tb_rev_pp_gen;

  import revmul_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0]                 x4, y4;
  logic [3:0][3:0]            pp4;
  pg_garbage_t [3:0][3:0]     g4;
  logic [5:0]                 x6, y6;
  logic [5:0][5:0]            pp6;
  pg_garbage_t [5:0][5:0]     g6;

  rev_pp_gen dut4 (.x(x4), .y(y4), .pp(pp4), .garb(g4));
  rev_pp_gen #(.N(6)) dut6 (.x(x6), .y(y6), .pp(pp6), .garb(g6));

  task automatic check(input bit cond, input string what, input int xi, input int yi,
                       input int i, input int j);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s x=%0d y=%0d i=%0d j=%0d", what, xi, yi, i, j);
    end
  endtask

  function automatic int bitof(input int v, input int k);
    return (v / (1 << k)) % 2;
  endfunction

  initial begin
    int xi, yi;
    x6 = '0;
    y6 = '0;
    for (int v = 0; v < 256; v++) begin
      @(negedge clk);
      xi = v % 16;
      yi = v / 16;
      x4 = 4'(xi);
      y4 = 4'(yi);
      #1;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          check(int'(pp4[i][j]) == bitof(xi, i) * bitof(yi, j), "pp4", xi, yi, i, j);
          check(int'(g4[i][j].p) == bitof(xi, i), "garbage P", xi, yi, i, j);
          check(int'(g4[i][j].q) == (bitof(xi, i) + bitof(yi, j)) % 2, "garbage Q", xi, yi, i, j);
        end
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      xi = int'($urandom_range(63));
      yi = int'($urandom_range(63));
      x6 = 6'(xi);
      y6 = 6'(yi);
      #1;
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++)
          check(int'(pp6[i][j]) == bitof(xi, i) * bitof(yi, j), "pp6", xi, yi, i, j);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

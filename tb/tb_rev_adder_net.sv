// tb_rev_adder_net: exhaustive self-check of the HNG/PG addition network.
//
// Drives all 65,536 patterns of the sixteen partial-product inputs, one per
// clock cycle, and compares P0..P7 and the eighteen garbage outputs with an
// arithmetic model of the network: each full adder is modelled as the integer
// sum of its three inputs, split into sum (mod 2) and carry (div 2), chained in
// the order the network is wired. A watchdog ends the run with a failure after
// 70,000 cycles.
module tb_rev_adder_net;

  import revmul_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  pp_array_t               pp;
  logic [PRODW-1:0]        p;
  logic [ADD_GARBAGE-1:0]  g;

  rev_adder_net dut (.pp(pp), .p(p), .g(g));

  // One full adder: returns {carry, sum} of a + b + c.
  function automatic logic [1:0] fa(input int a, input int b, input int c);
    return 2'(a + b + c);
  endfunction

  // Reference model of the network; fills product and garbage.
  task automatic model(input pp_array_t t, output logic [7:0] pr, output logic [17:0] gr);
    logic [1:0] r;
    logic       s;
    pr    = '0;
    gr    = '0;
    pr[0] = t[0][0];
    r = fa(t[1][0], t[0][1], 0);              pr[1] = r[0]; gr[0]  = t[1][0];
    r = fa(t[2][0], t[1][1], r[1]); s = r[0]; gr[1]  = t[2][0]; gr[2]  = t[1][1];
    r = fa(s, t[0][2], r[1]);       pr[2] = r[0]; gr[3]  = s;   gr[4]  = t[0][2];
    r = fa(t[3][0], t[2][1], r[1]); s = r[0]; gr[5]  = t[3][0]; gr[6]  = t[2][1];
    gr[7] = s;
    r = fa(s, t[1][2], r[1]);       s = r[0]; gr[8]  = t[1][2];
    gr[9] = s;
    r = fa(s, t[0][3], r[1]);       pr[3] = r[0]; gr[10] = t[0][3];
    r = fa(t[3][1], t[2][2], r[1]); s = r[0]; gr[11] = t[3][1]; gr[12] = t[2][2];
    gr[13] = s;
    r = fa(s, t[1][3], r[1]);       pr[4] = r[0]; gr[14] = t[1][3];
    r = fa(t[2][3], t[3][2], r[1]); pr[5] = r[0]; gr[15] = t[2][3]; gr[16] = t[3][2];
    r = fa(t[3][3], r[1], 0);       pr[6] = r[0]; pr[7] = r[1]; gr[17] = t[3][3];
  endtask

  initial begin
    logic [7:0]  pe;
    logic [17:0] ge;
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      pp = pp_array_t'(v);
      #1;
      model(pp, pe, ge);
      checks++;
      if (p !== pe) begin
        failures++;
        if (failures < 10) $display("FAIL: pp=%h p=%h expected %h", pp, p, pe);
      end
      checks++;
      if (g !== ge) begin
        failures++;
        if (failures < 10) $display("FAIL: pp=%h g=%h expected %h", pp, g, ge);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// mo_esop_fig3_tb: exhaustive check of the five-output example cascade.
//
// For all eight values of A, B, C the five outputs are compared with the
// ESOP expressions, the lines must leave in true polarity, and the
// intermediate values of the cascade are checked at each gate: the 0
// passed from gates 1 and 6 to their successors, the copies made by
// P_{k-1}, the partial sums AB' ^ AB'C and AB' ^ AC, and the two garbage
// outputs. The widths of `garbage` (2) and the gate count (7) are checked
// against the figures the example quotes.
module mo_esop_fig3_tb;
  int checks = 0;
  int failures = 0;

  logic       a, b, c;
  logic [4:0] f;
  logic [2:0] abc_o;
  logic [1:0] garbage;
  logic [6:0] p_km1, p_k;

  mo_esop_fig3 dut (.*);

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (abc=%b%b%b): got %h expected %h", what, a, b, c, got, exp);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ab_, ab_c, ac, bc_, a_b_c;
    check("garbage count", $bits(garbage), 2);
    check("gate count", $bits(p_k), 7);
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      ab_ = a & !b; ab_c = a & !b & c; ac = a & c; bc_ = b & !c; a_b_c = !a & !b & c;
      check("F1", f[0], ab_ ^ ab_c);
      check("F2", f[1], ac ^ a_b_c);
      check("F3", f[2], ab_ ^ ab_c ^ bc_);
      check("F4", f[3], ac);
      check("F5", f[4], ab_ ^ ac ^ bc_);
      check("lines", abc_o, {c, b, a});
      check("gate1 zero", p_km1[0], 0);
      check("gate1 AB'", p_k[0], ab_);
      check("gate2 copy", p_km1[1], ab_);
      check("gate2 sum", p_k[1], ab_ ^ ab_c);
      check("gate3 sum", p_k[2], ab_ ^ ac);
      check("gate6 zero", p_km1[5], 0);
      check("gate6 AC", p_k[5], ac);
      check("garbage", garbage, {ab_ ^ ac, ab_});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

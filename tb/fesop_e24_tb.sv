// fesop_e24_tb: exhaustive check of the factorized E_2^4 cascade.
//
// For all sixteen values of x1..x4 the output is compared with the
// unfactorized definition (EXOR of x_i x_j over all six pairs i < j, which
// is 1 when two or three of the inputs are 1), the lines must pass
// unchanged, and the intermediate values are checked: x1 ^ x2 after gate 1,
// the product (x1 ^ x2)(x3 ^ x4) made by gate 2 in mode G0 with its OR
// garbage, and the two copy garbage outputs of gates 3 and 4.
module fesop_e24_tb;
  int checks = 0;
  int failures = 0;

  logic [3:0] x, x_o;
  logic       e24;
  logic [2:0] garbage;
  logic [3:0] p_km1, p_k;

  fesop_e24 dut (.*);

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (x=%b): got %h expected %h", what, x, got, exp);
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
    logic e, s12, s34, g2;
    check("garbage count", $bits(garbage), 3);
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      e = 0;
      for (int i = 0; i < 4; i++)
        for (int j = i + 1; j < 4; j++)
          e ^= x[i] & x[j];
      check("E24 pairs", e24, e);
      check("E24 weight", e24, ($countones(x) == 2 || $countones(x) == 3));
      check("lines", x_o, x);
      s12 = x[0] ^ x[1];
      s34 = x[2] ^ x[3];
      g2  = s12 & s34;
      check("gate1 zero", p_km1[0], 0);
      check("gate1 sum", p_k[0], s12);
      check("gate2 product", p_km1[1], g2);
      check("gate3 sum", p_k[2], g2 ^ (x[0] & x[1]));
      check("garbage", garbage, {g2 ^ (x[0] & x[1]), g2, s12 | s34});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

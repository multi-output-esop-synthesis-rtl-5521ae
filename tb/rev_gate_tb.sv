// rev_gate_tb: exhaustive check of the k*k reversible gate.
//
// Three gates are tested: k = 3 with f = A_1, k = 5 with f a product of
// A_1 and A_3, and k = 6 with f an EXOR-sum of A_2, A_3, A_4. For every
// input vector the testbench works out f from the mask itself and compares
// the control outputs with the mode table of the gate (inputs 00 -> 0, f;
// 01 -> 1, f'; 10 -> f, 1; 11 -> f', 0), checks that A_1..A_{k-2} pass
// unchanged, and checks that no two input vectors give the same output
// vector (the gate is reversible). Combinational: each vector is given 1 ns.
module rev_gate_tb;
  import rev_esop_pkg::*;

  int checks = 0;
  int failures = 0;

  // k = 3, f = A_1
  logic [0:0] t3;
  logic       c3_1, c3_0, q3_1, q3_0;
  logic [0:0] pt3;
  rev_gate #(.K(3), .F_TYPE(F_AND), .F_MASK(1'b1)) u3 (
    .a_thru(t3), .a_km1(c3_1), .a_k(c3_0), .p_thru(pt3), .p_km1(q3_1), .p_k(q3_0));

  // k = 5, f = A_1 & A_3
  logic [2:0] t5, pt5;
  logic       c5_1, c5_0, q5_1, q5_0;
  rev_gate #(.K(5), .F_TYPE(F_AND), .F_MASK(3'b101)) u5 (
    .a_thru(t5), .a_km1(c5_1), .a_k(c5_0), .p_thru(pt5), .p_km1(q5_1), .p_k(q5_0));

  // k = 6, f = A_2 ^ A_3 ^ A_4
  logic [3:0] t6, pt6;
  logic       c6_1, c6_0, q6_1, q6_0;
  rev_gate #(.K(6), .F_TYPE(F_XOR), .F_MASK(4'b1110)) u6 (
    .a_thru(t6), .a_km1(c6_1), .a_k(c6_0), .p_thru(pt6), .p_km1(q6_1), .p_k(q6_0));

  // Expected control outputs from the mode table.
  function automatic logic [1:0] mode_out(logic fv, logic c1, logic c0);
    case ({c1, c0})
      2'b00:   return {1'b0, fv};
      2'b01:   return {1'b1, ~fv};
      2'b10:   return {fv, 1'b1};
      default: return {~fv, 1'b0};
    endcase
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  bit seen3 [8];
  bit seen5 [32];
  bit seen6 [64];

  initial begin
    #100us;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic fv;
    logic [1:0] e;
    for (int v = 0; v < 8; v++) begin
      {t3, c3_1, c3_0} = 3'(v);
      #1;
      fv = t3[0];
      e = mode_out(fv, c3_1, c3_0);
      check("k3 control", {q3_1, q3_0}, e);
      check("k3 thru", pt3, t3);
      check("k3 unique", seen3[{pt3, q3_1, q3_0}], 0);
      seen3[{pt3, q3_1, q3_0}] = 1;
    end
    for (int v = 0; v < 32; v++) begin
      {t5, c5_1, c5_0} = 5'(v);
      #1;
      fv = t5[0] & t5[2];
      e = mode_out(fv, c5_1, c5_0);
      check("k5 control", {q5_1, q5_0}, e);
      check("k5 thru", pt5, t5);
      check("k5 unique", seen5[{pt5, q5_1, q5_0}], 0);
      seen5[{pt5, q5_1, q5_0}] = 1;
    end
    for (int v = 0; v < 64; v++) begin
      {t6, c6_1, c6_0} = 6'(v);
      #1;
      fv = t6[1] ^ t6[2] ^ t6[3];
      e = mode_out(fv, c6_1, c6_0);
      check("k6 control", {q6_1, q6_0}, e);
      check("k6 thru", pt6, t6);
      check("k6 unique", seen6[{pt6, q6_1, q6_0}], 0);
      seen6[{pt6, q6_1, q6_0}] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

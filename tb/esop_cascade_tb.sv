// esop_cascade_tb: exhaustive check of the generic cascade with three
// implementation graphs.
//
//  * defaults: the seven-gate, five-output example (F1..F5 on A, B, C);
//  * xor5: the single-output ESOP x1 ^ x2 ^ x3 ^ x4 ^ x5 as a chain of five
//    one-literal product gates, gate 1's P_{k-1} (always 0) reused as gate
//    2's A_{k-1}; a single-output chain of n products has n gates, n - 1
//    garbage outputs and n constants;
//  * neg4: the single-output ESOP a'b ^ bc'd' ^ a'd ^ c, which switches line
//    polarity back and forth between gates.
// Expected values are computed from the ESOP expressions. The garbage and
// constant counts are checked by elaboration (N_GARB, N_CONST) and the
// garbage values against the partial sums they must carry.
module esop_cascade_tb;
  import rev_esop_pkg::*;

  int checks = 0;
  int failures = 0;

  // ---- default graph ----
  logic [2:0] x3, x3_o;
  logic [4:0] f3;
  logic [1:0] g3;
  logic [6:0] km1_3, k_3;
  esop_cascade dut_fig3 (
    .x(x3), .fout(f3), .x_o(x3_o), .garbage(g3), .p_km1(km1_3), .p_k(k_3));

  // ---- xor5 ----
  localparam int X5_NG = 5;
  typedef gate_desc_t [X5_NG-1:0] x5_gates_t;
  function automatic x5_gates_t x5_gates();
    x5_gates_t g;
    g[0] = mk_gate(F_AND, 64'(1), '0, zero(), zero());
    g[1] = mk_gate(F_AND, 64'(2), '0, pkm1(0), pk(0));
    for (int i = 2; i < X5_NG; i++)
      g[i] = mk_gate(F_AND, 64'(1) << i, '0, zero(), pk(i - 1));
    return g;
  endfunction
  localparam src_t [0:0] X5_OUTS = pk(4);

  logic [4:0] x5, x5_o;
  logic [0:0] f5;
  logic [3:0] g5;
  logic [4:0] km1_5, k_5;
  esop_cascade #(
    .NV(5), .NG(X5_NG), .NO(1), .N_GARB(4), .N_CONST(5),
    .GATES(x5_gates()), .OUTS(X5_OUTS)
  ) dut_xor5 (
    .x(x5), .fout(f5), .x_o(x5_o), .garbage(g5), .p_km1(km1_5), .p_k(k_5));

  // ---- neg4: lines a = 0, b = 1, c = 2, d = 3 ----
  typedef gate_desc_t [3:0] n4_gates_t;
  function automatic n4_gates_t n4_gates();
    n4_gates_t g;
    g[0] = mk_gate(F_AND, 64'b0010, 64'b0001, zero(), zero());    // a'b
    g[1] = mk_gate(F_AND, 64'b0010, 64'b1100, pkm1(0), pk(0));    // bc'd'
    g[2] = mk_gate(F_AND, 64'b1000, 64'b0001, zero(), pk(1));     // a'd
    g[3] = mk_gate(F_AND, 64'b0100, 64'b0000, zero(), pk(2));     // c
    return g;
  endfunction
  localparam src_t [0:0] N4_OUTS = pk(3);

  logic [3:0] x4, x4_o;
  logic [0:0] f4;
  logic [2:0] g4;
  logic [3:0] km1_4, k_4;
  esop_cascade #(
    .NV(4), .NG(4), .NO(1), .N_GARB(3), .N_CONST(4),
    .GATES(n4_gates()), .OUTS(N4_OUTS)
  ) dut_neg4 (
    .x(x4), .fout(f4), .x_o(x4_o), .garbage(g4), .p_km1(km1_4), .p_k(k_4));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    logic a, b, c, d, ab_, ab_c, ac, bc_, a_b_c;
    logic [4:0] ef;

    for (int v = 0; v < 8; v++) begin
      x3 = 3'(v);
      #1;
      {c, b, a} = x3;
      ab_ = a & ~b; ab_c = a & ~b & c; ac = a & c; bc_ = b & ~c; a_b_c = ~a & ~b & c;
      ef[0] = ab_ ^ ab_c;
      ef[1] = ac ^ a_b_c;
      ef[2] = ab_ ^ ab_c ^ bc_;
      ef[3] = ac;
      ef[4] = ab_ ^ ac ^ bc_;
      check("fig3 outputs", f3, ef);
      check("fig3 lines", x3_o, x3);
      check("fig3 garbage", g3, {ab_ ^ ac, ab_});
    end

    for (int v = 0; v < 32; v++) begin
      x5 = 5'(v);
      #1;
      check("xor5 output", f5, ^x5);
      check("xor5 lines", x5_o, x5);
      // garbage: P_{k-1} of gates 2..5 carries the running sum before them
      check("xor5 garbage", g5, {^x5[3:0], ^x5[2:0], ^x5[1:0], x5[0]});
    end

    for (int v = 0; v < 16; v++) begin
      x4 = 4'(v);
      #1;
      {d, c, b, a} = x4;
      check("neg4 output", f4, (~a & b) ^ (b & ~c & ~d) ^ (~a & d) ^ c);
      check("neg4 lines", x4_o, x4);
      check("neg4 garbage", g4, {(~a & b) ^ (b & ~c & ~d) ^ (~a & d),
                                 (~a & b) ^ (b & ~c & ~d), ~a & b});
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// rev_esop_top_tb: end-to-end test of both example cascades at their
// default (and only) size.
//
// All 8 x 16 combinations of (A, B, C) and (x1..x4) are applied at once, so
// the two cascades are also checked for independence. Outputs are compared
// with the ESOP expressions and with E_2^4 computed from its definition.
//
// From the gate control outputs and the gate lists in rev_esop_pkg the
// testbench rebuilds the two control inputs of every gate and counts how
// often each mechanism of the method is exercised:
//   mode 00  - a gate starting a chain from two constants,
//   mode 0G  - a gate adding its product to a chain (G = 1 seen),
//   mode G0  - a gate multiplying the chain by its EXOR-sum (G = 1 seen),
//   copy     - P_{k-1} of a 0G gate carrying a 1 on to a later gate or an
//              output (fan-out without fan-out),
//   reuse 0  - a P_{k-1} that is always 0 feeding the next gate's A_{k-1},
//   inverted - a product of complemented literals (A'B'C) being 1,
//   garbage  - a garbage output being 1.
// A mechanism that never occurs counts as a failure.
module rev_esop_top_tb;
  import rev_esop_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       a, b, c;
  logic [4:0] f;
  logic [2:0] abc_o;
  logic [1:0] f_garbage;
  logic [6:0] f_p_km1, f_p_k;
  logic [3:0] x, x_o;
  logic       e24;
  logic [2:0] e_garbage;
  logic [3:0] e_p_km1, e_p_k;

  rev_esop_top dut (.*);

  localparam fig3_gates_t G3 = fig3_gates();
  localparam fig4_gates_t G4 = fig4_gates();

  int n_mode00, n_mode0g, n_modeg0, n_copy, n_reuse0, n_inverted, n_garbage;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (abc=%b%b%b x=%b): got %h expected %h", what, a, b, c, x, got, exp);
    end
  endtask

  function automatic logic src_val(src_t s, logic [6:0] km1, logic [6:0] k);
    case (s.kind)
      SRC_PKM1: return km1[s.gate];
      SRC_PK:   return k[s.gate];
      default:  return 1'b0;
    endcase
  endfunction

  // Is control output `which` of gate g read by a later gate in the list?
  function automatic bit fed_on(gate_desc_t gl [], src_kind_e which, int g);
    foreach (gl[i])
      if ((gl[i].akm1.kind == which && int'(gl[i].akm1.gate) == g) ||
          (gl[i].ak.kind == which && int'(gl[i].ak.gate) == g))
        return 1;
    return 0;
  endfunction

  // Classify every gate of one cascade for the current input vector.
  task automatic count_modes(gate_desc_t gl [], logic [6:0] km1, logic [6:0] k);
    foreach (gl[i]) begin
      logic c1, c0;
      c1 = src_val(gl[i].akm1, km1, k);
      c0 = src_val(gl[i].ak, km1, k);
      if (gl[i].akm1.kind == SRC_ZERO && gl[i].ak.kind == SRC_ZERO) n_mode00++;
      if (gl[i].akm1.kind == SRC_ZERO && gl[i].ak.kind != SRC_ZERO && c0) begin
        n_mode0g++;
        // P_{k-1} must equal the chain value G it copies
        check("copy equals G", km1[i], c0);
        n_copy++;
      end
      if (gl[i].akm1.kind != SRC_ZERO && gl[i].ak.kind != SRC_ZERO &&
          gl[i].akm1.kind == SRC_PKM1 && c1 == 1'b0) n_reuse0++;
      if (gl[i].akm1.kind != SRC_ZERO && gl[i].ak.kind == SRC_PKM1 &&
          c0 == 1'b0 && c1) n_modeg0++;
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gate_desc_t gl3 [], gl4 [];
    logic ab_, ab_c, ac, bc_, a_b_c, e;
    logic [6:0] ek, ekm1;

    gl3 = new[FIG3_NG];
    gl4 = new[FIG4_NG];
    foreach (gl3[i]) gl3[i] = G3[i];
    foreach (gl4[i]) gl4[i] = G4[i];

    // the copy outputs that are actually passed on
    check("gate2 copy used", fed_on(gl3, SRC_PKM1, 1), 1);
    check("gate1 zero used", fed_on(gl3, SRC_PKM1, 0), 1);

    {n_mode00, n_mode0g, n_modeg0, n_copy, n_reuse0, n_inverted, n_garbage} = '0;

    for (int v = 0; v < 128; v++) begin
      {a, b, c, x} = 7'(v);
      #1;
      ab_ = a & !b; ab_c = a & !b & c; ac = a & c; bc_ = b & !c; a_b_c = !a & !b & c;
      check("F1", f[0], ab_ ^ ab_c);
      check("F2", f[1], ac ^ a_b_c);
      check("F3", f[2], ab_ ^ ab_c ^ bc_);
      check("F4", f[3], ac);
      check("F5", f[4], ab_ ^ ac ^ bc_);
      check("abc lines", abc_o, {c, b, a});
      check("F garbage", f_garbage, {ab_ ^ ac, ab_});

      e = 0;
      for (int i = 0; i < 4; i++)
        for (int j = i + 1; j < 4; j++)
          e ^= x[i] & x[j];
      check("E24", e24, e);
      check("x lines", x_o, x);
      check("E garbage", e_garbage,
            {((x[0] ^ x[1]) & (x[2] ^ x[3])) ^ (x[0] & x[1]),
             (x[0] ^ x[1]) & (x[2] ^ x[3]), (x[0] ^ x[1]) | (x[2] ^ x[3])});

      count_modes(gl3, f_p_km1, f_p_k);
      ekm1 = 7'(e_p_km1);
      ek   = 7'(e_p_k);
      count_modes(gl4, ekm1, ek);
      if (f[1] ^ f[3]) n_inverted++;
      n_garbage += $countones({f_garbage, e_garbage});
    end

    $display("mode00=%0d mode0G=%0d modeG0=%0d copy=%0d reuse0=%0d inverted=%0d garbage=%0d",
             n_mode00, n_mode0g, n_modeg0, n_copy, n_reuse0, n_inverted, n_garbage);
    checks++; if (n_mode00 == 0)   begin failures++; $display("FAIL mode 00 never used"); end
    checks++; if (n_mode0g == 0)   begin failures++; $display("FAIL mode 0G never used"); end
    checks++; if (n_modeg0 == 0)   begin failures++; $display("FAIL mode G0 never used"); end
    checks++; if (n_copy == 0)     begin failures++; $display("FAIL copy never used"); end
    checks++; if (n_reuse0 == 0)   begin failures++; $display("FAIL zero reuse never seen"); end
    checks++; if (n_inverted == 0) begin failures++; $display("FAIL inverted product never 1"); end
    checks++; if (n_garbage == 0)  begin failures++; $display("FAIL garbage never 1"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

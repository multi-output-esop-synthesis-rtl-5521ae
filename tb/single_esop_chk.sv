// single_esop_chk: builds a pseudo-random single-output ESOP of NP products
// over NV variables, realizes it as a chain of NP gates in esop_cascade and
// checks the cascade against the ESOP evaluated directly: for every input
// vector when NV <= 16, otherwise for NVEC pseudo-random vectors.
//
// The chain is the single-output form of the method: gate 1 starts from two
// constants, gate 2 takes gate 1's always-0 P_{k-1} as its A_{k-1} and its
// P_k as the chain, every later gate adds its product to the chain with a
// constant 0 on A_{k-1}. Hence NP gates, NP - 1 garbage outputs (the P_{k-1}
// copies of gates 2..NP) and NP constants, which esop_cascade verifies at
// elaboration through N_GARB and N_CONST. Each literal is present with
// probability 3/8 and complemented with probability 1/2, drawn from a
// linear congruential generator seeded by SEED.
module single_esop_chk
  import rev_esop_pkg::*;
#(
  parameter int NV   = 5,
  parameter int NP   = 5,
  parameter int SEED = 1,
  parameter int NVEC = 4096
) (
  output int checks,
  output int failures,
  output bit done
);

  typedef gate_desc_t [NP-1:0] gates_t;

  function automatic gates_t make_gates();
    gates_t g;
    logic [31:0] s;
    logic [MAX_V-1:0] pos, neg;
    s = 32'(SEED);
    for (int i = 0; i < NP; i++) begin
      pos = '0;
      neg = '0;
      for (int v = 0; v < NV; v++) begin
        s = s * 32'd1664525 + 32'd1013904223;
        if (s[31:29] < 3'd3) begin
          if (s[20]) neg[v] = 1'b1;
          else       pos[v] = 1'b1;
        end
      end
      if (i == 0)      g[i] = mk_gate(F_AND, pos, neg, zero(), zero());
      else if (i == 1) g[i] = mk_gate(F_AND, pos, neg, pkm1(0), pk(0));
      else             g[i] = mk_gate(F_AND, pos, neg, zero(), pk(i - 1));
    end
    return g;
  endfunction

  localparam gates_t GATES = make_gates();
  localparam src_t [0:0] OUTS = pk(NP - 1);

  logic [NV-1:0] x, x_o;
  logic [0:0]    fout;
  logic [NP-2:0] garbage;
  logic [NP-1:0] p_km1, p_k;

  esop_cascade #(
    .NV(NV), .NG(NP), .NO(1), .N_GARB(NP - 1), .N_CONST(NP),
    .GATES(GATES), .OUTS(OUTS)
  ) dut (
    .x(x), .fout(fout), .x_o(x_o), .garbage(garbage), .p_km1(p_km1), .p_k(p_k));

  function automatic logic esop_value(logic [NV-1:0] xv, int upto);
    logic r, t;
    r = 1'b0;
    for (int i = 0; i < upto; i++) begin
      t = 1'b1;
      for (int v = 0; v < NV; v++)
        if (GATES[i].vars[v]) t &= xv[v] ^ GATES[i].neg[v];
      r ^= t;
    end
    return r;
  endfunction

  initial begin
    int ones;
    longint nvec;
    ones = 0;
    nvec = (NV <= 16) ? (longint'(1) << NV) : longint'(NVEC);
    checks = 0;
    failures = 0;
    done = 0;
    for (longint v = 0; v < nvec; v++) begin
      if (NV <= 16) x = NV'(v);
      else for (int i = 0; i < NV; i++) x[i] = 1'($urandom);
      #1;
      checks++;
      if (fout[0] !== esop_value(x, NP)) begin
        failures++;
        $display("FAIL NV=%0d NP=%0d x=%h: got %b", NV, NP, x, fout[0]);
      end
      ones += int'(fout[0]);
      checks++;
      if (x_o !== x) begin
        failures++;
        $display("FAIL NV=%0d NP=%0d lines x=%h x_o=%h", NV, NP, x, x_o);
      end
      // last garbage output: the chain before the last product
      checks++;
      if (garbage[NP-2] !== esop_value(x, NP - 1)) begin
        failures++;
        $display("FAIL NV=%0d NP=%0d garbage x=%h", NV, NP, x);
      end
    end
    // an ESOP that never (or always) evaluates to 1 would test little
    checks++;
    if (ones == 0 || longint'(ones) == nvec) begin
      failures++;
      $display("FAIL NV=%0d NP=%0d: output constant", NV, NP);
    end
    $display("NV=%0d NP=%0d gates=%0d garbage=%0d ones=%0d of %0d",
             NV, NP, NP, $bits(garbage), ones, nvec);
    done = 1;
  end

endmodule

// esop_cascade: a cascade of k*k reversible gates built from an
// implementation graph, realizing a multi-output (factorized) ESOP.
//
// The primary variables run along NV pass-through lines through every gate
// (k = NV + 2). Gate g computes its f from those lines and combines it with
// its two control inputs A_{k-1}, A_k. Each control input is either a
// constant 0 or exactly one control output of an earlier gate, as listed
// in GATES; a product is added to an EXOR chain by feeding the chain into
// A_k with A_{k-1} = 0 (P_k = chain ^ f), and the same gate's P_{k-1} copies
// the chain, which is how one partial sum reaches two places without
// fan-out. Function outputs are picked from control outputs by OUTS.
//
// Complemented literals are made by inverter columns on the lines. The
// polarity of each line is tracked at elaboration: in front of gate g the
// lines it reads are set to the polarity it asks for, all others keep
// theirs, and a last column gives the variables back in true polarity.
//
// Control outputs that are neither used by a later gate nor a function
// output are garbage outputs; they leave on `garbage` in gate order
// (P_{k-1} before P_k). N_GARB and N_CONST state how many garbage outputs
// and constant inputs the graph has; elaboration stops if they are wrong,
// if a control output is used twice (fan-out above one) or if a gate reads
// a later gate (not a cascade). The defaults are the five-output example
// cascade of 7 gates with 2 garbage outputs and 7 constants.
//
// The gate, the modes used and the graph rules are those of the synthesis
// method; the description format, the polarity tracking and the port list
// are this design's own. Purely combinational.
module esop_cascade
  import rev_esop_pkg::*;
#(
  parameter int NV      = FIG3_NV,   // primary variables / pass-through lines
  parameter int NG      = FIG3_NG,   // gates in the cascade
  parameter int NO      = FIG3_NO,   // function outputs
  parameter int N_GARB  = 2,         // garbage outputs the graph yields
  parameter int N_CONST = 7,         // constant-0 inputs the graph needs
  parameter gate_desc_t [NG-1:0] GATES = fig3_gates(),
  parameter src_t [NO-1:0]       OUTS  = fig3_outs()
) (
  input  logic [NV-1:0]     x,        // primary variables
  output logic [NO-1:0]     fout,     // function outputs
  output logic [NV-1:0]     x_o,      // variables after the cascade
  output logic [N_GARB-1:0] garbage,  // unused control outputs
  output logic [NG-1:0]     p_km1,    // P_{k-1} of every gate
  output logic [NG-1:0]     p_k       // P_k of every gate
);

  localparam int K = NV + 2;

  // ---------------------------------------------------------------------
  // Elaboration-time analysis of the graph
  // ---------------------------------------------------------------------
  function automatic logic [NV-1:0] pol_before(int g);
    logic [MAX_V-1:0] p = '0;
    for (int i = 0; i < g; i++)
      p = (p & ~GATES[i].vars) | (GATES[i].neg & GATES[i].vars);
    return p[NV-1:0];
  endfunction

  typedef int gate_int_t [NG];

  // Number of places that read control output `which` of every gate (later
  // gates and function outputs).
  function automatic gate_int_t count_uses(src_kind_e which);
    gate_int_t n;
    for (int i = 0; i < NG; i++) n[i] = 0;
    for (int i = 0; i < NG; i++) begin
      if (GATES[i].akm1.kind == which && int'(GATES[i].akm1.gate) < NG)
        n[int'(GATES[i].akm1.gate)]++;
      if (GATES[i].ak.kind == which && int'(GATES[i].ak.gate) < NG)
        n[int'(GATES[i].ak.gate)]++;
    end
    for (int i = 0; i < NO; i++)
      if (OUTS[i].kind == which && int'(OUTS[i].gate) < NG)
        n[int'(OUTS[i].gate)]++;
    return n;
  endfunction

  localparam gate_int_t USES_KM1 = count_uses(SRC_PKM1);
  localparam gate_int_t USES_K   = count_uses(SRC_PK);

  // Position on `garbage` of the P_{k-1} (pick_k = 0) or P_k (pick_k = 1)
  // output of every gate: the number of garbage outputs ahead of it.
  function automatic gate_int_t garb_pos(bit pick_k);
    gate_int_t pos;
    int n = 0;
    for (int i = 0; i < NG; i++) begin
      if (!pick_k) pos[i] = n;
      if (USES_KM1[i] == 0) n++;
      if (pick_k) pos[i] = n;
      if (USES_K[i] == 0) n++;
    end
    return pos;
  endfunction

  function automatic int count_garb();
    int n = 0;
    for (int i = 0; i < NG; i++) begin
      if (USES_KM1[i] == 0) n++;
      if (USES_K[i] == 0) n++;
    end
    return n;
  endfunction

  localparam gate_int_t GPOS_KM1 = garb_pos(1'b0);
  localparam gate_int_t GPOS_K   = garb_pos(1'b1);

  function automatic int count_const();
    int n = 0;
    for (int i = 0; i < NG; i++) begin
      if (GATES[i].akm1.kind == SRC_ZERO) n++;
      if (GATES[i].ak.kind == SRC_ZERO) n++;
    end
    return n;
  endfunction

  function automatic bit src_ok(src_t s, int g);
    if (s.kind == SRC_ZERO) return 1'b1;
    if (s.kind != SRC_PKM1 && s.kind != SRC_PK) return 1'b0;
    return int'(s.gate) < g;
  endfunction

  function automatic bit graph_ok();
    for (int i = 0; i < NG; i++) begin
      if (!src_ok(GATES[i].akm1, i) || !src_ok(GATES[i].ak, i)) return 1'b0;
      if (USES_KM1[i] > 1 || USES_K[i] > 1) return 1'b0;
      if (GATES[i].vars[MAX_V-1:NV] != '0) return 1'b0;
    end
    for (int i = 0; i < NO; i++)
      if (OUTS[i].kind == SRC_ZERO || !src_ok(OUTS[i], NG)) return 1'b0;
    return 1'b1;
  endfunction

  localparam int GARB_COUNT = count_garb();
  localparam int CONST_COUNT = count_const();

  if (NV < 1 || NV > MAX_V || NG < 1 || NO < 1) begin : g_bad_size
    $error("esop_cascade: size parameters out of range");
  end
  if (!graph_ok()) begin : g_bad_graph
    $error("esop_cascade: not a single-fan-out acyclic cascade");
  end
  if (GARB_COUNT != N_GARB) begin : g_bad_garb
    $error("esop_cascade: graph has %0d garbage outputs, N_GARB is %0d", GARB_COUNT, N_GARB);
  end
  if (CONST_COUNT != N_CONST) begin : g_bad_const
    $error("esop_cascade: graph needs %0d constants, N_CONST is %0d", CONST_COUNT, N_CONST);
  end

  // ---------------------------------------------------------------------
  // The cascade
  // ---------------------------------------------------------------------
  logic [NV-1:0] line_pre [NG+1];  // lines in front of each inverter column
  logic [NV-1:0] line_in  [NG];    // lines entering each gate
  logic          a_km1    [NG];
  logic          a_k      [NG];
  logic          pkm1_w   [NG];
  logic          pk_w     [NG];

  assign line_pre[0] = x;

  for (genvar g = 0; g < NG; g++) begin : g_stage
    // Inverters between the polarity after gate g-1 and the polarity gate
    // g reads, which is the polarity after gate g.
    localparam logic [NV-1:0] COL = pol_before(g) ^ pol_before(g + 1);
    localparam src_t S1 = GATES[g].akm1;
    localparam src_t S0 = GATES[g].ak;
    localparam int   I1 = int'(S1.gate);
    localparam int   I0 = int'(S0.gate);

    rev_inv_column #(.W(NV), .INV(COL)) u_inv (
      .a (line_pre[g]),
      .p (line_in[g])
    );

    if (S1.kind == SRC_ZERO) begin : g_c1_zero
      assign a_km1[g] = 1'b0;
    end else if (S1.kind == SRC_PKM1) begin : g_c1_km1
      assign a_km1[g] = pkm1_w[I1];
    end else begin : g_c1_k
      assign a_km1[g] = pk_w[I1];
    end

    if (S0.kind == SRC_ZERO) begin : g_c0_zero
      assign a_k[g] = 1'b0;
    end else if (S0.kind == SRC_PKM1) begin : g_c0_km1
      assign a_k[g] = pkm1_w[I0];
    end else begin : g_c0_k
      assign a_k[g] = pk_w[I0];
    end

    rev_gate #(
      .K      (K),
      .F_TYPE (GATES[g].ftype),
      .F_MASK (GATES[g].vars[NV-1:0])
    ) u_gate (
      .a_thru (line_in[g]),
      .a_km1  (a_km1[g]),
      .a_k    (a_k[g]),
      .p_thru (line_pre[g+1]),
      .p_km1  (pkm1_w[g]),
      .p_k    (pk_w[g])
    );

    assign p_km1[g] = pkm1_w[g];
    assign p_k[g]   = pk_w[g];

    if (USES_KM1[g] == 0) begin : g_garb_km1
      assign garbage[GPOS_KM1[g]] = pkm1_w[g];
    end
    if (USES_K[g] == 0) begin : g_garb_k
      assign garbage[GPOS_K[g]] = pk_w[g];
    end
  end

  // Last column: give the variables back in true polarity.
  rev_inv_column #(.W(NV), .INV(pol_before(NG))) u_inv_out (
    .a (line_pre[NG]),
    .p (x_o)
  );

  for (genvar o = 0; o < NO; o++) begin : g_out
    localparam int IO = int'(OUTS[o].gate);
    if (OUTS[o].kind == SRC_PKM1) begin : g_km1
      assign fout[o] = pkm1_w[IO];
    end else begin : g_k
      assign fout[o] = pk_w[IO];
    end
  end

endmodule

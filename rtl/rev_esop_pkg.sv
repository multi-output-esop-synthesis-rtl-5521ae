// rev_esop_pkg: types and constants shared by the reversible ESOP cascade.
//
// A cascade is described by its implementation graph: an ordered list of
// k*k gates. Each gate names the pass-through lines its function f reads,
// whether f is a product (AND) or an EXOR-sum of them, which of those lines
// it wants complemented, and where its two control inputs come from: a
// constant 0 or one control output (P_{k-1} or P_k) of an earlier gate.
// Function outputs are likewise taken from gate control outputs.
//
// The cascade module evaluates a description at elaboration time:
// line polarity before each gate (used to place inverter columns), the
// number of input constants, the number of garbage outputs, and the
// single-fan-out / acyclicity rule that every reversible circuit obeys.
// The gate family and the graph rules follow the synthesis method; the
// encoding of the description is this design's own.
package rev_esop_pkg;

  // Largest number of pass-through lines (primary variables) a description
  // can address, and largest gate index. Chosen to cover the largest
  // benchmark input count reported for the method (41 inputs, 1742 gates).
  localparam int MAX_V = 64;
  localparam int GIDX_W = 12;

  typedef enum logic [1:0] {
    SRC_ZERO = 2'd0,  // constant 0 applied at this input
    SRC_PKM1 = 2'd1,  // P_{k-1} output of gate `gate`
    SRC_PK   = 2'd2   // P_k output of gate `gate`
  } src_kind_e;

  typedef struct packed {
    src_kind_e         kind;
    logic [GIDX_W-1:0] gate;
  } src_t;

  typedef enum logic {
    F_AND = 1'b0,     // f = product of the selected lines
    F_XOR = 1'b1      // f = EXOR-sum of the selected lines
  } ftype_e;

  typedef struct packed {
    ftype_e           ftype;
    logic [MAX_V-1:0] vars;  // lines f reads
    logic [MAX_V-1:0] neg;   // of those, lines read complemented
    src_t             akm1;  // source of control input A_{k-1}
    src_t             ak;    // source of control input A_k
  } gate_desc_t;

  function automatic src_t zero();
    return '{kind: SRC_ZERO, gate: '0};
  endfunction

  function automatic src_t pkm1(int g);
    return '{kind: SRC_PKM1, gate: GIDX_W'(g)};
  endfunction

  function automatic src_t pk(int g);
    return '{kind: SRC_PK, gate: GIDX_W'(g)};
  endfunction

  // Product or EXOR-sum gate. pos/neg are the true and complemented
  // literals, given as bit masks over the lines.
  function automatic gate_desc_t mk_gate(ftype_e t, logic [MAX_V-1:0] pos,
                                         logic [MAX_V-1:0] negl, src_t a1, src_t a0);
    return '{ftype: t, vars: pos | negl, neg: negl, akm1: a1, ak: a0};
  endfunction

  // Line numbering used by the worked examples: line 0 is the first
  // primary variable (A or x1), line 1 the second, and so on.

  // Figure 3: F1 = AB' ^ AB'C, F2 = AC ^ A'B'C, F3 = AB' ^ AB'C ^ BC',
  // F4 = AC, F5 = AB' ^ AC ^ BC', on lines A = 0, B = 1, C = 2.
  // Gate order and wiring follow the implementation graph of the example.
  localparam int FIG3_NV = 3, FIG3_NG = 7, FIG3_NO = 5;
  typedef gate_desc_t [FIG3_NG-1:0] fig3_gates_t;
  typedef src_t [FIG3_NO-1:0] fig3_outs_t;

  function automatic fig3_gates_t fig3_gates();
    fig3_gates_t g;
    g[0] = mk_gate(F_AND, 'b001, 'b010, zero(),   zero());    // AB'
    g[1] = mk_gate(F_AND, 'b101, 'b010, pkm1(0),  pk(0));     // AB'C
    g[2] = mk_gate(F_AND, 'b101, 'b000, zero(),   pkm1(1));   // AC  (AB' branch)
    g[3] = mk_gate(F_AND, 'b010, 'b100, zero(),   pk(2));     // BC' -> F5
    g[4] = mk_gate(F_AND, 'b010, 'b100, zero(),   pk(1));     // BC' -> F1, F3
    g[5] = mk_gate(F_AND, 'b101, 'b000, zero(),   zero());    // AC
    g[6] = mk_gate(F_AND, 'b100, 'b011, pkm1(5),  pk(5));     // A'B'C -> F4, F2
    return g;
  endfunction

  function automatic fig3_outs_t fig3_outs();
    fig3_outs_t o;
    o[0] = pkm1(4);  // F1
    o[1] = pk(6);    // F2
    o[2] = pk(4);    // F3
    o[3] = pkm1(6);  // F4
    o[4] = pk(3);    // F5
    return o;
  endfunction

  // Figure 4: E_2^4 = (x1 ^ x2)(x3 ^ x4) ^ x1x2 ^ x3x4 on lines x1..x4 = 0..3.
  localparam int FIG4_NV = 4, FIG4_NG = 4, FIG4_NO = 1;
  typedef gate_desc_t [FIG4_NG-1:0] fig4_gates_t;
  typedef src_t [FIG4_NO-1:0] fig4_outs_t;

  function automatic fig4_gates_t fig4_gates();
    fig4_gates_t g;
    g[0] = mk_gate(F_XOR, 'b0011, '0, zero(), zero());   // x1 ^ x2, mode 00
    g[1] = mk_gate(F_XOR, 'b1100, '0, pk(0),  pkm1(0));  // x3 ^ x4, mode G0
    g[2] = mk_gate(F_AND, 'b0011, '0, zero(), pkm1(1));  // x1x2,    mode 0G
    g[3] = mk_gate(F_AND, 'b1100, '0, zero(), pk(2));    // x3x4,    mode 0G
    return g;
  endfunction

  function automatic fig4_outs_t fig4_outs();
    fig4_outs_t o;
    o[0] = pk(3);    // E_2^4
    return o;
  endfunction

endpackage

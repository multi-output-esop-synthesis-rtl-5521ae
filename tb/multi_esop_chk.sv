// multi_esop_chk: builds a pseudo-random multi-output ESOP (NOUT outputs,
// NPROD distinct products over NV variables), turns it into an
// implementation graph the way the synthesis method does, realizes it with
// esop_cascade and checks every output for every input vector (NV <= 12).
//
// Graph construction, done by constant functions at elaboration:
//  * products are ranked by how many outputs use them, most shared first;
//  * each output is the path of its products in that order, and outputs
//    that start with the same products share those nodes (a prefix tree,
//    the connectivity tree: one inward edge per node, shared products are
//    duplicated where paths part);
//  * every tree node is one gate entered with A_{k-1} = 0 and the parent's
//    partial sum on A_k, so P_k is the node's partial sum and P_{k-1} a copy
//    of the parent's. The first child reads the parent's P_k, each further
//    child reads the previous child's P_{k-1} copy, and an output ending at
//    a node with children is taken from the last child's copy;
//  * a root gate starts from 00, and its always-0 P_{k-1} is passed to its
//    first child's A_{k-1}.
// Output sets that coincide would end at the same node; SEED values are
// chosen so that they do not, and elaboration stops if they do.
module multi_esop_chk
  import rev_esop_pkg::*;
#(
  parameter int NV    = 4,
  parameter int NOUT  = 3,
  parameter int NPROD = 7,
  parameter int SEED  = 1
) (
  output int checks,
  output int failures,
  output bit done
);

  localparam int MAXN = NOUT * NPROD;

  function automatic logic [31:0] hash(int a, int b);
    logic [31:0] s;
    s = 32'(SEED) * 32'h9E3779B9 ^ 32'(a) * 32'h85EBCA6B ^ 32'(b) * 32'hC2B2AE35;
    s ^= s >> 15;
    s *= 32'h2C1B3C6D;
    s ^= s >> 12;
    s *= 32'h297A2D39;
    s ^= s >> 15;
    return s;
  endfunction

  // literals of product p: present with probability 3/8, complemented 1/2
  function automatic logic [MAX_V-1:0] lit_pos(int p);
    logic [MAX_V-1:0] m;
    logic [31:0] r;
    m = '0;
    for (int v = 0; v < NV; v++) begin
      r = hash(p, v);
      if (r[31:29] < 3'd3 && !r[7]) m[v] = 1'b1;
    end
    return m;
  endfunction

  function automatic logic [MAX_V-1:0] lit_neg(int p);
    logic [MAX_V-1:0] m;
    logic [31:0] r;
    m = '0;
    for (int v = 0; v < NV; v++) begin
      r = hash(p, v);
      if (r[31:29] < 3'd3 && r[7]) m[v] = 1'b1;
    end
    return m;
  endfunction

  // does output o contain product p (every output gets at least one
  // product as long as NPROD >= NOUT)
  function automatic bit member(int o, int p);
    if (o == p % NOUT) return 1'b1;  // every product is used
    return hash(1000 + o, p)[16];
  endfunction

  function automatic int occ(int p);
    int n = 0;
    for (int o = 0; o < NOUT; o++) n += int'(member(o, p));
    return n;
  endfunction

  // position of product p in the sharing order (0 = most shared)
  function automatic int rank_of(int p);
    int r = 0;
    for (int q = 0; q < NPROD; q++)
      if (occ(q) > occ(p) || (occ(q) == occ(p) && q < p)) r++;
    return r;
  endfunction

  // product at position r of the sharing order
  function automatic int prod_at(int r);
    for (int p = 0; p < NPROD; p++)
      if (rank_of(p) == r) return p;
    return 0;
  endfunction

  // Prefix tree. t[0] = node count; node n: product t[1+3n], parent
  // t[2+3n] (-1 = root), number of outputs ending at it t[3+3n].
  typedef int tree_t [1 + 3 * MAXN];

  function automatic tree_t build_tree();
    tree_t t;
    int nn, cur, p, found;
    nn = 0;
    foreach (t[i]) t[i] = 0;
    for (int o = 0; o < NOUT; o++) begin
      cur = -1;
      for (int r = 0; r < NPROD; r++) begin
        p = prod_at(r);
        if (member(o, p)) begin
          found = -1;
          for (int n = 0; n < nn; n++)
            if (t[2 + 3 * n] == cur && t[1 + 3 * n] == p) found = n;
          if (found < 0) begin
            t[1 + 3 * nn] = p;
            t[2 + 3 * nn] = cur;
            found = nn;
            nn++;
          end
          cur = found;
        end
      end
      t[3 + 3 * cur] += 1;  // outputs ending at this node
    end
    t[0] = nn;
    return t;
  endfunction

  localparam tree_t TREE = build_tree();
  localparam int NG = TREE[0];

  function automatic bit tree_ok();
    for (int n = 0; n < NG; n++)
      if (TREE[3 + 3 * n] > 1) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int parent(int n);
    return TREE[2 + 3 * n];
  endfunction

  function automatic int last_child(int n);
    int c = -1;
    for (int m = n + 1; m < NG; m++) if (parent(m) == n) c = m;
    return c;
  endfunction

  typedef gate_desc_t [NG-1:0] gates_t;
  typedef src_t [NOUT-1:0] outs_t;

  function automatic gates_t make_gates();
    gates_t g;
    int p, par, prev;
    src_t a1, a0;
    for (int n = 0; n < NG; n++) begin
      p = TREE[1 + 3 * n];
      par = parent(n);
      prev = -1;
      for (int m = par + 1; m < n; m++) if (par >= 0 && parent(m) == par) prev = m;
      if (par < 0) begin
        a1 = zero(); a0 = zero();
      end else if (prev < 0) begin
        a0 = pk(par);
        a1 = (parent(par) < 0) ? pkm1(par) : zero();
      end else begin
        a0 = pkm1(prev);
        a1 = zero();
      end
      g[n] = mk_gate(F_AND, lit_pos(p), lit_neg(p), a1, a0);
    end
    return g;
  endfunction

  function automatic outs_t make_outs();
    outs_t os;
    int cur, p;
    for (int o = 0; o < NOUT; o++) begin
      cur = -1;
      for (int r = 0; r < NPROD; r++) begin
        p = prod_at(r);
        if (member(o, p))
          for (int n = 0; n < NG; n++)
            if (parent(n) == cur && TREE[1 + 3 * n] == p) begin
              cur = n;
              break;
            end
      end
      os[o] = (last_child(cur) >= 0) ? pkm1(last_child(cur)) : pk(cur);
    end
    return os;
  endfunction

  localparam gates_t GATES = make_gates();
  localparam outs_t  OUTS  = make_outs();

  function automatic int count_roots(bit with_child);
    int n = 0;
    for (int i = 0; i < NG; i++)
      if (parent(i) < 0 && (!with_child || last_child(i) >= 0)) n++;
    return n;
  endfunction

  // Every control output is read once or is garbage: NG - roots chain
  // reads, NOUT outputs and one reused 0 per root with a child.
  localparam int N_CONST = NG + count_roots(0) - count_roots(1);
  localparam int N_GARB  = 2 * NG - (NG - count_roots(0)) - NOUT - count_roots(1);

  if (!tree_ok()) begin : g_dup
    $error("multi_esop_chk: two outputs have the same product set, pick another SEED");
  end

  logic [NV-1:0]     x, x_o;
  logic [NOUT-1:0]   fout;
  logic [N_GARB-1:0] garbage;
  logic [NG-1:0]     p_km1, p_k;

  esop_cascade #(
    .NV(NV), .NG(NG), .NO(NOUT), .N_GARB(N_GARB), .N_CONST(N_CONST),
    .GATES(GATES), .OUTS(OUTS)
  ) dut (
    .x(x), .fout(fout), .x_o(x_o), .garbage(garbage), .p_km1(p_km1), .p_k(p_k));

  function automatic logic prod_val(int p, logic [NV-1:0] xv);
    logic [MAX_V-1:0] pos, neg;
    logic t;
    pos = lit_pos(p);
    neg = lit_neg(p);
    t = 1'b1;
    for (int v = 0; v < NV; v++) begin
      if (pos[v]) t &= xv[v];
      if (neg[v]) t &= !xv[v];
    end
    return t;
  endfunction

  initial begin
    int n_total_occ;
    logic e;
    checks = 0;
    failures = 0;
    done = 0;
    for (int v = 0; v < (1 << NV); v++) begin
      x = NV'(v);
      #1;
      for (int o = 0; o < NOUT; o++) begin
        e = 1'b0;
        for (int p = 0; p < NPROD; p++)
          if (member(o, p)) e ^= prod_val(p, x);
        checks++;
        if (fout[o] !== e) begin
          failures++;
          $display("FAIL NV=%0d NOUT=%0d NPROD=%0d x=%h output %0d: got %b", NV, NOUT, NPROD, x, o, fout[o]);
        end
      end
      checks++;
      if (x_o !== x) begin
        failures++;
        $display("FAIL lines x=%h x_o=%h", x, x_o);
      end
    end
    // a cascade needs at least one gate per product and at most one gate
    // per product occurrence
    n_total_occ = 0;
    for (int p = 0; p < NPROD; p++) n_total_occ += occ(p);
    checks++;
    if (NG < NPROD || NG > n_total_occ) begin
      failures++;
      $display("FAIL gate count %0d outside [%0d, %0d]", NG, NPROD, n_total_occ);
    end
    $display("NV=%0d outputs=%0d products=%0d occurrences=%0d gates=%0d garbage=%0d constants=%0d",
             NV, NOUT, NPROD, n_total_occ, NG, N_GARB, N_CONST);
    done = 1;
  end

endmodule

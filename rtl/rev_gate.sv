// rev_gate: one gate of the generalized k*k reversible gate family.
//
// The first k-2 inputs A_1..A_{k-2} pass straight through (P_i = A_i). They
// also feed a function f of a chosen subset of them: a product (AND) or an
// EXOR-sum, selected by F_TYPE, over the lines set in F_MASK. The last two
// inputs are control lines:
//     P_{k-1} = f  & A_{k-1}  ^ A_k
//     P_k     = f' & A'_{k-1} ^ A'_k
// For every fixed f this maps (A_{k-1}, A_k) one-to-one onto (P_{k-1}, P_k),
// so the gate is reversible. Depending on what drives the control inputs
// the gate acts in one of eight modes, e.g. inputs 00 give (0, f), inputs
// 0G give (G, f ^ G) (a copy of G plus an EXOR accumulation), inputs G0
// give (f & G, f | G).
//
// The equations, the structure (two AND terms with the inverters in front
// of the second) and the two forms of f are those of the gate family. The
// port split into a pass-through bus and two control bits is this design's
// choice. Purely combinational, no clock.
module rev_gate
  import rev_esop_pkg::*;
#(
  parameter int         K      = 5,      // gate size k (k >= 3)
  parameter ftype_e     F_TYPE = F_AND,  // product or EXOR-sum
  parameter logic [K-3:0] F_MASK = '1    // lines of A_1..A_{k-2} read by f
) (
  input  logic [K-3:0] a_thru,  // A_1..A_{k-2}, bit 0 = A_1
  input  logic         a_km1,   // A_{k-1}
  input  logic         a_k,     // A_k
  output logic [K-3:0] p_thru,  // P_1..P_{k-2}
  output logic         p_km1,   // P_{k-1}
  output logic         p_k      // P_k
);

  if (K < 3) begin : g_bad_k
    $error("rev_gate: K must be at least 3");
  end

  logic f;  // f_{k-2}

  always_comb begin
    if (F_TYPE == F_AND) f = &(a_thru | ~F_MASK);
    else                 f = ^(a_thru & F_MASK);
  end

  assign p_thru = a_thru;
  assign p_km1  = (f & a_km1) ^ a_k;
  assign p_k    = (~f & ~a_km1) ^ ~a_k;

endmodule

// mo_esop_fig3: reversible cascade for the five-output ESOP
//     F1 = AB' ^ AB'C        F2 = AC ^ A'B'C      F3 = AB' ^ AB'C ^ BC'
//     F4 = AC                F5 = AB' ^ AC ^ BC'
//
// Five distinct products occur eleven times across the outputs (AB' three
// times, AB'C twice, AC three times, BC' twice, A'B'C once). Sharing them
// under the single-fan-out rule gives seven gates of size k = 5, all with
// f a product:
//   1 AB'   (inputs 00)         -> P_k = AB', P_{k-1} = 0 reused by gate 2
//   2 AB'C  (inputs 0G, G=AB')  -> P_{k-1} = AB' (copy), P_k = AB' ^ AB'C
//   3 AC    (G = AB')           -> P_k = AB' ^ AC, P_{k-1} garbage
//   4 BC'   (G = AB' ^ AC)      -> P_k = F5, P_{k-1} garbage
//   5 BC'   (G = AB' ^ AB'C)    -> P_{k-1} = F1, P_k = F3
//   6 AC    (inputs 00)         -> P_k = AC, P_{k-1} = 0 reused by gate 7
//   7 A'B'C (inputs 0G, G=AC)   -> P_{k-1} = F4, P_k = F2
// This is 2 garbage outputs and 7 constant-0 inputs. Inverters on the B
// and C lines (and A for gate 7) supply the complemented literals; A, B, C
// leave the cascade in true polarity. The gate list and its wiring are the
// worked example's; the port names are this design's. Combinational.
module mo_esop_fig3
  import rev_esop_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic       c,
  output logic [4:0] f,        // f[0] = F1 .. f[4] = F5
  output logic [2:0] abc_o,    // A, B, C after the cascade ({C, B, A})
  output logic [1:0] garbage,  // P_{k-1} of gates 3 and 4
  output logic [6:0] p_km1,    // P_{k-1} of gates 1..7
  output logic [6:0] p_k       // P_k of gates 1..7
);

  esop_cascade #(
    .NV      (FIG3_NV),
    .NG      (FIG3_NG),
    .NO      (FIG3_NO),
    .N_GARB  (2),
    .N_CONST (7),
    .GATES   (fig3_gates()),
    .OUTS    (fig3_outs())
  ) u_cascade (
    .x       ({c, b, a}),
    .fout    (f),
    .x_o     (abc_o),
    .garbage (garbage),
    .p_km1   (p_km1),
    .p_k     (p_k)
  );

endmodule

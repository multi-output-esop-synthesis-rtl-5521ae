// fesop_e24: reversible cascade for the symmetric function
//     E_2^4 = x1x2 ^ x1x3 ^ x1x4 ^ x2x3 ^ x2x4 ^ x3x4
// in its factorized form (x1 ^ x2)(x3 ^ x4) ^ x1x2 ^ x3x4.
//
// Four gates of size k = 6. Two have f an EXOR-sum, two a product:
//   1 x1 ^ x2 (inputs 00)          -> P_k = x1 ^ x2, P_{k-1} = 0
//   2 x3 ^ x4 (inputs G0, G = x1 ^ x2, the 0 from gate 1 at A_k)
//                                  -> P_{k-1} = (x1 ^ x2)(x3 ^ x4),
//                                     P_k = (x3 ^ x4) + (x1 ^ x2) garbage
//   3 x1x2    (inputs 0G)          -> P_k adds x1x2, P_{k-1} garbage
//   4 x3x4    (inputs 0G)          -> P_k = E_2^4, P_{k-1} garbage
// Mode G0 (A_{k-1} = G, A_k = 0) gives the AND of a factor with the running
// value, which is what the factorized form needs. 3 garbage outputs, 4
// constant-0 inputs. The gate list and wiring are the worked example's;
// the port names are this design's. Combinational.
module fesop_e24
  import rev_esop_pkg::*;
(
  input  logic [3:0] x,        // x[0] = x1 .. x[3] = x4
  output logic       e24,      // E_2^4
  output logic [3:0] x_o,      // x1..x4 after the cascade
  output logic [2:0] garbage,  // P_k of gate 2, P_{k-1} of gates 3 and 4
  output logic [3:0] p_km1,    // P_{k-1} of gates 1..4
  output logic [3:0] p_k       // P_k of gates 1..4
);

  esop_cascade #(
    .NV      (FIG4_NV),
    .NG      (FIG4_NG),
    .NO      (FIG4_NO),
    .N_GARB  (3),
    .N_CONST (4),
    .GATES   (fig4_gates()),
    .OUTS    (fig4_outs())
  ) u_cascade (
    .x       (x),
    .fout    (e24),
    .x_o     (x_o),
    .garbage (garbage),
    .p_km1   (p_km1),
    .p_k     (p_k)
  );

endmodule

// rev_esop_top: the two example cascades of the reversible ESOP synthesis
// method side by side.
//
//  * mo_esop_fig3: five-output ESOP on A, B, C, seven product-type gates.
//  * fesop_e24:    factorized symmetric function E_2^4 on x1..x4, four
//                  gates mixing EXOR-sum and product gates.
//
// The two share no signal; each brings out its primary inputs, its function
// outputs, its garbage outputs, the restored variable lines and the control
// outputs of every gate. Putting both in one top is this design's choice.
// Purely combinational: outputs settle one gate chain after the inputs.
module rev_esop_top (
  // five-output ESOP
  input  logic       a,
  input  logic       b,
  input  logic       c,
  output logic [4:0] f,
  output logic [2:0] abc_o,
  output logic [1:0] f_garbage,
  output logic [6:0] f_p_km1,
  output logic [6:0] f_p_k,
  // factorized E_2^4
  input  logic [3:0] x,
  output logic       e24,
  output logic [3:0] x_o,
  output logic [2:0] e_garbage,
  output logic [3:0] e_p_km1,
  output logic [3:0] e_p_k
);

  mo_esop_fig3 u_mo_esop (
    .a       (a),
    .b       (b),
    .c       (c),
    .f       (f),
    .abc_o   (abc_o),
    .garbage (f_garbage),
    .p_km1   (f_p_km1),
    .p_k     (f_p_k)
  );

  fesop_e24 u_fesop (
    .x       (x),
    .e24     (e24),
    .x_o     (x_o),
    .garbage (e_garbage),
    .p_km1   (e_p_km1),
    .p_k     (e_p_k)
  );

endmodule

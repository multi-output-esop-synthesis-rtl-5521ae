// rev_inv_column: a column of 1*1 reversible gates (inverters, P = A') on
// the pass-through lines of a cascade.
//
// Lines whose bit is set in INV are inverted, the others pass unchanged.
// A cascade places such a column in front of a gate whose product needs a
// complemented literal, and one at the end to give the primary inputs back
// in true polarity. The inverter as the only 1*1 reversible gate, and its
// use on the lines, follow the gate family's cascades; collecting one column
// per cascade stage into a module is this design's choice. Combinational.
module rev_inv_column #(
  parameter int           W   = 3,   // number of lines
  parameter logic [W-1:0] INV = '0   // lines to invert
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] p
);

  for (genvar i = 0; i < W; i++) begin : g_line
    if (INV[i]) begin : g_inv
      assign p[i] = ~a[i];
    end else begin : g_wire
      assign p[i] = a[i];
    end
  end

endmodule

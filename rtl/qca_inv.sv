// qca_inv: QCA inverter.
//
// The cell chain splits into two diagonal branches that rejoin at a cell offset by half a
// cell, so the output takes the opposite polarization of the input (1 in, 0 out).
// Logically y = ~a; combinational.
module qca_inv (
  input  logic a,
  output logic y
);
  assign y = ~a;
endmodule

// full_adder: one-bit full adder built only from QCA primitives.
//
// Three majority gates and two inverters:
//   co = M(a, b, ci)
//   s  = M(~co, ci, M(a, b, ~ci))
// The carry is one majority gate; the sum reuses the inverted carry, which needs no XOR.
// This is the gate arrangement of the published schematic. Combinational: the clock-zone
// delays of the QCA layout are not modelled.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic ci_n, co_n, m_ab_nci;

  maj3    u_carry (.a(a),    .b(b),  .c(ci),       .y(co));
  qca_inv u_inv_c (.a(ci),   .y(ci_n));
  maj3    u_mid   (.a(a),    .b(b),  .c(ci_n),     .y(m_ab_nci));
  qca_inv u_inv_o (.a(co),   .y(co_n));
  maj3    u_sum   (.a(co_n), .b(ci), .c(m_ab_nci), .y(s));
endmodule

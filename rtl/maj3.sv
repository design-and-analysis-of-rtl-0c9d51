// maj3: three-input majority gate, the basic logic element of QCA.
//
// y = M(a,b,c) = ab + bc + ca. Tying one input to 0 turns the gate into a 2-input AND,
// tying it to 1 into a 2-input OR; every other block here is built from this gate and
// the inverter. Purely combinational; in a QCA layout the gate settles within one
// clock zone, which this RTL does not model.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (b & c) | (c & a);
endmodule

// ripple_carry_adder: WIDTH-bit adder made of a chain of majority-gate full adders.
//
// Bit i adds a[i], b[i] and the carry of bit i-1; cin enters bit 0 (C0) and the carry of
// the last bit leaves as cout (C4 for the 4-bit default). The chain follows the published
// 4-bit layout, whose cells sit side by side with the carry flowing from the LSB cell on
// the right to the MSB cell on the left. Combinational; no pipeline registers are placed,
// as the clock-zone assignment of the layout is not part of this RTL.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = qca_pkg::ADD_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule

// bit_serial_adder: adds two LSB-first bit streams, one bit per clock.
//
// A majority-gate full adder whose carry out returns to its own carry in through a
// one-clock register, so the carry of bit t is added into bit t+1. The sum s is
// combinational from a, b and the stored carry. rst_n (synchronous, active low) clears the
// carry; a run of zero inputs clears it as well, which is how the QCA circuit, having no
// reset, is initialised. The reset is a choice of this RTL.
module bit_serial_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic s
);
  logic carry_q, carry_d;

  full_adder u_fa (.a(a), .b(b), .ci(carry_q), .s(s), .co(carry_d));

  always_ff @(posedge clk) begin
    if (!rst_n) carry_q <= 1'b0;
    else        carry_q <= carry_d;
  end
endmodule

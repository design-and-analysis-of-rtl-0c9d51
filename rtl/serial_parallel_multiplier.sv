// serial_parallel_multiplier: N x N bit carry delay serial-parallel multiplier.
//
// The multiplier a enters one bit per clock, LSB first, on a_serial; the multiplicand b is
// applied in parallel and held. Every clock, stage k forms the partial product a & b[k]
// (an AND, i.e. a majority gate with one input at 0) and adds it, in a bit-serial adder
// with its own carry loop, to the registered sum of stage k+1. Stage N-1 has no adder: its
// partial product is only registered. The registered sum of stage 0 is the product bit.
// The row is a carry-save accumulator that shifts one place right per clock, so carries
// never travel across stages within a clock.
//
// Timing (one clock = one QCA clock cycle of four clock zones):
//   frame   : N bits of a (LSB first), then N zero bits; 2N clocks per product
//   output  : product bit t appears on p_serial one clock after a-slot t, so the 2N-bit
//             product occupies the 2N clocks that follow the first a bit
//   streaming: a new frame may start right after the N zeros (the zeros flush the state)
// b must be held while the N bits of a enter; it may change during the zero bits.
// The one-clock stage-to-stage sum delay, the one-clock carry loops and the one-clock
// output delay follow the published clock-zone delays; broadcasting a to all stages
// instead of passing it through per-stage zone delays, and the reset, are choices of
// this RTL.
module serial_parallel_multiplier #(
  parameter int unsigned N = qca_pkg::MUL_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         a_serial,
  input  logic [N-1:0] b,
  output logic         p_serial
);
  logic [N-1:0] pp;      // partial products a & b[k]
  logic [N-1:0] s_d;     // stage sums before the stage register
  logic [N-1:0] s_q;     // stage sums after the one-clock delay

  for (genvar k = 0; k < N; k++) begin : g_stage
    maj3 u_and (.a(a_serial), .b(b[k]), .c(1'b0), .y(pp[k]));
    if (k == N - 1) begin : g_top
      assign s_d[k] = pp[k];
    end else begin : g_add
      bit_serial_adder u_bsa (.clk(clk), .rst_n(rst_n), .a(pp[k]), .b(s_q[k+1]), .s(s_d[k]));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) s_q <= '0;
    else        s_q <= s_d;
  end

  assign p_serial = s_q[0];
endmodule

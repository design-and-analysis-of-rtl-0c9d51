// cdm_zone_network: the carry delay multiplier network with its delays counted in QCA
// clock zones.
//
// Each clock edge of this module is one clock zone; four edges make one QCA clock cycle.
// A serial input bit must therefore be held on a_serial for four clocks, and each product
// bit is held on p_serial for four clocks. The delays are those of the published network:
//   - the multiplier bit reaches stage 0 after one zone and moves one stage further
//     (towards b[N-1]) every two zones;
//   - each partial product a & b[k] is delayed one zone before its adder;
//   - each adder's sum travels two zones to the adder of the next lower stage, and from
//     stage 0 two zones to the output, so p_serial is the product stream four zones (one
//     cycle) behind a_serial;
//   - each adder's carry returns to its own carry in after four zones (one cycle);
//   - stage N-1 has no adder: its delayed partial product goes straight to stage N-2.
// Because every loop and every skew is a whole number of zones, and inputs are held for
// four zones, the four zone phases carry four identical copies of the computation.
// Framing is that of the serial-parallel multiplier: N bits of a (LSB first), then N zero
// bits, b held while a enters; 2N cycles (8N clocks here) per product. The adders are
// combinational within their zone. rst_n (synchronous, active low) clears all zone
// registers; this reset is a choice of this RTL, the circuit itself being initialised by
// zero bits.
module cdm_zone_network #(
  parameter int unsigned N = qca_pkg::MUL_WIDTH
) (
  input  logic         clk,       // one edge per clock zone
  input  logic         rst_n,
  input  logic         a_serial,  // held for four zones per bit
  input  logic [N-1:0] b,
  output logic         p_serial   // product bit, held for four zones
);
  localparam int unsigned ZONES_PER_CYCLE = 4;

  logic [N-1:0] a_at;        // multiplier bit at stage k (1 + 2k zones after the input)
  logic [N-1:0] a_mid;       // first zone of the two-zone hop from stage k to k+1
  logic [N-1:0] pp, pp_q;    // partial product and its one-zone delay
  logic [N-1:0] s_d;         // adder sum (stage N-1: its delayed partial product)
  logic [N-1:0] s_mid, s_q;  // two-zone hop of each stage's sum towards stage k-1
  logic [N-1:0] c_d;         // adder carry out
  logic [ZONES_PER_CYCLE-1:0] c_loop [N];  // four-zone carry loops

  // zone registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_at  <= '0;
      a_mid <= '0;
      pp_q  <= '0;
      s_mid <= '0;
      s_q   <= '0;
      for (int k = 0; k < int'(N); k++) c_loop[k] <= '0;
    end else begin
      a_at[0] <= a_serial;
      for (int k = 0; k < int'(N) - 1; k++) begin
        a_mid[k]  <= a_at[k];
        a_at[k+1] <= a_mid[k];
      end
      pp_q  <= pp;
      s_mid <= s_d;
      s_q   <= s_mid;
      for (int k = 0; k < int'(N); k++)
        c_loop[k] <= {c_loop[k][ZONES_PER_CYCLE-2:0], c_d[k]};
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_stage
    maj3 u_and (.a(a_at[k]), .b(b[k]), .c(1'b0), .y(pp[k]));
    if (k == N - 1) begin : g_top
      assign s_d[k] = pp_q[k];
      assign c_d[k] = 1'b0;
    end else begin : g_add
      full_adder u_fa (.a(pp_q[k]), .b(s_q[k+1]), .ci(c_loop[k][ZONES_PER_CYCLE-1]),
                       .s(s_d[k]), .co(c_d[k]));
    end
  end

  assign p_serial = s_q[0];
endmodule

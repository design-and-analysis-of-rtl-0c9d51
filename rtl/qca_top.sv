// qca_top: the QCA arithmetic units side by side.
//
// The three parallel adders (ripple carry, carry lookahead, conditional sum) share the
// operand inputs add_a, add_b and add_cin and each drives its own sum and carry out, so
// their results can be compared directly. The serial-parallel multiplier has its own
// serial and parallel ports and follows its 2N-clock frame: N bits of mul_a_serial (LSB
// first) with mul_b held, then N zeros; the product leaves on mul_p_serial LSB first, one
// clock behind the input slot of the same index. The same multiplier is also present as
// its clock-zone network, on the zone_* ports: zone_clk has one edge per QCA clock zone,
// four per cycle, so its serial bits last four zone_clk edges and its product appears four
// edges (one cycle) behind its input. The adders are combinational; the multipliers use
// clk or zone_clk and rst_n (synchronous, active low, on each one's own clock). Sharing the
// adder operands and the separate zone clock are choices of this RTL; the widths default
// to the 4-bit designs.
module qca_top #(
  parameter int unsigned ADD_WIDTH = qca_pkg::ADD_WIDTH,
  parameter int unsigned MUL_WIDTH = qca_pkg::MUL_WIDTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ADD_WIDTH-1:0] add_a,
  input  logic [ADD_WIDTH-1:0] add_b,
  input  logic                 add_cin,
  output logic [ADD_WIDTH-1:0] rca_sum,
  output logic                 rca_cout,
  output logic [ADD_WIDTH-1:0] cla_sum,
  output logic                 cla_cout,
  output logic [ADD_WIDTH-1:0] csa_sum,
  output logic                 csa_cout,
  input  logic                 mul_a_serial,
  input  logic [MUL_WIDTH-1:0] mul_b,
  output logic                 mul_p_serial,
  input  logic                 zone_clk,
  input  logic                 zone_a_serial,
  input  logic [MUL_WIDTH-1:0] zone_b,
  output logic                 zone_p_serial
);
  ripple_carry_adder #(.WIDTH(ADD_WIDTH)) u_rca (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(rca_sum), .cout(rca_cout));

  carry_lookahead_adder #(.WIDTH(ADD_WIDTH)) u_cla (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(cla_sum), .cout(cla_cout));

  conditional_sum_adder #(.WIDTH(ADD_WIDTH)) u_csa (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(csa_sum), .cout(csa_cout));

  serial_parallel_multiplier #(.N(MUL_WIDTH)) u_mul (
    .clk(clk), .rst_n(rst_n), .a_serial(mul_a_serial), .b(mul_b), .p_serial(mul_p_serial));

  cdm_zone_network #(.N(MUL_WIDTH)) u_zone (
    .clk(zone_clk), .rst_n(rst_n), .a_serial(zone_a_serial), .b(zone_b),
    .p_serial(zone_p_serial));
endmodule

// carry_lookahead_adder: WIDTH-bit adder with carry lookahead inside GROUP-bit groups.
//
// Each bit forms generate g = a & b (the majority gate with one input at 0) and propagate
// p = a | b (the majority gate with one input at 1). Inside a group every carry is a flat
// two-level sum of products of the g and p bits and the group's carry in, so no carry
// ripples inside a group; groups pass their carry out to the next group. The sum bit of
// each position is the sum output of a majority-gate full adder fed with the lookahead
// carry. The group size and the rippling between groups are choices of this RTL: only the
// adder type is given for the QCA design. Combinational.
module carry_lookahead_adder #(
  parameter int unsigned WIDTH = qca_pkg::ADD_WIDTH,
  parameter int unsigned GROUP = qca_pkg::CLA_GROUP
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NGROUPS = WIDTH / GROUP;

  if (WIDTH % GROUP != 0 || GROUP == 0) begin : g_bad_size
    $error("carry_lookahead_adder: WIDTH must be a non-zero multiple of GROUP");
  end

  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;       // c[i] is the carry into bit i
  logic [NGROUPS:0] gc;      // carry into each group

  for (genvar i = 0; i < WIDTH; i++) begin : g_gp
    maj3 u_g (.a(a[i]), .b(b[i]), .c(1'b0), .y(g[i]));
    maj3 u_p (.a(a[i]), .b(b[i]), .c(1'b1), .y(p[i]));
  end

  assign gc[0] = cin;
  for (genvar grp = 0; grp < NGROUPS; grp++) begin : g_group
    localparam int unsigned BASE = grp * GROUP;
    logic [GROUP:0] lc;   // local carries, lc[0] = group carry in

    // lc[j+1] = g[j] | p[j]g[j-1] | ... | p[j]..p[0]g[0] | p[j]..p[0]cin, all in one level
    always_comb begin
      lc[0] = gc[grp];
      for (int j = 0; j < int'(GROUP); j++) begin
        logic term, chain;
        term  = 1'b0;
        chain = 1'b1;
        for (int k = j; k >= 0; k--) begin
          term  = term | (chain & g[BASE+k]);
          chain = chain & p[BASE+k];
        end
        lc[j+1] = term | (chain & gc[grp]);
      end
    end

    for (genvar j = 0; j < GROUP; j++) begin : g_bit
      assign c[BASE+j] = lc[j];
    end
    assign gc[grp+1] = lc[GROUP];
  end
  assign c[WIDTH] = gc[NGROUPS];

  for (genvar i = 0; i < WIDTH; i++) begin : g_sum
    logic unused_co;
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(unused_co));
  end
  assign cout = c[WIDTH];
endmodule

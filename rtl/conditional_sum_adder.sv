// conditional_sum_adder: WIDTH-bit conditional sum adder (WIDTH a power of two).
//
// Level 0 forms, for every bit, the sum and carry out for both possible carries in
// (s0 = a^b, c0 = a&b; s1 = ~(a^b), c1 = a|b). Each following level merges pairs of
// neighbouring blocks: the lower block's two carry outs select which version of the upper
// block's sums and carry applies. After log2(WIDTH) levels a single block covers the word
// and the real carry in picks the final sum and carry out. The delay grows with log2(WIDTH)
// instead of WIDTH. Only the adder type is given for the QCA design; this merge tree is the
// textbook conditional sum structure. Combinational.
module conditional_sum_adder #(
  parameter int unsigned WIDTH = qca_pkg::ADD_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned LEVELS = $clog2(WIDTH);

  if (WIDTH == 0 || (1 << LEVELS) != WIDTH) begin : g_bad_size
    $error("conditional_sum_adder: WIDTH must be a power of two");
  end

  // Per level: sums for carry in 0/1 of every bit, carries out for carry in 0/1 of every
  // block (block k of level L covers bits k*2^L .. (k+1)*2^L-1 and is stored at index k).
  logic [WIDTH-1:0] s0 [LEVELS+1];
  logic [WIDTH-1:0] s1 [LEVELS+1];
  logic [WIDTH-1:0] c0 [LEVELS+1];
  logic [WIDTH-1:0] c1 [LEVELS+1];

  always_comb begin
    for (int l = 0; l <= int'(LEVELS); l++) begin
      s0[l] = '0;
      s1[l] = '0;
      c0[l] = '0;
      c1[l] = '0;
    end
    s0[0] = a ^ b;
    s1[0] = ~(a ^ b);
    c0[0] = a & b;
    c1[0] = a | b;
    for (int l = 1; l <= int'(LEVELS); l++) begin
      int blk, half;
      blk  = 1 << l;
      half = blk / 2;
      for (int k = 0; k < int'(WIDTH) / blk; k++) begin
        for (int j = 0; j < half; j++) begin
          // lower half passes through unchanged
          s0[l][k*blk+j] = s0[l-1][k*blk+j];
          s1[l][k*blk+j] = s1[l-1][k*blk+j];
          // upper half chosen by the lower half's carry out
          s0[l][k*blk+half+j] = c0[l-1][2*k] ? s1[l-1][k*blk+half+j] : s0[l-1][k*blk+half+j];
          s1[l][k*blk+half+j] = c1[l-1][2*k] ? s1[l-1][k*blk+half+j] : s0[l-1][k*blk+half+j];
        end
        c0[l][k] = c0[l-1][2*k] ? c1[l-1][2*k+1] : c0[l-1][2*k+1];
        c1[l][k] = c1[l-1][2*k] ? c1[l-1][2*k+1] : c0[l-1][2*k+1];
      end
    end
  end

  assign sum  = cin ? s1[LEVELS] : s0[LEVELS];
  assign cout = cin ? c1[LEVELS][0] : c0[LEVELS][0];
endmodule

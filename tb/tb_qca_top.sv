// tb_qca_top: end-to-end test of qca_top at its default sizes (4-bit adders, 4-bit
// multiplier).
//
// Adders: every operand pair and carry in is applied to the shared inputs; all three sum
// and carry out results are compared with the integer sum and with each other.
// Multiplier: starting from random state with reset never asserted, N zero slots
// initialise it; then every 4-bit (a, b) pair runs as back-to-back 2N-clock frames and
// every serial product bit is checked at its clock (one clock after its input slot). A
// frame is then cut off half way by a reset, after which frames must be correct again.
// Each mechanism is counted and a failure is counted for any that never happened: a
// carry rippling through the whole word, a carry out, the conditional sum adder's upper
// half selected by a lower-half carry, zero-slot initialisation, back-to-back products,
// and a reset in the middle of a frame. The clock-zone multiplier network runs on its own
// zone clock (four edges per cycle): reset, then all-ones and random frames, each product
// bit checked in each of its four zones, four zones behind its input; it counts as the
// mechanism 'zone-timed product'.
module tb_qca_top;
  localparam int unsigned AW = qca_pkg::ADD_WIDTH;
  localparam int unsigned N  = qca_pkg::MUL_WIDTH;

  logic          clk = 1'b0, rst_n;
  logic [AW-1:0] add_a, add_b, rca_sum, cla_sum, csa_sum;
  logic          add_cin, rca_cout, cla_cout, csa_cout;
  logic          mul_a_serial, mul_p_serial;
  logic [N-1:0]  mul_b;
  logic          zclk = 1'b0, zone_a_serial, zone_p_serial;
  logic [N-1:0]  zone_b;
  int            n_zone_products = 0;
  bit            zone_done = 1'b0;
  logic          zexp_q[$];
  logic          zskip_q[$];

  int checks = 0, failures = 0;
  int n_full_ripple = 0, n_cout = 0, n_upper_select = 0;
  int n_zero_init = 0, n_back_to_back = 0, n_mid_reset = 0;
  bit adders_done = 1'b0, mul_done = 1'b0;

  logic exp_q[$];
  logic skip_q[$];

  qca_top dut (
    .clk(clk), .rst_n(rst_n),
    .add_a(add_a), .add_b(add_b), .add_cin(add_cin),
    .rca_sum(rca_sum), .rca_cout(rca_cout),
    .cla_sum(cla_sum), .cla_cout(cla_cout),
    .csa_sum(csa_sum), .csa_cout(csa_cout),
    .mul_a_serial(mul_a_serial), .mul_b(mul_b), .mul_p_serial(mul_p_serial),
    .zone_clk(zclk), .zone_a_serial(zone_a_serial), .zone_b(zone_b),
    .zone_p_serial(zone_p_serial));

  always #5 clk = ~clk;
  always #2 zclk = ~zclk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- adders ----------------
  initial begin
    for (int x = 0; x < (1 << AW); x++)
      for (int y = 0; y < (1 << AW); y++)
        for (int c = 0; c < 2; c++) begin
          logic [AW:0] expected;
          int          half;
          @(negedge clk);
          add_a   = AW'(x);
          add_b   = AW'(y);
          add_cin = 1'(c);
          expected = (AW+1)'(x + y + c);
          #1;
          checks += 3;
          if ({rca_cout, rca_sum} !== expected) failures++;
          if ({cla_cout, cla_sum} !== expected) failures++;
          if ({csa_cout, csa_sum} !== expected) failures++;
          if ((x ^ y) == (1 << AW) - 1 && c == 1) n_full_ripple++;
          if (expected[AW]) n_cout++;
          half = AW / 2;
          if (((x % (1 << half)) + (y % (1 << half)) + c) >= (1 << half)) n_upper_select++;
        end
    adders_done = 1'b1;
  end

  // ---------------- multiplier ----------------
  task automatic slot(input logic a_bit, input logic expect_bit, input logic skip);
    @(negedge clk);
    if (exp_q.size() > 0) begin
      logic e, sk;
      e  = exp_q.pop_front();
      sk = skip_q.pop_front();
      if (!sk) begin
        checks++;
        if (mul_p_serial !== e) begin
          failures++;
          if (failures < 10) $display("FAIL product bit %b, expected %b", mul_p_serial, e);
        end
      end
    end
    mul_a_serial = a_bit;
    exp_q.push_back(expect_bit);
    skip_q.push_back(skip);
  endtask

  task automatic frame(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] prod;
    prod  = (2*N)'(x) * (2*N)'(y);
    mul_b = y;
    for (int t = 0; t < 2 * int'(N); t++)
      slot((t < int'(N)) ? x[t] : 1'b0, prod[t], 1'b0);
  endtask

  initial begin
    int frames;
    rst_n        = 1'b1;         // no reset: state starts random
    mul_a_serial = 1'b0;
    mul_b        = '1;
    for (int t = 0; t < int'(N); t++) slot(1'b0, 1'b0, 1'b1);
    n_zero_init++;
    frames = 0;
    for (int x = 0; x < (1 << N); x++)
      for (int y = 0; y < (1 << N); y++) begin
        frame(N'(x), N'(y));
        if (frames > 0) n_back_to_back++;
        frames++;
      end
    // half a frame of ones, then a reset in the middle of it
    mul_b = '1;
    for (int t = 0; t < int'(N) / 2 + 1; t++) slot(1'b1, 1'b0, 1'b1);
    @(negedge clk);
    rst_n = 1'b0;
    mul_a_serial = 1'b0;
    exp_q.delete();
    skip_q.delete();
    @(negedge clk);
    rst_n = 1'b1;
    n_mid_reset++;
    for (int i = 0; i < 20; i++) frame(N'($urandom), N'($urandom));
    slot(1'b0, 1'b0, 1'b1);
    mul_done = 1'b1;
  end

  // ---------------- clock-zone multiplier network ----------------
  task automatic zone(input logic a_bit, input logic expect_bit, input logic skip);
    @(negedge zclk);
    if (zexp_q.size() >= 4) begin
      logic e, sk;
      e  = zexp_q.pop_front();
      sk = zskip_q.pop_front();
      if (!sk) begin
        checks++;
        if (zone_p_serial !== e) begin
          failures++;
          if (failures < 10) $display("FAIL zone product bit %b, expected %b", zone_p_serial, e);
        end
      end
    end
    zone_a_serial = a_bit;
    zexp_q.push_back(expect_bit);
    zskip_q.push_back(skip);
  endtask

  task automatic zone_frame(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] prod;
    prod   = (2*N)'(x) * (2*N)'(y);
    zone_b = y;
    for (int t = 0; t < 2 * int'(N); t++)
      for (int z = 0; z < 4; z++)
        zone((t < int'(N)) ? x[t] : 1'b0, prod[t], 1'b0);
    n_zone_products++;
  endtask

  initial begin
    zone_a_serial = 1'b0;
    zone_b        = '0;
    // rst_n is low only around the mid-frame reset of the multiplier; start from the
    // zero-bit initialisation instead
    for (int t = 0; t < 4 * int'(N); t++) zone(1'b0, 1'b0, 1'b1);
    zone_frame('1, '1);
    for (int i = 0; i < 30; i++) zone_frame(N'($urandom), N'($urandom));
    for (int z = 0; z < 4; z++) zone(1'b0, 1'b0, 1'b1);
    zone_done = 1'b1;
  end

  initial begin
    wait (adders_done && mul_done && zone_done);
    $display("mechanisms: full_ripple=%0d cout=%0d upper_select=%0d zero_init=%0d back_to_back=%0d mid_reset=%0d",
             n_full_ripple, n_cout, n_upper_select, n_zero_init, n_back_to_back, n_mid_reset);
    $display("zone-timed products: %0d", n_zone_products);
    checks += 7;
    if (n_zone_products == 0) failures++;
    if (n_full_ripple  == 0) failures++;
    if (n_cout         == 0) failures++;
    if (n_upper_select == 0) failures++;
    if (n_zero_init    == 0) failures++;
    if (n_back_to_back == 0) failures++;
    if (n_mid_reset    == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cdm_zone_network: runs back-to-back product frames through 4-, 8- and 16-bit
// clock-zone carry delay networks and checks every product bit in each of its four zones,
// which fixes the latency at four zones (one cycle) and the rate at 8N zones per product.
// The 4-bit network runs every operand pair after reset, the 8-bit one starts unreset and
// is initialised by N zero bits, the 16-bit one runs random pairs after reset. The clock
// count of the 4-bit run is checked as well.
module tb_cdm_zone_network;
  logic clk = 1'b0;
  int   checks[3], failures[3], frames[3];
  logic done[3];
  int   cycles = 0, cycles_at_done4 = -1;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  cdm_check #(.N(4))                     u_n4  (.clk(clk), .checks(checks[0]), .failures(failures[0]), .frames_done(frames[0]), .done(done[0]));
  cdm_check #(.N(8),  .PRE_ZEROS(1'b1)) u_n8  (.clk(clk), .checks(checks[1]), .failures(failures[1]), .frames_done(frames[1]), .done(done[1]));
  cdm_check #(.N(16), .FRAMES(40))       u_n16 (.clk(clk), .checks(checks[2]), .failures(failures[2]), .frames_done(frames[2]), .done(done[2]));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

  initial begin
    int total_checks, total_failures;
    @(posedge clk);  // let the checkers clear their done flags first
    wait (done[0]);
    cycles_at_done4 = cycles;
    wait (done[0] && done[1] && done[2]);
    total_checks   = checks[0] + checks[1] + checks[2];
    total_failures = failures[0] + failures[1] + failures[2];
    // 2 reset clocks + 256 frames x 2N bits x 4 zones + one 4-zone collection slot
    total_checks++;
    if (cycles_at_done4 != 2 + 256 * 8 * 4 + 4) begin
      total_failures++;
      $display("FAIL 4-bit run took %0d clocks", cycles_at_done4);
    end
    total_checks++;
    if (frames[0] != 256 || frames[1] != 21 || frames[2] != 41) total_failures++;
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule

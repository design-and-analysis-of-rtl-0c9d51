// tb_carry_lookahead_adder: checks the carry_lookahead_adder at the default 4-bit width (every operand pair and
// carry in) and at 8 and 16 bits (carry-propagate cases and random pairs) against integer
// addition.
module tb_carry_lookahead_adder;
  int   checks[3], failures[3];
  logic done[3];

  adder_check #(.WIDTH(4),  .KIND(1)) u_w4  (.checks(checks[0]), .failures(failures[0]), .done(done[0]));
  adder_check #(.WIDTH(8),  .KIND(1)) u_w8  (.checks(checks[1]), .failures(failures[1]), .done(done[1]));
  adder_check #(.WIDTH(16), .KIND(1)) u_w16 (.checks(checks[2]), .failures(failures[2]), .done(done[2]));

  initial begin : watchdog
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

  initial begin
    #1;  // let the checkers clear their done flags first
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end
endmodule

// tb_full_adder: exhaustive check of the majority-gate full adder against integer
// addition of its three input bits.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, ci} = 3'(v);
      total = int'(a) + int'(b) + int'(ci);
      #1;
      checks++;
      if ({co, s} !== 2'(total)) begin
        failures++;
        $display("FAIL %b+%b+%b gives co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_maj3: exhaustive check of the three-input majority gate, and of its use as AND
// (one input tied to 0) and OR (one input tied to 1), against a count of ones.
module tb_maj3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  maj3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== ((int'(a) + int'(b) + int'(c)) >= 2)) begin
        failures++;
        $display("FAIL maj3(%b,%b,%b) = %b", a, b, c, y);
      end
      // AND / OR by a constant third input
      if (c == 1'b0) begin
        checks++;
        if (y !== (a & b)) failures++;
      end else begin
        checks++;
        if (y !== (a | b)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

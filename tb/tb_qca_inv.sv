// tb_qca_inv: checks the inverter for both input polarizations.
module tb_qca_inv;
  logic a, y;
  int checks = 0, failures = 0;

  qca_inv dut (.a(a), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b1;
    #1;
    checks++;
    if (y !== 1'b0) failures++;
    a = 1'b0;
    #1;
    checks++;
    if (y !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

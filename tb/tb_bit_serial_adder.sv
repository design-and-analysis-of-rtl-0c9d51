// tb_bit_serial_adder: streams pairs of 16-bit words LSB first into the bit-serial adder
// and compares each sum bit with the same bit of the integer sum. Each word is followed
// by one zero slot, in which the stored carry of the word must come out as its carry out
// bit; this also clears the carry before the next word. The first words start from a
// reset, one later word starts without a reset.
module tb_bit_serial_adder;
  localparam int unsigned W = 16;
  logic clk = 1'b0, rst_n, a, b, s;
  int checks = 0, failures = 0;

  bit_serial_adder dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .s(s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_word(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] total;
    total = {1'b0, x} + {1'b0, y};
    for (int t = 0; t <= int'(W); t++) begin
      a = (t < int'(W)) ? x[t] : 1'b0;
      b = (t < int'(W)) ? y[t] : 1'b0;
      #1;
      checks++;
      if (s !== total[t]) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h bit %0d: got %b", x, y, t, s);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    a = 1'b0;
    b = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    add_word(16'hFFFF, 16'h0001);   // carry travels through every slot
    add_word(16'hFFFF, 16'hFFFF);
    add_word(16'h0000, 16'h0000);
    for (int i = 0; i < 200; i++) add_word(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

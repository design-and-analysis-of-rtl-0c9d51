// spm_check: drives one N-bit serial-parallel multiplier with a stream of product frames
// and checks its serial output against the integer product.
//
// A frame is 2N clocks: N bits of the multiplier a (LSB first) with b held, then N zeros.
// Frames follow each other with no gap. Product bit t of a frame must appear on p_serial
// one clock after slot t of that frame, so each product is finished 2N clocks after its
// first bit, and one product leaves every 2N clocks. For N up to 4 every (a, b) pair is
// run; wider multipliers run the all-ones pair and FRAMES random pairs. Before the frames
// the multiplier is either reset (PRE_ZEROS = 0) or, with reset never asserted and the
// state random, fed N zero slots, the initialisation the circuit itself relies on.
module spm_check #(
  parameter int unsigned N         = 4,
  parameter int unsigned FRAMES    = 50,
  parameter bit          PRE_ZEROS = 1'b0
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   frames_done,
  output logic done
);
  logic         rst_n, a_serial, p_serial;
  logic [N-1:0] b;
  logic         exp_q[$];   // expected output bit for every driven slot
  logic         skip_q[$];  // slot whose output is not checked (initialisation zeros)

  serial_parallel_multiplier #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .a_serial(a_serial), .b(b), .p_serial(p_serial));

  // One slot: compare the output of the previous slot, then drive this slot.
  task automatic slot(input logic a_bit, input logic expect_bit, input logic skip);
    @(negedge clk);
    if (exp_q.size() > 0) begin
      logic e, sk;
      e  = exp_q.pop_front();
      sk = skip_q.pop_front();
      if (!sk) begin
        checks++;
        if (p_serial !== e) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d frame %0d: p_serial=%b expected %b",
                                      N, frames_done, p_serial, e);
        end
      end
    end
    a_serial = a_bit;
    exp_q.push_back(expect_bit);
    skip_q.push_back(skip);
  endtask

  task automatic frame(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] prod;
    prod = (2*N)'(x) * (2*N)'(y);
    b = y;
    for (int t = 0; t < 2 * int'(N); t++)
      slot((t < int'(N)) ? x[t] : 1'b0, prod[t], 1'b0);
    frames_done++;
  endtask

  initial begin
    checks      = 0;
    failures    = 0;
    frames_done = 0;
    done        = 1'b0;
    a_serial    = 1'b0;
    b           = '0;
    if (PRE_ZEROS) begin
      rst_n = 1'b1;
      for (int t = 0; t < int'(N); t++) slot(1'b0, 1'b0, 1'b1);
    end else begin
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
    end
    if (N <= 4) begin
      for (int x = 0; x < (1 << N); x++)
        for (int y = 0; y < (1 << N); y++)
          frame(N'(x), N'(y));
    end else begin
      frame('1, '1);
      for (int i = 0; i < int'(FRAMES); i++) begin
        logic [N-1:0] rx, ry;
        for (int w = 0; w < int'(N); w += 32) begin
          rx = (rx << 32) | N'($urandom);
          ry = (ry << 32) | N'($urandom);
        end
        frame(rx, ry);
      end
    end
    slot(1'b0, 1'b0, 1'b1);   // collect the last product bit
    done = 1'b1;
  end
endmodule

// adder_check: drives one WIDTH-bit adder with operand pairs and compares its sum and
// carry out with the integer sum a + b + cin. For WIDTH up to 4 every operand pair and
// carry in is applied; wider adders get the all-ones carry-propagate cases plus RANDOM
// random pairs. Reports its counts when done is raised. KIND selects the adder:
// 0 ripple carry, 1 carry lookahead, 2 conditional sum.
module adder_check #(
  parameter int unsigned WIDTH  = 4,
  parameter int unsigned KIND   = 0,
  parameter int unsigned RANDOM = 2000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  logic [WIDTH-1:0] a, b, sum;
  logic             cin, cout;

  if (KIND == 0) begin : g_rca
    ripple_carry_adder #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else if (KIND == 1) begin : g_cla
    carry_lookahead_adder #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else begin : g_csa
    conditional_sum_adder #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end

  task automatic apply(input logic [WIDTH-1:0] ta, input logic [WIDTH-1:0] tb,
                       input logic tc);
    logic [WIDTH:0] expected;
    a   = ta;
    b   = tb;
    cin = tc;
    expected = {1'b0, ta} + {1'b0, tb} + {{WIDTH{1'b0}}, tc};
    #1;
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL kind=%0d width=%0d: %h + %h + %b gave %b_%h, expected %h",
                 KIND, WIDTH, ta, tb, tc, cout, sum, expected);
    end
  endtask

  initial begin
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    if (WIDTH <= 4) begin
      for (int x = 0; x < (1 << WIDTH); x++)
        for (int y = 0; y < (1 << WIDTH); y++)
          for (int c = 0; c < 2; c++)
            apply(WIDTH'(x), WIDTH'(y), 1'(c));
    end else begin
      apply('1, '0, 1'b1);            // carry ripples through every bit
      apply('0, '1, 1'b1);
      apply('1, '1, 1'b1);
      apply('0, '0, 1'b0);
      for (int i = 0; i < int'(RANDOM); i++) begin
        logic [WIDTH-1:0] ra, rb;
        for (int w = 0; w < int'(WIDTH); w += 32) begin
          ra = (ra << 32) | WIDTH'($urandom);
          rb = (rb << 32) | WIDTH'($urandom);
        end
        apply(ra, rb, 1'($urandom));
      end
    end
    done = 1'b1;
  end
endmodule

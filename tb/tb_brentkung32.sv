// tb_brentkung32: checks the 32-bit adder against the integer sum a + b + c0:
// corner operands, carries that run from bit 0 to the carry out, the small
// example 2 + 3 = 5, and random operands.
module tb_brentkung32;
  localparam int W = 32;
  logic [W-1:0] a, b, sum;
  logic         c0, c32;
  int checks = 0, failures = 0;

  brentkung32 dut (.a(a), .b(b), .c0(c0), .sum(sum), .c32(c32));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic tc);
    logic [W:0] exp_s;
    a = ta; b = tb; c0 = tc;
    exp_s = {1'b0, ta} + {1'b0, tb} + {{W{1'b0}}, tc};
    #1;
    checks++;
    if ({c32, sum} !== exp_s) begin
      failures++;
      $display("FAIL %h + %h + %0b = %h, expected %h", ta, tb, tc, {c32, sum}, exp_s);
    end
  endtask

  initial begin
    check(32'd2, 32'd3, 1'b0);
    check('0, '0, 1'b0);
    check('0, '0, 1'b1);
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check('1, 32'd1, 1'b0);
    check(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int k = 0; k < W; k++) check(~(32'd1 << k), 32'd1 << k, 1'b1);
    for (int n = 0; n < 5000; n++) check($urandom, $urandom, 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

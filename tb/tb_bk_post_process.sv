// tb_bk_post_process: random check of the sum stage. Propagates and carries
// are derived from random operands by a ripple loop in the testbench, so the
// expected sum is simply the integer sum a + b + cin.
module tb_bk_post_process;
  localparam int W = 32;
  logic [W-1:0] p, sum, a, b;
  logic [W:0]   c;
  logic         cout;
  int checks = 0, failures = 0;

  bk_post_process #(.WIDTH(W)) dut (.p(p), .c(c), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] ref_sum;
    for (int n = 0; n < 2000; n++) begin
      a = $urandom; b = $urandom;
      c[0] = 1'($urandom_range(0, 1));
      for (int i = 0; i < W; i++) c[i+1] = (a[i] & b[i]) | ((a[i] | b[i]) & c[i]);
      p = a ^ b;
      ref_sum = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, c[0]};
      #1;
      checks++;
      if ({cout, sum} !== ref_sum) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b got %h exp %h", a, b, c[0], {cout, sum}, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bk_prefix_tree: checks every carry of the Brent-Kung network against a
// ripple recurrence c[i+1] = g[i] | p[i] & c[i]. p and g are drawn
// independently at random (not only the combinations an adder produces), plus
// patterns with long propagate runs so that carries cross the whole word.
module tb_bk_prefix_tree;
  localparam int W = 32;
  logic [W-1:0] p, g;
  logic         cin;
  logic [W:0]   c, exp_c;
  int checks = 0, failures = 0;

  bk_prefix_tree #(.WIDTH(W)) dut (.p(p), .g(g), .cin(cin), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    exp_c[0] = cin;
    for (int i = 0; i < W; i++) exp_c[i+1] = g[i] | (p[i] & exp_c[i]);
    #1;
    checks++;
    if (c !== exp_c) begin
      failures++;
      $display("FAIL p=%h g=%h cin=%0b got %h exp %h", p, g, cin, c, exp_c);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      p = $urandom; g = $urandom; cin = 1'($urandom_range(0, 1));
      check();
    end
    // one generate at position k under an all-propagate word above it
    for (int k = -1; k < W; k++) begin
      p = '1; g = '0; cin = (k < 0);
      if (k >= 0) begin g[k] = 1'b1; p[k] = 1'b0; end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bk_error_detect: checks that the detector flags exactly the operands
// whose speculative carries are wrong. The window signals fed to the detector
// are computed in the testbench from random operands; the expected flag is
// whether any windowed carry (carry out included) differs from the exact
// carry of a + b + cin, found with integer arithmetic. Operands are biased
// towards long propagate runs so both outcomes occur many times.
module tb_bk_error_detect;
  localparam int W  = 32;
  localparam int WN = 16;
  logic [W-1:0] a, b, gw, pw;
  logic         cin, err;
  int checks = 0, failures = 0, n_err = 0;

  bk_error_detect #(.WIDTH(W), .WINDOW(WN)) dut (.gw(gw), .pw(pw), .err(err));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int       start, len, lo;
    logic     exp_err;
    logic [63:0] exact, mask, spec;
    for (int n = 0; n < 4000; n++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom_range(0, 1));
      if (n % 2 == 1) begin
        start = $urandom_range(0, W - 1);
        len   = $urandom_range(WN - 2, W);
        for (int j = start; j < start + len && j < W; j++) b[j] = ~a[j];
      end
      exp_err = 1'b0;
      for (int i = 0; i < W; i++) begin
        lo    = (i - WN + 1 > 0) ? i - WN + 1 : 0;
        mask  = (64'd1 << (i - lo + 1)) - 64'd1;
        spec  = ((64'(a) >> lo) & mask) + ((64'(b) >> lo) & mask) + ((lo == 0) ? 64'(cin) : 64'd0);
        gw[i] = spec[i-lo+1];
        pw[i] = (((64'(a ^ b) >> lo) & mask) == mask);
        // exact carry out of bit i: bit i+1 of a+b+cin with the operands cut above bit i
        mask  = (64'd1 << (i + 1)) - 64'd1;
        exact = (64'(a) & mask) + (64'(b) & mask) + 64'(cin);
        if (exact[i+1] !== gw[i]) exp_err = 1'b1;
      end
      #1;
      checks++;
      if (err) n_err++;
      if (err !== exp_err) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b err=%0b exp %0b", a, b, cin, err, exp_err);
      end
    end
    checks++;
    if (n_err == 0) begin
      failures++;
      $display("FAIL no mis-speculation was produced");
    end
    $display("mis-speculations flagged: %0d of 4000", n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

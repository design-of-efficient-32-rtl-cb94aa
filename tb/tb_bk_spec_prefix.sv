// tb_bk_spec_prefix: checks the windowed (speculative) carry network.
// The expected window signals are computed by loops over the bits of each
// window: gw[i] ripples a carry through bits max(i-WINDOW+1,0)..i, starting
// from the carry in only when the window reaches bit 0; pw[i] (i >= WINDOW)
// is the AND of the window's propagates. Operands are random and also biased
// towards long propagate runs, where the speculative carry is wrong.
module tb_bk_spec_prefix;
  localparam int W  = 32;
  localparam int WN = 16;
  logic [W-1:0] a, b, p, g, gw, pw;
  logic         cin;
  logic [W:0]   c_spec;
  int checks = 0, failures = 0;

  assign p = a ^ b;
  assign g = a & b;

  bk_spec_prefix #(.WIDTH(W), .WINDOW(WN)) dut (
    .p(p), .g(g), .cin(cin), .c_spec(c_spec), .gw(gw), .pw(pw)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] e_gw, e_pw;
    logic [63:0]  mask, spec;
    int           lo;
    #1;
    for (int i = 0; i < W; i++) begin
      lo      = (i - WN + 1 > 0) ? i - WN + 1 : 0;
      mask    = (64'd1 << (i - lo + 1)) - 64'd1;
      spec    = ((64'(a) >> lo) & mask) + ((64'(b) >> lo) & mask) + ((lo == 0) ? 64'(cin) : 64'd0);
      e_gw[i] = spec[i-lo+1];
      e_pw[i] = (((64'(p) >> lo) & mask) == mask);
    end
    checks++;
    if (gw !== e_gw || c_spec !== {e_gw, cin}) begin
      failures++;
      $display("FAIL gw a=%h b=%h cin=%0b got %h exp %h", a, b, cin, gw, e_gw);
    end
    checks++;
    if (pw[W-1:WN] !== e_pw[W-1:WN]) begin
      failures++;
      $display("FAIL pw a=%h b=%h got %h exp %h", a, b, pw, e_pw);
    end
  endtask

  initial begin
    int start, len;
    for (int n = 0; n < 3000; n++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom_range(0, 1));
      if (n % 2 == 1) begin
        // force a propagate run of random length at a random position
        start = $urandom_range(0, W - 1);
        len   = $urandom_range(WN - 2, W);
        for (int j = start; j < start + len && j < W; j++) b[j] = ~a[j];
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

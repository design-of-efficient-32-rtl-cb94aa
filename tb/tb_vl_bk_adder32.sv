// tb_vl_bk_adder32: end-to-end test of the variable-latency adder at its
// default parameters (32-bit word, 16-bit speculation window).
//
// A stream of additions is offered with random gaps. Half of the operands are
// random; the other half contain a long propagate run, so that a carry has to
// travel further than the speculation window and the speculative result is
// wrong. For each accepted operation the testbench predicts independently:
//   * the sum, as the integer a + b + c0;
//   * whether speculation fails, by recomputing every carry from a window of
//     16 bits and comparing it with the exact carries;
//   * the latency: result one cycle after acceptance when speculation holds,
//     two cycles (with in_ready low in between) when it fails.
// It counts each mechanism: speculative hits, mis-speculations with their
// stall and correction, back-to-back acceptance, idle cycles and carry-in use,
// and counts a failure for any that never happened.
module tb_vl_bk_adder32;
  localparam int W  = 32;
  localparam int WN = 16;
  localparam int NOPS = 4000;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid, in_ready, c0, out_valid, c32, out_corrected, spec_err;
  logic [W-1:0] a, b, sum;

  int checks = 0, failures = 0, cycle = 0;
  int n_hit = 0, n_miss = 0, n_stall = 0, n_b2b = 0, n_idle = 0, n_cin = 0, n_done = 0;

  vl_bk_adder32 dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .a(a), .b(b), .c0(c0),
    .out_valid(out_valid), .sum(sum), .c32(c32),
    .out_corrected(out_corrected), .spec_err(spec_err)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20 * NOPS) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d cycles", 20 * NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: does a window of WN bits mispredict any carry of a + b + cin?
  // A carry out of bit i predicted from bits lo..i only is bit (i-lo+1) of the
  // integer sum of those operand bits (plus c0 if the window reaches bit 0).
  function automatic logic mispredicts(input logic [W-1:0] x, input logic [W-1:0] y, input logic cin);
    logic [63:0] mask, exact, spec;
    int          lo;
    for (int i = 0; i < W; i++) begin
      lo    = (i - WN + 1 > 0) ? i - WN + 1 : 0;
      mask  = (64'd1 << (i + 1)) - 64'd1;
      exact = (64'(x) & mask) + (64'(y) & mask) + 64'(cin);
      mask  = (64'd1 << (i - lo + 1)) - 64'd1;
      spec  = ((64'(x) >> lo) & mask) + ((64'(y) >> lo) & mask) + ((lo == 0) ? 64'(cin) : 64'd0);
      if (exact[i+1] != spec[i-lo+1]) return 1'b1;
    end
    return 1'b0;
  endfunction

  // expected operation in flight
  logic [W:0] exp_sum;
  logic       exp_miss;
  int         acc_cycle;
  logic       pending = 1'b0;

  // checker: samples on the falling edge, when all outputs have settled
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (!pending) begin
          failures++;
          $display("FAIL cycle %0d: out_valid with no operation in flight", cycle);
        end else begin
          if ({c32, sum} !== exp_sum) begin
            failures++;
            $display("FAIL cycle %0d: sum %h expected %h", cycle, {c32, sum}, exp_sum);
          end
          checks++;
          if (out_corrected !== exp_miss || (cycle - acc_cycle) != (exp_miss ? 2 : 1)) begin
            failures++;
            $display("FAIL cycle %0d: corrected=%0b latency=%0d, expected miss=%0b",
                     cycle, out_corrected, cycle - acc_cycle, exp_miss);
          end
          if (exp_miss) n_miss++; else n_hit++;
          n_done++;
        end
      end else if (pending) begin
        // the only cycle without a result while busy is the correction stall
        checks++;
        if (!(exp_miss && spec_err && !in_ready && cycle - acc_cycle == 1)) begin
          failures++;
          $display("FAIL cycle %0d: no result, miss=%0b spec_err=%0b in_ready=%0b",
                   cycle, exp_miss, spec_err, in_ready);
        end else n_stall++;
      end
    end
  end

  // bookkeeping of the accepted operation, on the clock edge that accepts it
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) pending <= 1'b0;
      if (in_valid && in_ready) begin
        if (out_valid) n_b2b++;
        pending   <= 1'b1;
        exp_sum   <= {1'b0, a} + {1'b0, b} + {{W{1'b0}}, c0};
        exp_miss  <= mispredicts(a, b, c0);
        acc_cycle <= cycle;
        if (c0) n_cin++;
      end
    end
  end

  initial begin
    int start, len, sent;
    in_valid = 1'b0; a = '0; b = '0; c0 = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    sent = 0;
    while (sent < NOPS) begin
      @(negedge clk);
      if (in_valid && in_ready_q) sent++;
      if (sent >= NOPS) begin in_valid = 1'b0; break; end
      if (in_valid && !in_ready_q) begin
        // not accepted: hold the operation
      end else if ($urandom_range(0, 9) == 0) begin
        in_valid = 1'b0;
        n_idle++;
      end else begin
        in_valid = 1'b1;
        a  = $urandom;
        b  = $urandom;
        c0 = 1'($urandom_range(0, 1));
        if (sent == 0) begin
          a = 32'd2; b = 32'd3; c0 = 1'b0;   // first operation: 2 + 3 = 5
        end else if (sent % 2 == 1) begin
          start = $urandom_range(0, W - WN);
          len   = $urandom_range(WN - 1, W);
          for (int j = start; j < start + len && j < W; j++) b[j] = ~a[j];
        end
      end
    end
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_done != NOPS) begin
      failures++;
      $display("FAIL %0d results for %0d operations", n_done, NOPS);
    end
    $display("speculative hits %0d, mis-speculations %0d, stall cycles %0d, back-to-back %0d, idle %0d, carry-in %0d",
             n_hit, n_miss, n_stall, n_b2b, n_idle, n_cin);
    if (n_hit == 0)   begin failures++; $display("FAIL no speculative hit");      end
    if (n_miss == 0)  begin failures++; $display("FAIL no mis-speculation");      end
    if (n_stall == 0) begin failures++; $display("FAIL no correction stall");     end
    if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back accept");  end
    if (n_idle == 0)  begin failures++; $display("FAIL no idle cycle");           end
    if (n_cin == 0)   begin failures++; $display("FAIL carry in never used");     end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // in_ready as it was at the last rising edge (the driver runs at the falling edge)
  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready;
endmodule

// vl_bk_adder32: variable-latency speculative 32-bit Brent-Kung adder.
//
// An addition is accepted into the operand registers, then completes in one
// clock cycle when the speculation holds and in two when it fails:
//   * speculative path (one cycle): bk_pg_cell pre-processing, the pruned
//     carry network bk_spec_prefix, bk_post_process for the sum bits, and
//     bk_error_detect, which raises spec_err when any predicted carry is
//     wrong. Without an error the speculative sum is delivered at once.
//   * correction path (two cycles): brentkung32, the exact Brent-Kung adder,
//     fed by the same operand registers. On an error the speculative sum is
//     discarded, the adder stalls for one cycle (in_ready low) and the exact
//     sum is delivered in the next cycle. The operand registers are held for
//     both cycles, so the exact adder lies on a two-cycle path and is off the
//     critical path; a timing flow should treat operand registers ->
//     brentkung32 -> sum as a two-cycle (multicycle) path.
//
// Handshake (this design's own choice): an operation is accepted on a rising
// clk edge with in_valid && in_ready. Its result appears with out_valid in the
// following cycle (speculation holds, out_corrected = 0) or one cycle later
// (out_corrected = 1). The consumer must take the result in the cycle
// out_valid is high; there is no output back-pressure. A new operation can be
// accepted in the same edge that ends the previous one, so a stream of
// additions without mis-speculation runs at one per cycle. Reset is
// asynchronous, active low, and empties the adder.
module vl_bk_adder32 #(
  parameter int unsigned WIDTH  = bk_pkg::BK_WIDTH,
  parameter int unsigned WINDOW = bk_pkg::BK_SPEC_WINDOW
) (
  input  logic             clk,
  input  logic             rst_n,
  // operation in
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c0,
  // result out
  output logic             out_valid,
  output logic [WIDTH-1:0] sum,
  output logic             c32,
  output logic             out_corrected,  // result came from the correction path
  output logic             spec_err        // the operation now held was mis-speculated
);

  typedef enum logic [1:0] {
    ST_EMPTY,    // no operation held
    ST_SPEC,     // first cycle of an operation: speculative result
    ST_CORR      // second cycle after a mis-speculation: exact result
  } state_e;

  state_e           state, state_nxt;
  logic [WIDTH-1:0] a_q, b_q;
  logic             c0_q;

  // ---------------------------------------------------------------- speculative path
  logic [WIDTH-1:0] p, g, gw, pw, spec_sum;
  logic [WIDTH:0]   c_spec;
  logic             spec_cout, err;

  for (genvar i = 0; i < WIDTH; i++) begin : g_pg
    bk_pg_cell u_pg (.a(a_q[i]), .b(b_q[i]), .p(p[i]), .g(g[i]));
  end

  bk_spec_prefix #(.WIDTH(WIDTH), .WINDOW(WINDOW)) u_spec (
    .p(p), .g(g), .cin(c0_q), .c_spec(c_spec), .gw(gw), .pw(pw)
  );

  bk_post_process #(.WIDTH(WIDTH)) u_spec_post (
    .p(p), .c(c_spec), .sum(spec_sum), .cout(spec_cout)
  );

  bk_error_detect #(.WIDTH(WIDTH), .WINDOW(WINDOW)) u_detect (
    .gw(gw), .pw(pw), .err(err)
  );

  // ---------------------------------------------------------------- correction path
  logic [WIDTH-1:0] exact_sum;
  logic             exact_cout;

  brentkung32 #(.WIDTH(WIDTH)) u_correct (
    .a(a_q), .b(b_q), .c0(c0_q), .sum(exact_sum), .c32(exact_cout)
  );

  // ---------------------------------------------------------------- control
  always_comb begin
    in_ready      = 1'b1;
    out_valid     = 1'b0;
    out_corrected = 1'b0;
    sum           = spec_sum;
    c32           = spec_cout;
    state_nxt     = state;
    unique case (state)
      ST_EMPTY: ;
      ST_SPEC: begin
        if (err) begin
          in_ready  = 1'b0;          // stall: correction needs a second cycle
          state_nxt = ST_CORR;
        end else begin
          out_valid = 1'b1;
        end
      end
      ST_CORR: begin
        out_valid     = 1'b1;
        out_corrected = 1'b1;
        sum           = exact_sum;
        c32           = exact_cout;
      end
      default: ;
    endcase
    if (in_ready) state_nxt = in_valid ? ST_SPEC : ST_EMPTY;
  end

  assign spec_err = (state == ST_SPEC) && err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_EMPTY;
      a_q   <= '0;
      b_q   <= '0;
      c0_q  <= 1'b0;
    end else begin
      state <= state_nxt;
      if (in_valid && in_ready) begin
        a_q  <= a;
        b_q  <= b;
        c0_q <= c0;
      end
    end
  end

  // A speculative result that is let through must equal the exact one.
  always_ff @(posedge clk) begin
    if (state == ST_SPEC && !err)
      assert ({spec_cout, spec_sum} == {exact_cout, exact_sum})
        else $error("vl_bk_adder32: undetected mis-speculation");
  end

endmodule

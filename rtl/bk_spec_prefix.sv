// bk_spec_prefix: speculative (pruned) carry network.
//
// Predicts every carry from at most WINDOW lower bit positions instead of the
// whole word: the speculative carry into bit i+1 is the group generate
// G(i : i-WINDOW+1), or the exact G(i:0) (carry in included) when i < WINDOW.
// A carry that has to travel through more than WINDOW propagating positions is
// missed; bk_error_detect flags exactly those cases.
//
// Construction: a grey cell folds the carry in at bit 0, then log2(WINDOW)
// levels of prefix cells with spans 1, 2, 4, ... merge each column with the
// column one span below (a full prefix network with its upper levels pruned).
// A merged span that reaches bit 0 needs only its generate and uses a grey
// cell; the others use black cells. Besides the carries, the window groups
// gw/pw are brought out for the error detector. Combinational, log2(WINDOW)+1
// cell levels.
//
// The pruned-prefix principle (keep the first levels, drop the long-range
// ones, correct later) is taken from the speculative prefix adders this design
// builds on; the sliding-window form and WINDOW = WIDTH/2 are this design's
// own choices.
module bk_spec_prefix #(
  parameter int unsigned WIDTH  = bk_pkg::BK_WIDTH,
  parameter int unsigned WINDOW = bk_pkg::BK_SPEC_WINDOW  // power of two, < WIDTH
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] g,
  input  logic             cin,
  output logic [WIDTH:0]   c_spec,  // speculative carry into each bit (c_spec[0] = cin)
  output logic [WIDTH-1:0] gw,      // gw[i] = G(i : max(i-WINDOW+1, 0)), carry in folded at bit 0
  output logic [WIDTH-1:0] pw       // pw[i] = P(i : i-WINDOW+1), valid for i >= WINDOW
);

  localparam int unsigned LW = bk_pkg::clog2_int(WINDOW);

  logic [WIDTH-1:0] gl [LW+1];
  logic [WIDTH-1:0] pl [LW+1];

  initial begin
    assert ((32'd1 << LW) == WINDOW && WINDOW < WIDTH)
      else $fatal(1, "bk_spec_prefix: WINDOW must be a power of two below WIDTH");
  end

  bk_grey_cell u_cin_cell (
    .g_ik(g[0]), .p_ik(p[0]), .g_kj(cin), .g_ij(gl[0][0])
  );
  assign pl[0][0] = p[0];
  assign gl[0][WIDTH-1:1] = g[WIDTH-1:1];
  assign pl[0][WIDTH-1:1] = p[WIDTH-1:1];

  for (genvar lv = 1; lv <= LW; lv++) begin : g_level
    localparam int unsigned S = 1 << (lv - 1);
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i < S) begin : g_pass
        assign gl[lv][i] = gl[lv-1][i];
        assign pl[lv][i] = pl[lv-1][i];
      end else if (i < 2 * S) begin : g_grey
        bk_grey_cell u_cell (
          .g_ik(gl[lv-1][i]), .p_ik(pl[lv-1][i]), .g_kj(gl[lv-1][i-S]),
          .g_ij(gl[lv][i])
        );
        assign pl[lv][i] = pl[lv-1][i];   // span reaches bit 0: propagate unused
      end else begin : g_black
        bk_black_cell u_cell (
          .g_ik(gl[lv-1][i]), .p_ik(pl[lv-1][i]),
          .g_kj(gl[lv-1][i-S]), .p_kj(pl[lv-1][i-S]),
          .g_ij(gl[lv][i]), .p_ij(pl[lv][i])
        );
      end
    end
  end

  assign gw          = gl[LW];
  assign pw          = pl[LW];
  assign c_spec[0]   = cin;
  assign c_spec[WIDTH:1] = gl[LW];

endmodule

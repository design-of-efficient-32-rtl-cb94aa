// bk_prefix_tree: Brent-Kung carry generation (prefix) network.
//
// Takes the bitwise propagate/generate signals p, g and the carry in, and
// returns every carry c[i] (the carry into bit i; c[0] is the carry in and
// c[WIDTH] the carry out of the word).
//
// Structure, for WIDTH = 2^L:
//   * level 0: a grey cell at bit 0 folds the carry in: G(0:-1) = g0 | p0&cin.
//   * up-sweep, levels 1..L: at level l (span s = 2^(l-1)) bit i with
//     (i+1) mod 2s == 0 merges with bit i-s. The cell is grey when the merged
//     span reaches bit 0 (i+1 == 2s) and black otherwise. This builds the
//     aligned groups 1:0, 3:0, 7:0, ... and 3:2, 7:4, 11:8, ...
//   * down-sweep, levels L+1..2L-1: spans 2^(L-2) .. 1. Bit i with
//     (i+1) mod 2s == s and i >= 3s-1 merges with the complete prefix at bit
//     i-s through a grey cell, filling in the remaining carries.
// Every output carry is therefore produced by a grey cell (the last cell of
// its column), and black cells appear only where a propagate is still needed.
// For WIDTH = 32 this is 2L-1 = 9 cell levels after the carry-in fold, with
// 26 black and 32 grey cells (the carry-in cell included). Combinational.
//
// The tree shape is the Brent-Kung arrangement shown for 16 bits and extended
// here to 32 bits by the same rule; the carry-in fold at bit 0 follows the
// 16-bit drawing, where the carry in enters a cell at bit 0.
module bk_prefix_tree #(
  parameter int unsigned WIDTH = bk_pkg::BK_WIDTH   // power of two, >= 2
) (
  input  logic [WIDTH-1:0] p,     // bit propagates
  input  logic [WIDTH-1:0] g,     // bit generates
  input  logic             cin,   // carry into bit 0
  output logic [WIDTH:0]   c      // c[i] = carry into bit i, c[WIDTH] = carry out
);

  localparam int unsigned L    = bk_pkg::clog2_int(WIDTH);
  localparam int unsigned NLEV = 2 * L;   // levels 0 .. 2L-1

  // Group signals after each level; column i holds the span ending at bit i.
  logic [WIDTH-1:0] gl [NLEV];
  logic [WIDTH-1:0] pl [NLEV];

  initial begin
    assert ((32'd1 << L) == WIDTH)
      else $fatal(1, "bk_prefix_tree: WIDTH must be a power of two");
  end

  // Level 0: fold the carry in at bit 0 with a grey cell.
  bk_grey_cell u_cin_cell (
    .g_ik(g[0]), .p_ik(p[0]), .g_kj(cin), .g_ij(gl[0][0])
  );
  assign pl[0][0] = p[0];
  assign gl[0][WIDTH-1:1] = g[WIDTH-1:1];
  assign pl[0][WIDTH-1:1] = p[WIDTH-1:1];

  for (genvar lv = 1; lv < NLEV; lv++) begin : g_level
    // Span of this level: up-sweep doubles it, down-sweep halves it.
    localparam int unsigned S = (lv <= L) ? (1 << (lv - 1)) : (1 << (2 * L - 1 - lv));
    localparam bit          UP = (lv <= L);

    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      localparam bit ACT_UP   = UP  && (((i + 1) % (2 * S)) == 0);
      localparam bit ACT_DOWN = !UP && (((i + 1) % (2 * S)) == S) && (i >= 3 * S - 1);

      if (ACT_UP && (i + 1 == 2 * S)) begin : g_grey_up
        bk_grey_cell u_cell (
          .g_ik(gl[lv-1][i]), .p_ik(pl[lv-1][i]), .g_kj(gl[lv-1][i-S]),
          .g_ij(gl[lv][i])
        );
        assign pl[lv][i] = pl[lv-1][i];   // span reaches bit 0: propagate no longer used
      end else if (ACT_UP) begin : g_black_up
        bk_black_cell u_cell (
          .g_ik(gl[lv-1][i]), .p_ik(pl[lv-1][i]),
          .g_kj(gl[lv-1][i-S]), .p_kj(pl[lv-1][i-S]),
          .g_ij(gl[lv][i]), .p_ij(pl[lv][i])
        );
      end else if (ACT_DOWN) begin : g_grey_down
        bk_grey_cell u_cell (
          .g_ik(gl[lv-1][i]), .p_ik(pl[lv-1][i]), .g_kj(gl[lv-1][i-S]),
          .g_ij(gl[lv][i])
        );
        assign pl[lv][i] = pl[lv-1][i];
      end else begin : g_pass
        assign gl[lv][i] = gl[lv-1][i];
        assign pl[lv][i] = pl[lv-1][i];
      end
    end
  end

  assign c[0]       = cin;
  assign c[WIDTH:1] = gl[NLEV-1];

endmodule

// brentkung32: 32-bit Brent-Kung parallel-prefix adder, sum = a + b + c0.
//
// Three stages in series, all combinational:
//   1. pre-processing: 32 bk_pg_cell instances form p_i = a_i^b_i, g_i = a_i&b_i;
//   2. carry generation: bk_prefix_tree, a Brent-Kung network of black and
//      grey cells (grey cells wherever only the group generate is needed);
//   3. post-processing: bk_post_process, s_i = p_i ^ c_i, c32 = carry out.
// Ports a, b, c0, sum and c32 are the adder's published interface. The logic
// depth is one XOR, 2*log2(WIDTH) prefix cells and one XOR. WIDTH is a
// parameter (power of two) with the 32-bit word as its default.
module brentkung32 #(
  parameter int unsigned WIDTH = bk_pkg::BK_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c0,    // carry in
  output logic [WIDTH-1:0] sum,
  output logic             c32    // carry out
);

  logic [WIDTH-1:0] p, g;
  logic [WIDTH:0]   c;

  for (genvar i = 0; i < WIDTH; i++) begin : g_pg
    bk_pg_cell u_pg (.a(a[i]), .b(b[i]), .p(p[i]), .g(g[i]));
  end

  bk_prefix_tree #(.WIDTH(WIDTH)) u_tree (.p(p), .g(g), .cin(c0), .c(c));

  bk_post_process #(.WIDTH(WIDTH)) u_post (.p(p), .c(c), .sum(sum), .cout(c32));

endmodule

// bk_post_process: post-processing (sum) stage of a prefix adder.
//
// Each sum bit is the bit propagate XOR the carry into that bit,
// s_i = p_i XOR c_i, where c_i is the group generate G(i-1:0) delivered by the
// prefix network; the carry out is the last carry, c[WIDTH]. One XOR level,
// combinational.
module bk_post_process #(
  parameter int unsigned WIDTH = bk_pkg::BK_WIDTH
) (
  input  logic [WIDTH-1:0] p,     // bit propagates
  input  logic [WIDTH:0]   c,     // c[i] = carry into bit i
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  always_comb begin
    sum  = p ^ c[WIDTH-1:0];
    cout = c[WIDTH];
  end

endmodule

// bk_pg_cell: bitwise propagate/generate cell of the pre-processing stage.
//
// For one bit position it forms the propagate p = a XOR b and the generate
// g = a AND b. An adder of N bits uses N of these cells side by side; their
// outputs feed the carry (prefix) network and the propagate is reused by the
// post-processing stage to form the sum bit. Purely combinational, one gate
// level. Both equations are the ones the adder is defined by; nothing here is
// a design choice.
module bk_pg_cell (
  input  logic a,   // operand bit A_i
  input  logic b,   // operand bit B_i
  output logic p,   // propagate P_i
  output logic g    // generate  G_i
);

  always_comb begin
    p = a ^ b;
    g = a & b;
  end

endmodule

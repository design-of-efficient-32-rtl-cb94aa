// bk_error_detect: mis-speculation detector for the windowed carry network.
//
// A speculative carry into bit i+1 (i >= WINDOW) is wrong exactly when its
// whole window i : i-WINDOW+1 propagates and a carry enters the window from
// below. Such a carry is born in some generate at position q and runs through
// propagating bits up to the window; then the window ending at q+WINDOW
// propagates and the window ending at q generates. So
//     err = OR over i = WINDOW .. WIDTH-1 of ( pw[i] AND gw[i-WINDOW] )
// is raised if and only if at least one speculative carry (the carry out
// included) differs from the exact one. It is one AND per position followed
// by an OR tree. Combinational.
//
// The role of the block (raise an error signal so the speculative sum is
// discarded and the corrected one used) follows the variable-latency scheme;
// the exact form of the condition follows from the window chosen in
// bk_spec_prefix.
module bk_error_detect #(
  parameter int unsigned WIDTH  = bk_pkg::BK_WIDTH,
  parameter int unsigned WINDOW = bk_pkg::BK_SPEC_WINDOW
) (
  input  logic [WIDTH-1:0] gw,    // window group generates from bk_spec_prefix
  input  logic [WIDTH-1:0] pw,    // window group propagates from bk_spec_prefix
  output logic             err    // at least one speculative carry is wrong
);

  logic [WIDTH-1:WINDOW] hit;

  always_comb begin
    for (int i = WINDOW; i < WIDTH; i++) hit[i] = pw[i] & gw[i-WINDOW];
    err = |hit;
  end

endmodule

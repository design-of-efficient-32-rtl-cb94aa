// bk_black_cell: black prefix cell.
//
// Combines an upper span i:k with the adjacent lower span k-1:j and produces
// both group signals of the merged span i:j:
//   G(i:j) = G(i:k) OR (P(i:k) AND G(k-1:j))
//   P(i:j) = P(i:k) AND P(k-1:j)
// Two AND gates and one OR gate; four inputs and two outputs. Used where the
// merged span does not yet reach bit 0, so its propagate is still needed by a
// later cell. Combinational.
module bk_black_cell (
  input  logic g_ik,    // G(i:k)
  input  logic p_ik,    // P(i:k)
  input  logic g_kj,    // G(k-1:j)
  input  logic p_kj,    // P(k-1:j)
  output logic g_ij,    // G(i:j)
  output logic p_ij     // P(i:j)
);

  always_comb begin
    g_ij = g_ik | (p_ik & g_kj);
    p_ij = p_ik & p_kj;
  end

endmodule

// bk_grey_cell: grey prefix cell.
//
// Combines an upper span i:k with the lower span k-1:j when the lower span
// already reaches the bottom of the word, so only the group generate of the
// merged span i:j is needed:  G(i:j) = G(i:k) OR (P(i:k) AND G(k-1:j)).
// One AND and one OR gate; it has three inputs and one output. Because the
// result reaches bit 0 (or the carry in), G(i:j) is the carry out of bit i.
// Combinational.
module bk_grey_cell (
  input  logic g_ik,    // group generate of the upper span  G(i:k)
  input  logic p_ik,    // group propagate of the upper span P(i:k)
  input  logic g_kj,    // group generate of the lower span  G(k-1:j)
  output logic g_ij     // group generate of the merged span G(i:j)
);

  always_comb g_ij = g_ik | (p_ik & g_kj);

endmodule

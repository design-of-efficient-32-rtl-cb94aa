// bk_pkg: constants shared by the Brent-Kung adder and its variable-latency
// wrapper.
//
// BK_WIDTH is the operand width of the adder (32 bits). BK_SPEC_WINDOW is the
// number of lower bit positions the speculative carry stage looks at when it
// predicts a carry; half the word width is this design's own choice, by
// analogy with a speculative prefix network pruned by one level (n/2).
// clog2_int is a constant function used to size the prefix networks.
package bk_pkg;

  parameter int unsigned BK_WIDTH       = 32;
  parameter int unsigned BK_SPEC_WINDOW = 16;

  function automatic int unsigned clog2_int(input int unsigned value);
    int unsigned result = 0;
    while ((32'd1 << result) < value) result++;
    return result;
  endfunction

endpackage

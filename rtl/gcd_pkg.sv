// gcd_pkg -- constants and sizing functions shared by the GCD engine.
//
// The engine works on unsigned operands of GCD_WIDTH bits (sixteen in the
// reference design). The comparator and the subtractor both combine bits in
// groups of four (radix four), so their pipeline depths grow with log4 of the
// width: cmp_stages() and sub_stages() give the number of pipeline stages,
// i.e. the number of stage controllers on the compare row and on the subtract
// row of the engine. At sixteen bits they are three and five.
package gcd_pkg;

  parameter int unsigned GCD_WIDTH = 16;

  // Smallest L with 4**L >= n (at least 1).
  function automatic int unsigned clog4(input int unsigned n);
    int unsigned l;
    int unsigned span;
    l    = 1;
    span = 4;
    while (span < n) begin
      span = span * 4;
      l    = l + 1;
    end
    return l;
  endfunction

  // Comparator: one bit-level stage plus one stage per radix-4 level.
  function automatic int unsigned cmp_stages(input int unsigned w);
    return 1 + clog4(w);
  endfunction

  // Subtractor: XOR pre-process, generate/propagate, one stage per
  // radix-4 prefix level, sum.
  function automatic int unsigned sub_stages(input int unsigned w);
    return 3 + clog4(w);
  endfunction

endpackage

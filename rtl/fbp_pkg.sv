// fbp_pkg: constants and helper functions shared by the folded bit-plane FIR
// filter. The array width formula k*(m1 + n + ceil(log2 k)) is the one the
// architecture is sized by: each of the k rows is m1 + n + ceil(log2 k) basic
// cells wide, which holds the largest possible sum of k products of an n-bit
// unsigned sample and an m1-bit unsigned coefficient. The default sizes
// (k = 3 taps, n = 5 input bits) are those of the reference block diagram; the
// maximum coefficient length m1 = 8 is this design's own choice.
package fbp_pkg;

  // Default configuration.
  localparam int unsigned DEF_K  = 3;  // number of taps = number of folding sets
  localparam int unsigned DEF_N  = 5;  // input sample width
  localparam int unsigned DEF_M1 = 8;  // maximum coefficient length

  // Width of one row of basic cells (and of the carry-save result).
  function automatic int unsigned row_width(int unsigned n, int unsigned m1,
                                            int unsigned k);
    return m1 + n + ((k > 1) ? $clog2(k) : 0);
  endfunction

  // Width needed to hold a coefficient length m in 1..m1.
  function automatic int unsigned mlen_width(int unsigned m1);
    return $clog2(m1 + 1);
  endfunction

endpackage

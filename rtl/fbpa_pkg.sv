// fbpa_pkg: widths shared by the folded bit-plane FIR filter (FBPA) blocks.
//
// The processing array of the folded filter is k rows of basic cells, each
// row m1 + n + ceil(log2 k) cells wide, so that the k-tap sum of n-bit input
// words times m1-bit coefficients never overflows a row. That width rule is the
// one the architecture is sized by; the helper for the width of the length
// control word (ceil(log2 m1), at least one bit) is this design's own.
package fbpa_pkg;

  // Number of basic cells in one row (also the width of the shift register,
  // of the carry-save words and of the filter output).
  function automatic int unsigned row_width(int unsigned nx, int unsigned m1,
                                            int unsigned k);
    return m1 + nx + ((k > 1) ? $clog2(k) : 0);
  endfunction

  // Width of the length-control word that holds m-1 (0 .. m1-1).
  function automatic int unsigned len_width(int unsigned m1);
    return (m1 > 1) ? $clog2(m1) : 1;
  endfunction

endpackage

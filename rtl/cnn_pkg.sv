// cnn_pkg: arithmetic helpers shared by the CNN layer kernels.
//
// All feature-map and coefficient values are signed fixed-point numbers of BW
// bits. Products and sums are kept at full precision inside a layer; when a
// layer writes its result stream it shifts the accumulator right by FRAC bits
// (arithmetic shift) and saturates it back to BW bits. The shift/saturate rule
// is this design's choice: the text only says data are fixed point of a chosen
// bit width.
package cnn_pkg;

  // Arithmetic right shift by frac, then clamp to a signed bw-bit range.
  // Works on accumulators up to 64 bits wide.
  function automatic logic signed [63:0] shift_sat(input logic signed [63:0] acc,
                                                   input int unsigned frac,
                                                   input int unsigned bw);
    logic signed [63:0] s, hi, lo;
    s  = acc >>> frac;
    hi = (64'sd1 <<< (bw - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (bw - 1));
    if (s > hi)      return hi;
    else if (s < lo) return lo;
    else             return s;
  endfunction

  // Width of an accumulator that adds n products of two bw-bit numbers.
  function automatic int unsigned acc_width(input int unsigned bw, input int unsigned n);
    return 2 * bw + $clog2(n + 1) + 1;
  endfunction

endpackage

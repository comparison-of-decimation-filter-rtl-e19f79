// decim_pkg: constants shared by the sigma-delta decimation filters.
//
// The decimators reduce the 1-bit output of a second-order sigma-delta
// modulator by the oversampling ratio N with a third-order comb (sinc^3)
// response H(z) = ((1 - z^-N) / (1 - z^-1))^k. The numbers here are the
// ones the three architectures share: modulator word length b = 1, filter
// order k = 3 and a default ratio N = 256 (the design is also meant to be
// built for N = 64 and 128). The output word is b + k*log2(N) bits, which
// holds the full-scale value N^k exactly. Choosing 256 as the default is
// this design's choice; the three ratios and b, k are the method's own.
package decim_pkg;

  localparam int unsigned B_DEFAULT   = 1;    // modulator output bits
  localparam int unsigned K_DEFAULT   = 3;    // comb filter order
  localparam int unsigned OSR_DEFAULT = 256;  // oversampling ratio N

  // Word length that avoids overflow: b + k*log2(N).
  function automatic int unsigned out_width(int unsigned b, int unsigned k, int unsigned osr);
    return b + k * $clog2(osr);
  endfunction

endpackage

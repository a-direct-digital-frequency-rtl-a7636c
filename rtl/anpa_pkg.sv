// anpa_pkg: types and constants shared by the ANPA (automatic nonuniform
// piecewise approximation) sine mapper.
//
// A segment's gradient is a sum of at most QF signed powers of two. Each
// power of two is one "term" and is coded in the coefficient table as
// {en, neg, shift}: the phase is first scaled up by 2^(G+LMAX) (G fractional
// guard bits, LMAX the largest left shift) and then shifted right by `shift`,
// so the factor applied to the phase is 2^(LMAX-shift). A segment's size
// coefficient h_i (segment length 2^(XW-h_i) on a 2^XW-point quarter wave)
// is held in H_W bits. The term format and the shift range are this design's
// choices; the original design shows shifts of 1, 2 and 3 in either direction as an
// example.
package anpa_pkg;

  localparam int unsigned LMAX    = 2;  // largest left shift: factor 4 > pi
  localparam int unsigned SHIFT_W = 5;  // right-shift code 0..31
  localparam int unsigned H_W     = 5;  // size coefficient h_i, up to 31

  // One partial product of the multiplier-less gradient.
  typedef struct packed {
    logic                en;     // term used by this segment
    logic                neg;    // subtract instead of add
    logic [SHIFT_W-1:0]  shift;  // factor 2^(LMAX-shift)
  } term_t;

  localparam int unsigned TERM_W = $bits(term_t);

  // Width of the signed offset word: magnitude R-1 bits, G fractional bits,
  // one sign bit and one bit of headroom for negative offsets.
  function automatic int unsigned beta_width(int unsigned r, int unsigned g);
    return r + g + 1;
  endfunction

  // Width of one coefficient table word: {h_i, QF terms, beta}.
  function automatic int unsigned entry_width(int unsigned r, int unsigned qf,
                                              int unsigned g);
    return H_W + qf * TERM_W + beta_width(r, g);
  endfunction

endpackage

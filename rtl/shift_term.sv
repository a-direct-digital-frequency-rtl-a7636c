// shift_term: one partial product of the multiplier-less gradient.
// The quarter phase x is scaled up by 2^(G+LMAX) and shifted right by the
// term's shift code, i.e. multiplied by 2^(LMAX-shift) with G fractional bits
// kept (bits below those are truncated). The shift is a multiplexer over the
// shifted copies of x, as in the shifter/MUX pair of the original ANPA design's
// multiplier-less datapath. The term is then added (neg=0), subtracted
// (neg=1) or dropped (en=0). The shift range 2^2 .. 2^-29 and the guard bits
// are this design's choices.
//
// Interface: x (XW bits, unsigned), code (anpa_pkg::term_t), term (signed,
// TW = XW+G+LMAX+1 bits, G fractional bits). Purely combinational.
module shift_term
  import anpa_pkg::*;
#(
  parameter int unsigned XW = 10,
  parameter int unsigned G  = 3,
  localparam int unsigned WW = XW + G + LMAX,   // scaled phase width
  localparam int unsigned TW = WW + 1           // signed term width
) (
  input  logic [XW-1:0]        x,
  input  term_t                code,
  output logic signed [TW-1:0] term
);

  logic [WW-1:0] wide;
  logic [WW-1:0] shifted;

  always_comb begin
    wide    = {x, {(G + LMAX){1'b0}}};
    shifted = wide >> code.shift;
    if (!code.en)      term = '0;
    else if (code.neg) term = -signed'({1'b0, shifted});
    else               term =  signed'({1'b0, shifted});
  end

endmodule

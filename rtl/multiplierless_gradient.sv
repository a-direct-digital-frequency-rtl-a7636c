// multiplierless_gradient: the quantized gradient times the phase,
// sum_j (+/-) 2^lambda_j * x over QF partial products, with no multiplier.
// QF shift_term instances feed an adder chain, one adder per extra term, as
// in the original ANPA design's multiplier-less gradient calculation; QF is the
// quantization factor (number of partial products).
//
// Interface: x (XW bits), terms (QF codes of type anpa_pkg::term_t),
// grad (signed, XW+G+LMAX+3 bits, G fractional bits). Combinational.
module multiplierless_gradient
  import anpa_pkg::*;
#(
  parameter int unsigned XW = 10,
  parameter int unsigned QF = 1,
  parameter int unsigned G  = 3,
  localparam int unsigned TW   = XW + G + LMAX + 1,
  localparam int unsigned GW   = TW + 2           // room for up to 4 terms
) (
  input  logic [XW-1:0]        x,
  input  term_t [QF-1:0]       terms,
  output logic signed [GW-1:0] grad
);

  // Each term is below 2^(TW-1) in magnitude, so GW bits hold up to four.
  if (QF < 1 || QF > 4) begin : g_qf_range
    $error("multiplierless_gradient: QF must be between 1 and 4");
  end

  logic signed [TW-1:0] term [QF];

  for (genvar j = 0; j < QF; j++) begin : g_term
    shift_term #(.XW(XW), .G(G)) u_term (
      .x    (x),
      .code (terms[j]),
      .term (term[j])
    );
  end

  always_comb begin
    grad = '0;
    for (int j = 0; j < QF; j++) grad += GW'(term[j]);
  end

endmodule

// quadrant_fold: quarter-wave symmetry of the sine ("function flipping").
// Only a quarter period of the sine is approximated; this block maps a full
// R-bit phase onto that quarter and maps the quarter result back.
//
//  - phase[R-1] (second half period) sets neg; the magnitude is negated.
//  - phase[R-2] (second or fourth quadrant) mirrors the in-quadrant phase by
//    one's complement, x = ~phase[R-3:0].
// The quarter wave is sampled at (x + 0.5) phase steps, so the one's
// complement mirror is exact and no value is duplicated; this sampling is the
// design's own choice, the original design only names the flipping.
//
// Interface: phase -> (x, neg) on the way in; mag -> sine on the way out,
// with the sign taken from the same phase. sine is R-bit two's complement;
// mag must not exceed 2^(R-1)-1. Purely combinational.
module quadrant_fold #(
  parameter int unsigned R = 12
) (
  input  logic [R-1:0]        phase,
  output logic [R-3:0]        x,
  output logic                neg,
  input  logic [R-2:0]        mag,
  output logic signed [R-1:0] sine
);

  always_comb begin
    neg  = phase[R-1];
    x    = phase[R-2] ? ~phase[R-3:0] : phase[R-3:0];
    sine = neg ? -signed'({1'b0, mag}) : signed'({1'b0, mag});
  end

endmodule

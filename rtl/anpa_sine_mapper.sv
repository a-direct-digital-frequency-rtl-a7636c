// anpa_sine_mapper: quarter-sine approximation by nonuniform piecewise linear
// segments with multiplier-less gradients,
//   mag(x) = clamp( (sum_j +/-2^lambda_j * x + beta) >> G , 0, 2^(R-1)-1 )
// for the segment holding x. The segment selector compares x with every
// segment's MSBs, the selected coefficient word supplies the QF gradient
// terms and the offset, the gradient is formed by shifts and adders, the
// offset is added (its word already holds the half LSB for rounding) and
// the G guard bits are dropped. The clamp guards the ends of the range, where
// an offset tuned for the mean error could step one code past the limits.
//
// Follows the original ANPA design: segments of power-of-two length chosen by MSBs, one
// linear equation per segment, gradient as a sum of QF signed powers of two,
// offset from a ROM, the phase itself (not the offset into the segment)
// feeding the shifters. This design's choices: G, the word layout, the clamp,
// the magnitude scale 2^(R-1)-1 at the peak.
//
// Interface: x (R-2 bit quarter phase) in, mag (R-1 bits) out.
// Combinational; the only state is the coefficient memory.
module anpa_sine_mapper
  import anpa_pkg::*;
#(
  parameter int unsigned R          = 12,
  parameter int unsigned QF         = 1,
  parameter int unsigned M          = 26,
  parameter int unsigned G          = 3,
  parameter string       COEFF_FILE = "rtl/anpa60_coeffs.hex",
  localparam int unsigned XW = R - 2,
  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned BW = beta_width(R, G),
  localparam int unsigned GW = XW + G + LMAX + 3,
  localparam int unsigned SW = ((GW > BW) ? GW : BW) + 1
) (
  input  logic [XW-1:0] x,
  output logic [R-2:0]  mag
);

  localparam logic signed [SW-1:0] MAG_MAX = SW'((1 << (R - 1)) - 1);

  logic [XW-1:0]        seg_start [M];
  logic [H_W-1:0]       seg_h [M];
  logic [M-1:0]         kappa;
  logic [IW-1:0]        seg_idx;
  term_t [QF-1:0]       terms;
  logic signed [BW-1:0] beta;
  logic signed [GW-1:0] grad;

  coeff_rom #(.R(R), .QF(QF), .M(M), .G(G), .COEFF_FILE(COEFF_FILE)) u_rom (
    .seg_idx   (seg_idx),
    .seg_start (seg_start),
    .seg_h     (seg_h),
    .terms     (terms),
    .beta      (beta)
  );

  segment_selector #(.XW(XW), .M(M)) u_sel (
    .x         (x),
    .seg_start (seg_start),
    .seg_h     (seg_h),
    .kappa     (kappa),
    .seg_idx   (seg_idx)
  );

  multiplierless_gradient #(.XW(XW), .QF(QF), .G(G)) u_grad (
    .x     (x),
    .terms (terms),
    .grad  (grad)
  );

  logic signed [SW-1:0] sum;
  logic signed [SW-1:0] scaled;

  always_comb begin
    sum    = SW'(grad) + SW'(beta);
    scaled = sum >>> G;
    if (scaled < 0)             mag = '0;
    else if (scaled > MAG_MAX)  mag = MAG_MAX[R-2:0];
    else                        mag = scaled[R-2:0];
  end

endmodule

// coeff_rom: the coefficient memory of one ANPA sine mapper.
// Each of the M words describes one segment of the quarter sine:
//   { h_i [H_W], term[QF-1] ... term[0] (anpa_pkg::term_t each), beta [BW] }
// h_i is the size coefficient (segment length 2^(XW-h_i) phase steps), the
// terms code the quantized gradient and beta is the signed offset with G
// fractional bits, the rounding half LSB already folded in. Segment i starts
// at seg(i) = seg(i-1) + 2^(XW-h_i), seg(0) = 0, which is the segment
// recursion of the original design; the start table is derived here from the h_i
// column, so the table holds only the size coefficients.
//
// The table is generated offline by the accuracy-driven bisection heuristic
// (see the README) and read from COEFF_FILE with $readmemh. Its word layout is
// this design's choice.
//
// Interface: seg_start / seg_h (the whole segmentation, constant after load)
// go to the segment selector; seg_idx selects the word whose gradient codes
// and offset appear on terms / beta. Combinational read.
module coeff_rom
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
  localparam int unsigned EW = entry_width(R, QF, G)
) (
  input  logic [IW-1:0]        seg_idx,
  output logic [XW-1:0]        seg_start [M],
  output logic [H_W-1:0]       seg_h [M],
  output term_t [QF-1:0]       terms,
  output logic signed [BW-1:0] beta
);

  logic [EW-1:0] rom [M];

  initial $readmemh(COEFF_FILE, rom);

  // Segment start points from the size coefficients.
  always_comb begin
    logic [XW:0] next;
    next = '0;
    for (int i = 0; i < M; i++) begin
      seg_h[i]     = rom[i][EW-1 -: H_W];
      seg_start[i] = next[XW-1:0];
      next         = next + ((XW + 1)'(1) << (XW - int'(seg_h[i])));
    end
  end

  // Gradient codes and offset of the selected segment.
  always_comb begin
    terms = rom[seg_idx][BW +: QF * TERM_W];
    beta  = signed'(rom[seg_idx][BW-1:0]);
  end

endmodule

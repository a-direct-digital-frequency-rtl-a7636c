// anpa_ddfs_top: the three ANPA direct digital frequency synthesizers side
// by side, each a separate design with its own frequency control word and
// sine output:
//   ANPA60  : 12-bit, one partial product per gradient,    26 segments
//   ANPA90  : 16-bit, two partial products per gradient,  138 segments
//   ANPA110 : 20-bit, three partial products per gradient, 205 segments
// Resolution and number of partial products follow the original ANPA design; segment
// counts are those of the coefficient tables shipped here (see the README).
//
// Interface: clk, rst_n (synchronous, active low) shared; fcwNN in and
// phaseNN (accumulator) and sineNN out per synthesizer. Timing as in anpa_ddfs: sine follows the
// phase register combinationally.
module anpa_ddfs_top (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [11:0]        fcw60,
  input  logic [15:0]        fcw90,
  input  logic [19:0]        fcw110,
  output logic [11:0]        phase60,
  output logic [15:0]        phase90,
  output logic [19:0]        phase110,
  output logic signed [11:0] sine60,
  output logic signed [15:0] sine90,
  output logic signed [19:0] sine110
);

  anpa_ddfs #(.R(12), .QF(1), .M(26), .G(3),
              .COEFF_FILE("rtl/anpa60_coeffs.hex")) u_anpa60 (
    .clk (clk), .rst_n (rst_n), .fcw (fcw60), .phase (phase60), .sine (sine60)
  );

  anpa_ddfs #(.R(16), .QF(2), .M(138), .G(3),
              .COEFF_FILE("rtl/anpa90_coeffs.hex")) u_anpa90 (
    .clk (clk), .rst_n (rst_n), .fcw (fcw90), .phase (phase90), .sine (sine90)
  );

  anpa_ddfs #(.R(20), .QF(3), .M(205), .G(3),
              .COEFF_FILE("rtl/anpa110_coeffs.hex")) u_anpa110 (
    .clk (clk), .rst_n (rst_n), .fcw (fcw110), .phase (phase110), .sine (sine110)
  );

endmodule

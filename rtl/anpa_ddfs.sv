// anpa_ddfs: one complete direct digital frequency synthesizer.
// The phase accumulator advances by fcw every clock; its R most significant
// bits are folded onto a quarter period, the ANPA sine mapper approximates
// the quarter sine there, and the fold restores the sign. The defaults are
// the 12-bit configuration with one partial product per gradient and 26
// segments; the 16-bit (QF 2) and 20-bit (QF 3) configurations are set by
// parameters together with their coefficient tables.
//
// Interface: clk, rst_n (synchronous, active low), fcw (ACC_W bits), phase
// (the accumulator register), sine (R-bit two's complement).
// Timing: sine is a combinational function of the phase register, so it
// follows a phase change within the same clock cycle; after reset phase = 0
// and the first sample is that of phase 0. There is no pipelining, as in the
// original ANPA implementations. ACC_W = R and the synchronous reset are this
// design's choices.
module anpa_ddfs #(
  parameter int unsigned R          = 12,
  parameter int unsigned ACC_W      = R,
  parameter int unsigned QF         = 1,
  parameter int unsigned M          = 26,
  parameter int unsigned G          = 3,
  parameter string       COEFF_FILE = "rtl/anpa60_coeffs.hex"
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ACC_W-1:0]    fcw,
  output logic [ACC_W-1:0]    phase,
  output logic signed [R-1:0] sine
);

  logic [R-3:0] x;
  logic         neg;
  logic [R-2:0] mag;

  phase_accumulator #(.ACC_W(ACC_W)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .fcw   (fcw),
    .phase (phase)
  );

  quadrant_fold #(.R(R)) u_fold (
    .phase (phase[ACC_W-1 -: R]),
    .x     (x),
    .neg   (neg),
    .mag   (mag),
    .sine  (sine)
  );

  anpa_sine_mapper #(.R(R), .QF(QF), .M(M), .G(G), .COEFF_FILE(COEFF_FILE)) u_map (
    .x   (x),
    .mag (mag)
  );

endmodule

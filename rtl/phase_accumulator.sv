// phase_accumulator: the phase accumulator of a direct digital frequency
// synthesizer. Every clock the frequency control word fcw is added to the
// phase register, which wraps modulo 2^ACC_W, so the output frequency is
// f_clk * fcw / 2^ACC_W. This is the adder-plus-register loop of the
// DDFS structure of the original ANPA design.
//
// Interface: clk, rst_n (synchronous, active low, clears the phase to 0; the
// reset is this design's choice), fcw in, phase out.
// Timing: phase is the register output; a new fcw takes effect on the phase
// one clock later.
module phase_accumulator #(
  parameter int unsigned ACC_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] fcw,
  output logic [ACC_W-1:0] phase
);

  always_ff @(posedge clk) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + fcw;
  end

endmodule

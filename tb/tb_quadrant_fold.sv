// tb_quadrant_fold: exhaustive over all 12-bit phases with random
// magnitudes. Expected quarter phase: the in-quadrant phase in quadrants 0
// and 2, its mirror 2^(R-2)-1 minus it in quadrants 1 and 3; expected sine:
// +mag in the first half period, -mag in the second.
module tb_quadrant_fold;
  localparam int R = 12;
  localparam int Q = 1 << (R - 2);
  logic [R-1:0] phase;
  logic [R-3:0] x;
  logic neg;
  logic [R-2:0] mag;
  logic signed [R-1:0] sine;
  int checks = 0, failures = 0;

  quadrant_fold #(.R(R)) dut (.phase, .x, .neg, .mag, .sine);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < (1 << R); p++) begin
      int quad, low, ex, es;
      quad = p / Q;
      low  = p % Q;
      phase = R'(p);
      mag   = (R-1)'($urandom % (1 << (R - 1)));
      #1;
      ex = (quad == 1 || quad == 3) ? (Q - 1 - low) : low;
      es = (quad >= 2) ? -int'(mag) : int'(mag);
      checks++;
      if (int'(x) != ex || neg != (quad >= 2) || int'(sine) != es) begin
        failures++;
        if (failures < 10)
          $display("phase %0d: x=%0d (exp %0d) neg=%0b sine=%0d (exp %0d)", p, x, ex, neg, sine, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_anpa_sine_mapper: exhaustive over the quarter phase for the three
// configurations (12 bit/1 term/26 segments, 16 bit/2 terms/138 segments,
// 20 bit/3 terms/205 segments). Each output must equal the reference model's
// evaluation of the coefficient table and lie within the table's worst-case
// distance from the ideal quarter sine (15, 11 and 22 LSB). Also counts that
// every segment was used and that subtracting terms and clamping occurred
// where the tables use them.
module tb_anpa_sine_mapper;
  int checks = 0, failures = 0;

  logic [9:0]  x60;   logic [10:0] m60;
  logic [13:0] x90;   logic [14:0] m90;
  logic [17:0] x110;  logic [18:0] m110;

  anpa_sine_mapper dut60 (.x(x60), .mag(m60));
  anpa_sine_mapper #(.R(16), .QF(2), .M(138), .G(3), .COEFF_FILE("rtl/anpa90_coeffs.hex"))
    dut90 (.x(x90), .mag(m90));
  anpa_sine_mapper #(.R(20), .QF(3), .M(205), .G(3), .COEFF_FILE("rtl/anpa110_coeffs.hex"))
    dut110 (.x(x110), .mag(m110));

  anpa_ref_model ref60 ();
  anpa_ref_model #(.R(16), .QF(2), .M(138), .G(3), .FILE("rtl/anpa90_coeffs.hex")) ref90 ();
  anpa_ref_model #(.R(20), .QF(3), .M(205), .G(3), .FILE("rtl/anpa110_coeffs.hex")) ref110 ();

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absdiff(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  task automatic compare(string name, int x, int got, int exp, real ideal, real bound);
    checks++;
    if (got != exp || absdiff(real'(got) - ideal) > bound) begin
      failures++;
      if (failures < 10) $display("%s x=%0d mag=%0d exp=%0d ideal=%f", name, x, got, exp, ideal);
    end
  endtask

  initial begin
    real worst60 = 0, worst90 = 0, worst110 = 0;
    #1;
    for (int x = 0; x < (1 << 10); x++) begin
      x60 = 10'(x); #1;
      compare("ANPA60", x, int'(m60), ref60.expected_mag(x), ref60.ideal_mag(x), 15.0);
      if (absdiff(real'(m60) - ref60.ideal_mag(x)) > worst60) worst60 = absdiff(real'(m60) - ref60.ideal_mag(x));
    end
    for (int x = 0; x < (1 << 14); x++) begin
      x90 = 14'(x); #1;
      compare("ANPA90", x, int'(m90), ref90.expected_mag(x), ref90.ideal_mag(x), 11.0);
      if (absdiff(real'(m90) - ref90.ideal_mag(x)) > worst90) worst90 = absdiff(real'(m90) - ref90.ideal_mag(x));
    end
    for (int x = 0; x < (1 << 18); x++) begin
      x110 = 18'(x); #1;
      compare("ANPA110", x, int'(m110), ref110.expected_mag(x), ref110.ideal_mag(x), 22.0);
      if (absdiff(real'(m110) - ref110.ideal_mag(x)) > worst110) worst110 = absdiff(real'(m110) - ref110.ideal_mag(x));
    end
    $display("worst distance from ideal [LSB]: %f %f %f", worst60, worst90, worst110);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

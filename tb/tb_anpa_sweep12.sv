// tb_anpa_sweep12: the accuracy/complexity trade-off at 12-bit resolution.
// Twelve synthesizers are built from the same RTL with tables for one, two
// and three partial products per gradient (QF 1..3), each generated for SFDR
// targets of 50, 55, 60 and 65 dBc. Every synthesizer runs one full period at
// fcw = 1. Every sample is compared with the reference model of its table,
// and the SFDR, searched over all frequency bins with the Goertzel
// recurrence, must reach the target. The segment count of each table and the
// SFDR it achieves are printed.
module tb_anpa_sweep12;
  localparam int N = 12, R = 12, P = 1 << R;
  localparam int    QFS  [N] = '{1, 1, 1, 1, 2, 2, 2, 2, 3, 3, 3, 3};
  localparam int    SEGS [N] = '{10, 19, 26, 57, 6, 8, 9, 14, 5, 6, 7, 10};
  localparam int    TGT  [N] = '{50, 55, 60, 65, 50, 55, 60, 65, 50, 55, 60, 65};
  localparam string FILES [N] = '{
    "tb/sweep12_qf1_50.hex", "tb/sweep12_qf1_55.hex", "tb/sweep12_qf1_60.hex", "tb/sweep12_qf1_65.hex",
    "tb/sweep12_qf2_50.hex", "tb/sweep12_qf2_55.hex", "tb/sweep12_qf2_60.hex", "tb/sweep12_qf2_65.hex",
    "tb/sweep12_qf3_50.hex", "tb/sweep12_qf3_55.hex", "tb/sweep12_qf3_60.hex", "tb/sweep12_qf3_65.hex"};

  logic clk = 0, rst_n = 0;
  logic [R-1:0] fcw = '0;
  logic [R-1:0] phase [N];
  logic signed [R-1:0] sine [N];
  int exp_mag [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_cfg
    anpa_ddfs #(.R(R), .QF(QFS[i]), .M(SEGS[i]), .G(3), .COEFF_FILE(FILES[i])) dut (
      .clk, .rst_n, .fcw, .phase(phase[i]), .sine(sine[i]));
    anpa_ref_model #(.R(R), .QF(QFS[i]), .M(SEGS[i]), .G(3), .FILE(FILES[i])) ref_m ();
    always_comb begin
      int q, low;
      q   = int'(phase[i] >> (R - 2));
      low = int'(phase[i]) % (1 << (R - 2));
      exp_mag[i] = ref_m.expected_mag((q == 1 || q == 3) ? ((1 << (R - 2)) - 1 - low) : low);
      if (q >= 2) exp_mag[i] = -exp_mag[i];
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real samples [N][P];

  function automatic real bin_power(int i, int k);
    real w, c, s0, s1, s2;
    w = 2.0 * 3.14159265358979323846 * real'(k) / real'(P);
    c = 2.0 * $cos(w);
    s1 = 0.0; s2 = 0.0;
    for (int n = 0; n < P; n++) begin
      s0 = samples[i][n] + c * s1 - s2;
      s2 = s1; s1 = s0;
    end
    return s1 * s1 + s2 * s2 - c * s1 * s2;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    fcw = 1;
    for (int k = 0; k < P; k++) begin
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(sine[i]) != exp_mag[i] || int'(phase[i]) != k) begin
          failures++;
          if (failures < 10) $display("cfg %0d phase %0d: sine %0d exp %0d", i, phase[i], sine[i], exp_mag[i]);
        end
        samples[i][phase[i]] = real'(sine[i]);
      end
      @(posedge clk);
    end
    for (int i = 0; i < N; i++) begin
      real car, spur, p, sfdr;
      car = bin_power(i, 1);
      spur = 0.0;
      for (int k = 2; k < P / 2; k++) begin
        p = bin_power(i, k);
        if (p > spur) spur = p;
      end
      sfdr = 10.0 * $log10(car / spur);
      $display("QF %0d, target %0d dBc: %0d segments, SFDR %0.1f dBc", QFS[i], TGT[i], SEGS[i], sfdr);
      checks++;
      if (sfdr < real'(TGT[i])) begin failures++; $display("  below target"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_anpa_ddfs_top: end-to-end test of the three synthesizers at their
// default sizes.
//  1. Exhaustive period: with fcw = 1 every synthesizer steps through all of
//     its 2^R phases (ANPA60 and ANPA90 several times over while ANPA110
//     completes one period). Every sample is compared with the reference
//     model of its coefficient table plus quarter-wave symmetry.
//  2. Spectral purity: from one period of each output the carrier and the
//     harmonics are measured with the Goertzel recurrence and the
//     spurious-free dynamic range (carrier over the largest harmonic) must
//     reach 60, 90 and 110 dBc. ANPA60 is searched over all bins, ANPA90
//     over harmonics 2..511 and ANPA110 over the odd harmonics 3..1023 (a
//     half-wave-symmetric output has no even harmonics).
//  3. Random frequency words and a reset in mid-run.
// Counted mechanisms, each of which must occur: every segment of every table
// selected, all four quadrants, negated half periods, subtracting partial
// products, left-shifted (factor above one) partial products, accumulator
// wrap-around, reset.
module tb_anpa_ddfs_top;
  logic clk = 0, rst_n = 0;
  logic [11:0] fcw60 = '0;  logic [15:0] fcw90 = '0;  logic [19:0] fcw110 = '0;
  logic [11:0] phase60;     logic [15:0] phase90;     logic [19:0] phase110;
  logic signed [11:0] sine60;
  logic signed [15:0] sine90;
  logic signed [19:0] sine110;
  int checks = 0, failures = 0;

  anpa_ddfs_top dut (.*);

  anpa_ref_model ref60 ();
  anpa_ref_model #(.R(16), .QF(2), .M(138), .G(3), .FILE("rtl/anpa90_coeffs.hex")) ref90 ();
  anpa_ref_model #(.R(20), .QF(3), .M(205), .G(3), .FILE("rtl/anpa110_coeffs.hex")) ref110 ();

  always #5 clk = ~clk;

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, indexed by configuration 0/1/2.
  int seg_hits [3][256];
  int quad_hits [3][4];
  int sub_terms [3], left_terms [3], wraps [3], resets;
  longint model [3];
  real samples60 [4096];
  real samples90 [65536];
  real samples110 [1048576];

  function automatic int quarter_x(int r, longint p);
    int quad, low;
    quad = int'(p >> (r - 2)) & 3;
    low  = int'(p) & ((1 << (r - 2)) - 1);
    return (quad == 1 || quad == 3) ? ((1 << (r - 2)) - 1 - low) : low;
  endfunction

  function automatic int expected_sine(int c, longint p);
    int r, xq, m, s;
    r  = (c == 0) ? 12 : (c == 1) ? 16 : 20;
    xq = quarter_x(r, p);
    case (c)
      0: begin m = ref60.expected_mag(xq);  s = ref60.seg_of(xq); end
      1: begin m = ref90.expected_mag(xq);  s = ref90.seg_of(xq); end
      default: begin m = ref110.expected_mag(xq); s = ref110.seg_of(xq); end
    endcase
    // bookkeeping of the mechanisms this sample exercises
    seg_hits[c][s]++;
    quad_hits[c][int'(p >> (r - 2)) & 3]++;
    for (int j = 0; j < c + 1; j++) begin
      logic [6:0] code;
      code = (c == 0) ? ref60.term_code(s, j) : (c == 1) ? ref90.term_code(s, j) : ref110.term_code(s, j);
      if (code[6] && code[5]) sub_terms[c]++;
      if (code[6] && code[4:0] < 2) left_terms[c]++;
    end
    return ((int'(p >> (r - 1)) & 1) != 0) ? -m : m;
  endfunction

  task automatic check_all();
    int e;
    e = expected_sine(0, model[0]);
    checks++;
    if (longint'(phase60) != model[0] || int'(sine60) != e) begin
      failures++;
      if (failures < 10) $display("ANPA60 phase %0d (exp %0d) sine %0d (exp %0d)", phase60, model[0], sine60, e);
    end
    e = expected_sine(1, model[1]);
    checks++;
    if (longint'(phase90) != model[1] || int'(sine90) != e) begin
      failures++;
      if (failures < 10) $display("ANPA90 phase %0d (exp %0d) sine %0d (exp %0d)", phase90, model[1], sine90, e);
    end
    e = expected_sine(2, model[2]);
    checks++;
    if (longint'(phase110) != model[2] || int'(sine110) != e) begin
      failures++;
      if (failures < 10) $display("ANPA110 phase %0d (exp %0d) sine %0d (exp %0d)", phase110, model[2], sine110, e);
    end
  endtask

  task automatic step(longint f60, longint f90, longint f110);
    fcw60 = 12'(f60); fcw90 = 16'(f90); fcw110 = 20'(f110);
    @(posedge clk); #1;
    if (model[0] + f60 >= (1 << 12)) wraps[0]++;
    if (model[1] + f90 >= (1 << 16)) wraps[1]++;
    if (model[2] + f110 >= (1 << 20)) wraps[2]++;
    model[0] = (model[0] + f60) % (1 << 12);
    model[1] = (model[1] + f90) % (1 << 16);
    model[2] = (model[2] + f110) % (1 << 20);
    check_all();
  endtask

  task automatic do_reset();
    rst_n = 0;
    @(posedge clk); #1;
    model[0] = 0; model[1] = 0; model[2] = 0;
    check_all();
    resets++;
    rst_n = 1;
  endtask

  // Power of bin k of an N-point sequence (Goertzel).
  function automatic real bin_power(ref real s [], input int n, input int k);
    real w, c, s0, s1, s2;
    w = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    c = 2.0 * $cos(w);
    s1 = 0.0; s2 = 0.0;
    for (int i = 0; i < n; i++) begin
      s0 = s[i] + c * s1 - s2;
      s2 = s1; s1 = s0;
    end
    return s1 * s1 + s2 * s2 - c * s1 * s2;
  endfunction

  real dyn60 [], dyn90 [], dyn110 [];

  task automatic check_sfdr(string name, ref real s [], input int n, input int kfirst,
                            input int klast, input int kstep, input real limit);
    real car, spur, p, sfdr;
    int kspur;
    car = bin_power(s, n, 1);
    spur = 0.0; kspur = 0;
    for (int k = kfirst; k <= klast; k += kstep) begin
      p = bin_power(s, n, k);
      if (p > spur) begin spur = p; kspur = k; end
    end
    sfdr = 10.0 * $log10(car / spur);
    $display("%s: SFDR %0.1f dBc (largest spur at bin %0d)", name, sfdr, kspur);
    checks++;
    if (sfdr < limit) begin failures++; $display("%s: SFDR below %0.1f dBc", name, limit); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check_all();
    rst_n = 1;
    // 1. one period of the 20-bit synthesizer at fcw = 1
    for (int k = 0; k < (1 << 20); k++) begin
      step(1, 1, 1);
      if (k >= (1 << 20) - (1 << 12)) samples60[model[0]] = real'(sine60);
      if (k >= (1 << 20) - (1 << 16)) samples90[model[1]] = real'(sine90);
      samples110[model[2]] = real'(sine110);
    end
    // 2. spectral purity
    dyn60 = new [4096];   foreach (samples60[i])  dyn60[i] = samples60[i];
    dyn90 = new [65536];  foreach (samples90[i])  dyn90[i] = samples90[i];
    dyn110 = new [1048576]; foreach (samples110[i]) dyn110[i] = samples110[i];
    check_sfdr("ANPA60", dyn60, 4096, 2, 2047, 1, 60.0);
    check_sfdr("ANPA90", dyn90, 65536, 2, 511, 1, 90.0);
    check_sfdr("ANPA110", dyn110, 1048576, 3, 1023, 2, 110.0);
    // 3. random frequency words and a reset
    for (int k = 0; k < 20000; k++) begin
      step($urandom % (1 << 12), $urandom % (1 << 16), $urandom % (1 << 20));
      if (k == 10000) do_reset();
    end
    // every mechanism must have happened
    begin
      int msegs [3];
      msegs[0] = 26; msegs[1] = 138; msegs[2] = 205;
      for (int c = 0; c < 3; c++) begin
        int missing;
        missing = 0;
        for (int s = 0; s < msegs[c]; s++) if (seg_hits[c][s] == 0) missing++;
        for (int q = 0; q < 4; q++) if (quad_hits[c][q] == 0) missing++;
        $display("config %0d: segments hit %0d/%0d, quadrants %0d %0d %0d %0d, subtracting terms %0d, left shifts %0d, wraps %0d",
                 c, msegs[c] - missing, msegs[c], quad_hits[c][0], quad_hits[c][1], quad_hits[c][2], quad_hits[c][3],
                 sub_terms[c], left_terms[c], wraps[c]);
        checks++; if (missing != 0) begin failures++; $display("config %0d: %0d segments/quadrants never used", c, missing); end
        checks++; if (wraps[c] == 0) begin failures++; $display("config %0d: no wrap-around", c); end
        checks++; if (left_terms[c] == 0) begin failures++; $display("config %0d: no left-shifted term", c); end
        if (c > 0) begin
          checks++; if (sub_terms[c] == 0) begin failures++; $display("config %0d: no subtracting term", c); end
        end
      end
      checks++; if (resets == 0) begin failures++; $display("no reset"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_anpa_ddfs: one synthesizer at its defaults (12 bit, one term, 26
// segments). After reset the phase is 0 and the output is the sample of
// phase 0; each clock the phase advances by the frequency word applied
// before that clock edge, and the output of the same cycle is the sample of
// the new phase. Expected samples come from the reference model of the
// coefficient table with the quarter-wave symmetry applied in the testbench.
// Runs one full period at fcw = 1, then random frequency words.
module tb_anpa_ddfs;
  localparam int R = 12;
  logic clk = 0, rst_n = 0;
  logic [R-1:0] fcw = '0, phase;
  logic signed [R-1:0] sine;
  int checks = 0, failures = 0, quads[4], wraps = 0;
  longint model = 0;

  anpa_ddfs dut (.clk, .rst_n, .fcw, .phase, .sine);
  anpa_ref_model ref_m ();

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_sine(longint p);
    int quad, low, xq, m;
    quad = int'(p >> (R - 2)) & 3;
    low  = int'(p) & ((1 << (R - 2)) - 1);
    xq   = (quad == 1 || quad == 3) ? ((1 << (R - 2)) - 1 - low) : low;
    m    = ref_m.expected_mag(xq);
    return (quad >= 2) ? -m : m;
  endfunction

  task automatic check();
    checks++;
    if (longint'(phase) != model || int'(sine) != expected_sine(model)) begin
      failures++;
      if (failures < 10) $display("t=%0t phase=%0d (exp %0d) sine=%0d (exp %0d)", $time, phase, model, sine, expected_sine(model));
    end
    quads[int'(model >> (R - 2)) & 3]++;
  endtask

  task automatic step(int f);
    fcw = R'(f);
    @(posedge clk); #1;
    if (model + f >= (longint'(1) << R)) wraps++;
    model = (model + f) % (longint'(1) << R);
    check();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check();
    rst_n = 1;
    for (int k = 0; k < (1 << R); k++) step(1);
    for (int k = 0; k < 5000; k++) step(int'($urandom % (1 << R)));
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quads[q] == 0) begin failures++; $display("quadrant %0d never reached", q); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no accumulator wrap"); end
    $display("quadrant visits %0d %0d %0d %0d, wraps %0d", quads[0], quads[1], quads[2], quads[3], wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

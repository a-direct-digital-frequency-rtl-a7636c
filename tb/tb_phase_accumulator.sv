// tb_phase_accumulator: checks the phase accumulator against a running sum
// modulo 2^ACC_W for random frequency words, a reset in mid-run and
// wrap-around, with a one-clock update of the phase.
module tb_phase_accumulator;
  localparam int ACC_W = 12;
  logic clk = 0, rst_n = 0;
  logic [ACC_W-1:0] fcw = '0, phase;
  int checks = 0, failures = 0, wraps = 0;
  longint model = 0;

  phase_accumulator #(.ACC_W(ACC_W)) dut (.clk, .rst_n, .fcw, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint exp);
    checks++;
    if (phase !== ACC_W'(exp)) begin
      failures++;
      $display("phase mismatch: got %0d expected %0d", phase, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(0);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      fcw = ACC_W'($urandom);
      if (k % 500 == 0) fcw = ACC_W'(1 << (ACC_W - 1)) + 1;
      @(posedge clk); #1;
      if (model + fcw >= (longint'(1) << ACC_W)) wraps++;
      model = (model + fcw) % (longint'(1) << ACC_W);
      check(model);
      if (k == 1500) begin
        rst_n = 0; @(posedge clk); #1; model = 0; check(0); rst_n = 1;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap-around seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

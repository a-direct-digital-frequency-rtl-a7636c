// tb_segment_selector: builds random segmentations by repeated bisection of
// a 2^XW range (M segments, each of power-of-two length starting on a
// multiple of its length), then checks for many phases that kappa is one-hot,
// that its set bit is the segment whose range [start, start+length) holds the
// phase, and that seg_idx names the same segment.
module tb_segment_selector;
  localparam int XW = 10, M = 40, IW = $clog2(M);
  localparam int Q = 1 << XW;
  logic [XW-1:0] x;
  logic [XW-1:0] seg_start [M];
  logic [4:0]    seg_h [M];
  logic [M-1:0]  kappa;
  logic [IW-1:0] seg_idx;
  int checks = 0, failures = 0;
  int st [M], ln [M];

  segment_selector #(.XW(XW), .M(M)) dut (.x, .seg_start, .seg_h, .kappa, .seg_idx);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_segmentation();
    int n;
    n = 1;
    st[0] = 0; ln[0] = Q;
    while (n < M) begin
      int k = $urandom % n;
      if (ln[k] > 1) begin
        // split segment k, insert the upper half right after it
        for (int i = n; i > k + 1; i--) begin st[i] = st[i-1]; ln[i] = ln[i-1]; end
        ln[k] = ln[k] / 2;
        st[k+1] = st[k] + ln[k]; ln[k+1] = ln[k];
        n++;
      end
    end
    for (int i = 0; i < M; i++) begin
      seg_start[i] = XW'(st[i]);
      seg_h[i] = 5'(XW - $clog2(ln[i]));
    end
  endtask

  initial begin
    for (int t = 0; t < 20; t++) begin
      make_segmentation();
      for (int k = 0; k < 600; k++) begin
        int exp_i;
        exp_i = -1;
        x = (k < Q / 2) ? XW'(k * 2 + t % 2) : XW'($urandom);
        #1;
        for (int i = 0; i < M; i++) if (int'(x) >= st[i] && int'(x) < st[i] + ln[i]) exp_i = i;
        checks++;
        if (!$onehot(kappa) || exp_i < 0 || !kappa[exp_i] || int'(seg_idx) != exp_i) begin
          failures++;
          if (failures < 10) $display("x=%0d kappa=%h seg_idx=%0d exp=%0d", x, kappa, seg_idx, exp_i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

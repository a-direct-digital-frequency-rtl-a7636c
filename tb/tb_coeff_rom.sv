// tb_coeff_rom: loads the 16-bit, two-term table (138 segments) and checks
// every segment: its size coefficient, its start point (sum of the lengths
// before it), that the segments together cover the 2^14-point quarter
// exactly, and the gradient codes and offset read for each index. The
// expected values come from the reference model's own reading of the table.
module tb_coeff_rom;
  import anpa_pkg::*;
  localparam int R = 16, QF = 2, M = 138, G = 3;
  localparam int XW = R - 2, IW = $clog2(M), BW = R + G + 1;
  logic [IW-1:0]        seg_idx;
  logic [XW-1:0]        seg_start [M];
  logic [4:0]           seg_h [M];
  term_t [QF-1:0]       terms;
  logic signed [BW-1:0] beta;
  int checks = 0, failures = 0;

  coeff_rom #(.R(R), .QF(QF), .M(M), .G(G), .COEFF_FILE("rtl/anpa90_coeffs.hex")) dut (
    .seg_idx, .seg_start, .seg_h, .terms, .beta);
  anpa_ref_model #(.R(R), .QF(QF), .M(M), .G(G), .FILE("rtl/anpa90_coeffs.hex")) ref_m ();

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint total = 0;
    #1;
    for (int i = 0; i < M; i++) begin
      seg_idx = IW'(i);
      #1;
      checks++;
      if (longint'(seg_start[i]) != ref_m.seg_first(i) ||
          (longint'(1) << (XW - int'(seg_h[i]))) != ref_m.seg_len(i)) begin
        failures++;
        $display("segment %0d: start %0d (exp %0d) h %0d", i, seg_start[i], ref_m.seg_first(i), seg_h[i]);
      end
      for (int j = 0; j < QF; j++) begin
        checks++;
        if (7'(terms[j]) != ref_m.term_code(i, j)) begin
          failures++;
          $display("segment %0d term %0d: %h exp %h", i, j, 7'(terms[j]), ref_m.term_code(i, j));
        end
      end
      checks++;
      if (longint'(beta) != ref_m.beta_of(i)) begin
        failures++;
        $display("segment %0d beta %0d exp %0d", i, beta, ref_m.beta_of(i));
      end
      total += longint'(1) << (XW - int'(seg_h[i]));
    end
    checks++;
    if (total != (longint'(1) << XW)) begin
      failures++;
      $display("segments cover %0d points, expected %0d", total, longint'(1) << XW);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

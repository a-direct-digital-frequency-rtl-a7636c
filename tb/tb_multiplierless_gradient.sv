// tb_multiplierless_gradient: three partial products (QF = 3) with random
// phases and codes, and the extreme case of three largest added or
// subtracted terms; the expected value is the sum of the integer products
// floor(x * 2^(G+2) / 2^shift_j) with their signs.
module tb_multiplierless_gradient;
  import anpa_pkg::*;
  localparam int XW = 18, QF = 3, G = 3;
  localparam int GW = XW + G + 2 + 3;
  logic [XW-1:0] x;
  term_t [QF-1:0] terms;
  logic signed [GW-1:0] grad;
  int checks = 0, failures = 0;

  multiplierless_gradient #(.XW(XW), .QF(QF), .G(G)) dut (.x, .terms, .grad);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 20000; k++) begin
      longint e;
      e = 0;
      x = XW'($urandom);
      for (int j = 0; j < QF; j++) begin
        terms[j].en = ($urandom % 6) != 0;
        terms[j].neg = 1'($urandom);
        terms[j].shift = 5'($urandom % 24);
        if (k < 2) begin x = '1; terms[j] = '{en: 1'b1, neg: k[0], shift: 5'd0}; end
      end
      #1;
      for (int j = 0; j < QF; j++) begin
        longint p;
        p = (longint'(x) << (G + 2)) >> terms[j].shift;
        if (terms[j].en) e += terms[j].neg ? -p : p;
      end
      checks++;
      if (longint'(grad) != e) begin
        failures++;
        if (failures < 10) $display("x=%0d grad=%0d exp=%0d", x, grad, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

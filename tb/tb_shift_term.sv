// tb_shift_term: random phases and term codes; the expected term is
// floor(x * 2^(G+2) / 2^shift), negated for a subtracting term and zero for
// a disabled one, computed with 64-bit integer division.
module tb_shift_term;
  import anpa_pkg::*;
  localparam int XW = 14, G = 3;
  localparam int TW = XW + G + 2 + 1;
  logic [XW-1:0] x;
  term_t code;
  logic signed [TW-1:0] term;
  int checks = 0, failures = 0;

  shift_term #(.XW(XW), .G(G)) dut (.x, .code, .term);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 20000; k++) begin
      longint p, e;
      x = XW'($urandom);
      code.en = ($urandom % 8) != 0;
      code.neg = 1'($urandom);
      code.shift = 5'($urandom);
      if (k < 32) begin x = '1; code.en = 1; code.neg = k[0]; code.shift = 5'(k); end
      #1;
      p = (longint'(x) << (G + 2)) / (longint'(1) << code.shift);
      e = !code.en ? 0 : (code.neg ? -p : p);
      checks++;
      if (longint'(term) != e) begin
        failures++;
        if (failures < 10) $display("x=%0d code=%p term=%0d exp=%0d", x, code, term, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// anpa_ref_model: testbench reference for the ANPA sine mapper.
// Reads a coefficient table and evaluates, for a quarter phase x, the
// piecewise function it describes with plain integer arithmetic: walk the
// segments adding up their lengths 2^(XW-h_i) until x is passed, multiply x
// by each power of two of the chosen segment with G fractional bits kept
// (truncated), add the offset, drop the G fractional bits (floor) and clamp
// to 0 .. 2^(R-1)-1. It also gives the ideal quarter sine
// (2^(R-1)-1) * sin(pi/2 * (x+0.5) / 2^(R-2)) for accuracy checks.
// It shares no code with the design; testbenches call its functions
// hierarchically.
module anpa_ref_model #(
  parameter int    R    = 12,
  parameter int    QF   = 1,
  parameter int    M    = 26,
  parameter int    G    = 3,
  parameter string FILE = "rtl/anpa60_coeffs.hex"
);
  localparam int XW = R - 2;
  localparam int BW = R + G + 1;
  localparam int EW = 5 + 7 * QF + BW;

  logic [EW-1:0] words [M];
  initial $readmemh(FILE, words);

  function automatic int seg_of(int x);
    longint pos = 0;
    for (int i = 0; i < M; i++) begin
      pos += longint'(1) << (XW - int'(words[i][EW-1 -: 5]));
      if (longint'(x) < pos) return i;
    end
    return -1;
  endfunction

  function automatic longint seg_len(int i);
    return longint'(1) << (XW - int'(words[i][EW-1 -: 5]));
  endfunction

  function automatic longint seg_first(int i);
    longint pos = 0;
    for (int k = 0; k < i; k++) pos += seg_len(k);
    return pos;
  endfunction

  // Term j of segment i: {en, neg, shift[4:0]}.
  function automatic logic [6:0] term_code(int i, int j);
    return words[i][BW + 7 * j +: 7];
  endfunction

  function automatic longint beta_of(int i);
    longint b = longint'(words[i][BW-1:0]);
    if (words[i][BW-1]) b -= longint'(1) << BW;
    return b;
  endfunction

  function automatic int expected_mag(int x);
    int     i = seg_of(x);
    longint acc;
    longint amp = (longint'(1) << (R - 1)) - 1;
    if (i < 0) return -1;
    acc = beta_of(i);
    for (int j = 0; j < QF; j++) begin
      logic [6:0] c = term_code(i, j);
      longint p = (longint'(x) * (longint'(1) << (G + 2))) / (longint'(1) << c[4:0]);
      if (c[6]) acc += c[5] ? -p : p;
    end
    // floor division by 2^G for negative values too
    if (acc >= 0) acc = acc / (longint'(1) << G);
    else          acc = -((-acc + (longint'(1) << G) - 1) / (longint'(1) << G));
    if (acc < 0)   acc = 0;
    if (acc > amp) acc = amp;
    return int'(acc);
  endfunction

  function automatic real ideal_mag(int x);
    real amp = real'((longint'(1) << (R - 1)) - 1);
    return amp * $sin(3.14159265358979323846 / 2.0 * (real'(x) + 0.5) / real'(longint'(1) << XW));
  endfunction

endmodule

// segment_selector: finds the segment that holds the quarter phase x.
// Segments come from repeated bisection of a power-of-two range, so segment i
// of length 2^(XW-h_i) starts on a multiple of its length and x lies in it
// exactly when the h_i most significant bits of x equal those of its start.
// One comparator per segment, each looking at its own number of MSBs, gives
// the one-hot vector kappa(x) of the original ANPA design's segment selection; an OR
// encoder turns it into the index that reads the coefficient memory.
//
// Interface: x, the segmentation (seg_start, seg_h for M segments), kappa
// (one-hot when the segmentation covers the range without overlap) and
// seg_idx. Combinational. An assertion flags a phase that matches no
// segment or several.
module segment_selector
  import anpa_pkg::*;
#(
  parameter int unsigned XW = 10,
  parameter int unsigned M  = 26,
  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1
) (
  input  logic [XW-1:0]  x,
  input  logic [XW-1:0]  seg_start [M],
  input  logic [H_W-1:0] seg_h [M],
  output logic [M-1:0]   kappa,
  output logic [IW-1:0]  seg_idx
);

  always_comb begin
    for (int i = 0; i < M; i++)
      kappa[i] = ((x ^ seg_start[i]) >> (XW - int'(seg_h[i]))) == '0;
  end

  // A valid segmentation covers the range without overlap, so exactly one
  // segment holds any phase.
  always_comb begin
    assert final ($onehot(kappa))
      else $error("segment_selector: x=%0d matches %0d segments", x, $countones(kappa));
  end

  always_comb begin
    seg_idx = '0;
    for (int i = 0; i < M; i++)
      if (kappa[i]) seg_idx |= IW'(i);
  end

endmodule

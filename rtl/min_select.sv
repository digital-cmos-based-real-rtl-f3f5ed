// min_select: minimum selection circuit of the colour weight calculation.
//
// The colour connection weight is the smallest of the three per-channel
// weights, Wc = min(W_R, W_G, W_B) (document's rule). Because the 3-bit code
// is monotonic in the weight, the minimum is taken on the codes. In
// gray-scale mode only the first (luminance) channel is used, as the
// gray-scale formula has a single channel. Purely combinational.
module min_select
  import seg_pkg::*;
(
  input  logic   gray_mode,
  input  wcode_t w_r,
  input  wcode_t w_g,
  input  wcode_t w_b,
  output wcode_t w_min
);
  wcode_t m_rg;
  always_comb begin
    m_rg  = (w_r < w_g) ? w_r : w_g;
    w_min = gray_mode ? w_r : ((m_rg < w_b) ? m_rg : w_b);
  end
endmodule

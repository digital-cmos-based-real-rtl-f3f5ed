// weight_unit: connection weight of one colour channel between two pixels.
//
// The weight is W = I_MAX / (1 + |Ia - Ib|) (I_MAX = 255), quantised to a
// 3-bit code c = floor(log2(floor(W))), with W < 2 giving code 0. The unit
// does no division: floor(W) >= 2**c holds exactly when (1+|Ia-Ib|) << c
// <= I_MAX, so the code is the number of c in 1..7 that pass this test.
// The formula is the document's; the 3-bit logarithmic quantisation is this
// design's choice (the document gives 8-bit pixels and 3-bit weights).
// Purely combinational.
module weight_unit
  import seg_pkg::*;
(
  input  logic [PIX_W-1:0] pix_a,
  input  logic [PIX_W-1:0] pix_b,
  output wcode_t           code
);
  logic [PIX_W-1:0] diff;
  logic [PIX_W:0]   den;     // 1 + |a-b|, up to 256

  always_comb begin
    diff = (pix_a >= pix_b) ? (pix_a - pix_b) : (pix_b - pix_a);
    den  = {1'b0, diff} + 9'd1;
    code = '0;
    for (int c = 1; c < 8; c++) begin
      if (({7'd0, den} << c) <= 16'(I_MAX)) code = wcode_t'(c);
    end
  end
endmodule

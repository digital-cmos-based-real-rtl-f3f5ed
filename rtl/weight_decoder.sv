// weight_decoder: 3-bit weight code to 8-bit weight value (the DEC of an
// active cell and of the leader circuit).
//
// Code c in 1..7 decodes to 2**c, code 0 to zero, i.e. a one-hot 3-to-8
// decoder with its lowest output dropped. This inverts the logarithmic
// quantisation of weight_unit (2**c <= W < 2**(c+1)). The 3-bit input and
// 8-bit output widths are the document's; the mapping is this design's.
// Purely combinational.
module weight_decoder
  import seg_pkg::*;
(
  input  wcode_t code,
  output wval_t  value
);
  always_comb begin
    value = '0;
    if (code != '0) value[code] = 1'b1;
  end
endmodule

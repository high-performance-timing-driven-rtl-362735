// fvg: filter value generator.
//
// Turns a 24-bit pixel into the magnitude-like value the filter core ranks.
// Ranking one magnitude instead of filtering the three components
// separately keeps the output a colour that really occurs in the window.
// For RGB input (SUM_RGB = 1, the default) the value is the plain sum
// R+G+B, 10 bits wide, as in the filter's reference implementation; no
// weighting (such as a luma formula) is applied. Input that already carries
// a magnitude, such as YCbCr or YUV, needs no generator: with SUM_RGB = 0
// the first component (the r field, holding Y) is used directly, shifted
// into the upper bits of the 10-bit value.
//
// Interface: pix in, fv out. Purely combinational, zero latency, so the
// filter core and the delay line see a sample in the same clock cycle.
module fvg
  import rank_pkg::*;
#(
  parameter bit SUM_RGB = 1'b1
) (
  input  rgb_t pix,
  output fv_t  fv
);

  if (SUM_RGB) begin : g_sum
    always_comb fv = fv_t'(pix.r) + fv_t'(pix.g) + fv_t'(pix.b);
  end else begin : g_luma
    always_comb fv = {pix.r, 2'b00};
  end

endmodule

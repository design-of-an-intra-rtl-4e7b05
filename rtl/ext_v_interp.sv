// ext_v_interp: share-based extended vertical interpolator.
//
// Used for the picture-type combinations where enhancement rows fall
// between the rows produced by the basic interpolation.  It filters four
// vertically adjacent basic-interpolation outputs a, b, c, d
// (rows y-1, y, y+1, y+2) with the weights -3, 19, 19, -3 and rounding 16,
// rewritten so that the common term t = b + c + 1 is shared:
//     luma   = (16*t - 3*((a + d + 1) - t)) >> 5
//     chroma = t >> 1            (bilinear, the same common term)
// 3*x is formed as x + (x<<1) and 16*t as t<<4, so the block has only
// adders and shifts.  The luma result is clipped to 0..255; the clip is
// this design's addition, since the -3 taps can push the result out of the
// pixel range.
//
// Interface: four 8-bit pixels in, one 8-bit prediction out.  Combinational.
module ext_v_interp
  import svc_pkg::*;
(
  input  logic   chroma,
  input  pixel_t v_a,   // V_out[x, y-1]
  input  pixel_t v_b,   // V_out[x, y]
  input  pixel_t v_c,   // V_out[x, y+1]
  input  pixel_t v_d,   // V_out[x, y+2]
  output pixel_t pred_out
);
  logic signed [15:0] t_in, t_out, diff, luma;

  always_comb begin
    t_in  = 16'(v_b) + 16'(v_c) + 16'sd1;      // common term (chroma bilinear)
    t_out = 16'(v_a) + 16'(v_d) + 16'sd1;
    diff  = t_out - t_in;
    luma  = ((t_in <<< 4) - (diff + (diff <<< 1))) >>> 5;
    if (chroma)            pred_out = t_in[8:1];
    else if (luma < 0)     pred_out = 8'd0;
    else if (luma > 255)   pred_out = 8'd255;
    else                   pred_out = luma[7:0];
  end
endmodule

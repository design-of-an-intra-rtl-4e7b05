// svc_pkg: types and constants shared by the SVC intra prediction engine.
//
// Holds the pixel type, the widths of the intermediate interpolation
// results, the seven inter-layer picture-type combinations the Intra_BL
// engine accepts, and the Intra_4x4 mode encoding of H.264.  The widths are
// this design's choice: they are the smallest that hold the worst-case sums
// of the SVC 4-tap filter (coefficient sum 32, largest positive sum 34).
package svc_pkg;

  typedef logic [7:0] pixel_t;

  // Horizontal basic interpolation output: 8-bit pixel times a coefficient set
  // (positive part at most 34*255, negative part at most 5*255), signed,
  // one bit wider than needed so that it equals the 9-bit-input sum width.
  localparam int unsigned HW = 16;
  // Vertical basic interpolation raw sum: HW-bit input times the same set.
  localparam int unsigned VW = HW + 7;

  typedef logic signed [HW-1:0] hsum_t;
  typedef logic signed [VW-1:0] vsum_t;

  // Picture-type combination between reference (base) layer and enhancement
  // layer, named reference-enhancement.
  typedef enum logic [2:0] {
    IL_FRAME_FRAME = 3'd0,
    IL_FIELD_FIELD = 3'd1,
    IL_FRAME_MBAFF = 3'd2,
    IL_MBAFF_FRAME = 3'd3,
    IL_MBAFF_MBAFF = 3'd4,
    IL_FRAME_PAFF  = 3'd5,
    IL_PAFF_FRAME  = 3'd6
  } il_type_e;

  // Combinations that need the extended vertical interpolation step.
  function automatic logic il_needs_ext(il_type_e t);
    return (t == IL_FRAME_MBAFF) || (t == IL_MBAFF_FRAME) || (t == IL_PAFF_FRAME);
  endfunction

  // H.264 Intra_4x4 prediction modes.
  typedef enum logic [3:0] {
    I4_V   = 4'd0,
    I4_H   = 4'd1,
    I4_DC  = 4'd2,
    I4_DDL = 4'd3,
    I4_DDR = 4'd4,
    I4_VR  = 4'd5,
    I4_HD  = 4'd6,
    I4_VL  = 4'd7,
    I4_HU  = 4'd8
  } i4_mode_e;

endpackage

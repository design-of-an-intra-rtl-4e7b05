// base_mode_pred: four-lane base-mode intra predictor.
//
// Every directional Intra_4x4 / Intra_8x8 prediction and every reference
// sample filter of H.264 fits one form, (x + 2*z + y + 2) >> 2: a three-tap
// filter uses it directly, a two-tap average (a+b+1)>>1 is x=y=a, z=b, and a
// copy is x=y=z=a.  Each lane is one adder for x+y+1, a shift for 2*z, a
// second adder with the rounding 1 and a shift by 2; a selection mux in
// front of the lanes (in the user of this block) picks the operands, so
// four pixels come out per cycle in every mode.  The same lanes are used for
// the reference sample filtering of Intra_8x8, whose form is identical.
//
// Interface: per lane three 8-bit operands, one 8-bit result.
// Combinational.
module base_mode_pred
  import svc_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  pixel_t [LANES-1:0] op_x,
  input  pixel_t [LANES-1:0] op_z,   // the doubled operand
  input  pixel_t [LANES-1:0] op_y,
  output pixel_t [LANES-1:0] pred
);
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [8:0]  s_xy;
    logic [10:0] s_all;
    always_comb begin
      s_xy    = 9'(op_x[l]) + 9'(op_y[l]) + 9'd1;
      s_all   = 11'(s_xy) + {2'b00, op_z[l], 1'b0} + 11'd1;
      pred[l] = s_all[9:2];
    end
  end
endmodule

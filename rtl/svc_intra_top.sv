// svc_intra_top: SVC intra prediction engine.
//
// Three prediction modules side by side, with one prediction output:
//   * basic intra prediction for H.264 (single-layer streams and the SVC
//     base layer): the Intra_4x4 and Intra_8x8 generators, both built on
//     the base-mode predictor, with the ping-pong Line SRAM pair that holds
//     the upper-line pixels.  With upper_from_sram set, the four upper
//     neighbours A..D of the Intra_4x4 block are taken straight from the
//     Line SRAM read data (the last sub-row of the upper buffer); the rest
//     of the neighbours come from the ports;
//   * Intra_BL prediction for enhancement-layer macroblocks of type I_BL:
//     the banked-SRAM upsampling engine.
// pred_sel chooses which module drives the output (0 Intra_4x4, 1 Intra_8x8,
// 2 Intra_BL); each module reports four predicted pixels per cycle with
// pred_valid.  pred_row is the row in the block; pred_half is the left (0)
// or right (1) four columns of an 8x8 row and is 0 for the 4x4 modules.
//
// Interface: ports are the three modules' own, brought out unchanged; mode
// and il_type are the encodings of svc_pkg.  Following the paper the two
// basic generators share one Line SRAM pair and one output; one module runs
// at a time (this design's choice: the engines are separate instances, so
// a real chip would share the base-mode adders between 4x4 and 8x8).  The
// upper/left/corner neighbour buffers and the Intra_16x16 / chroma
// generators are not part of this RTL; their pixels enter through the
// neighbour ports.
module svc_intra_top
  import svc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       pred_sel,         // 0 Intra_4x4, 1 Intra_8x8, 2 Intra_BL
  // ---- basic intra: Intra_4x4 command
  input  logic             i4_start,
  input  logic [3:0]       i4_mode,
  input  pixel_t [7:0]     i4_top,
  input  pixel_t [3:0]     i4_left,
  input  pixel_t           i4_corner,
  input  logic             i4_top_avail,
  input  logic             i4_left_avail,
  input  logic             upper_from_sram,  // A..D from the Line SRAM read data
  output logic             i4_busy,
  // ---- basic intra: Intra_8x8 command
  input  logic             i8_start,
  input  logic [3:0]       i8_mode,
  input  pixel_t [15:0]    i8_top,
  input  pixel_t [7:0]     i8_left,
  input  pixel_t           i8_corner,
  input  logic             i8_top_avail,
  input  logic             i8_left_avail,
  input  logic             i8_corner_avail,
  input  logic [1:0]       i8_blk,           // 8x8 block number in the macroblock
  output logic             i8_busy,
  output logic             i8_reusing,
  output logic             i8_filtering,
  // ---- Line SRAM pair
  input  logic             ls_swap,
  output logic             ls_sel,
  input  logic             ls_p_en,
  input  logic             ls_p_we,
  input  logic [4:0]       ls_p_addr,
  input  logic [31:0]      ls_p_wdata,
  output logic [31:0]      ls_p_rdata,
  input  logic             ls_b_en,
  input  logic             ls_b_we,
  input  logic [4:0]       ls_b_addr,
  input  logic [31:0]      ls_b_wdata,
  output logic [31:0]      ls_b_rdata,
  // ---- Intra_BL: reference pixel fill and block command
  input  logic             bl_wr_en,
  input  logic             bl_wr_half,
  input  logic [3:0]       bl_wr_row,
  input  logic [2:0]       bl_wr_word,
  input  logic [15:0]      bl_wr_data,
  input  logic             bl_swap_half,
  output logic             bl_left_half,
  input  logic             bl_start,
  input  logic [2:0]       bl_il_type,
  input  logic             bl_chroma,
  input  logic [3:0][4:0]  bl_xref,
  input  logic [3:0][3:0]  bl_xphase,
  input  logic [6:0][3:0]  bl_yref,
  input  logic [6:0][3:0]  bl_yphase,
  output logic             bl_busy,
  output logic             bl_done,
  output logic [1:0]       bl_h_eq,
  output logic [1:0]       bl_v_eq,
  output logic             bl_h_reuse,
  output logic             bl_v_reuse,
  // ---- prediction out
  output logic             pred_valid,
  output logic [2:0]       pred_row,
  output logic             pred_half,
  output pixel_t [3:0]     pred_pix
);
  // ---------------------------------------------------------- Line SRAMs
  line_sram_pp #(.DEPTH(20), .WIDTH(32)) u_line (
    .clk, .rst_n, .swap(ls_swap), .sel(ls_sel),
    .p_en(ls_p_en), .p_we(ls_p_we), .p_addr(ls_p_addr), .p_wdata(ls_p_wdata), .p_rdata(ls_p_rdata),
    .b_en(ls_b_en), .b_we(ls_b_we), .b_addr(ls_b_addr), .b_wdata(ls_b_wdata), .b_rdata(ls_b_rdata));

  // ------------------------------------------------------- basic intra
  pixel_t [7:0] top_mux;
  logic         i4_valid;
  logic [1:0]   i4_row;
  pixel_t [3:0] i4_pix;

  always_comb begin
    top_mux = i4_top;
    if (upper_from_sram)
      for (int i = 0; i < 4; i++) top_mux[i] = ls_p_rdata[8*i +: 8];
  end

  intra4x4_pred u_i4 (
    .clk, .rst_n, .start(i4_start), .mode(i4_mode_e'(i4_mode)),
    .top(top_mux), .left(i4_left), .corner(i4_corner),
    .top_avail(i4_top_avail), .left_avail(i4_left_avail),
    .busy(i4_busy), .pred_valid(i4_valid), .pred_row(i4_row), .pred_pix(i4_pix));

  logic         i8_valid;
  logic [2:0]   i8_row;
  logic         i8_half;
  pixel_t [3:0] i8_pix;

  intra8x8_pred u_i8 (
    .clk, .rst_n, .start(i8_start), .mode(i4_mode_e'(i8_mode)),
    .top(i8_top), .left(i8_left), .corner(i8_corner),
    .top_avail(i8_top_avail), .left_avail(i8_left_avail), .corner_avail(i8_corner_avail),
    .blk_idx(i8_blk), .busy(i8_busy), .reusing(i8_reusing), .filtering(i8_filtering), .pred_valid(i8_valid),
    .pred_row(i8_row), .pred_half(i8_half), .pred_pix(i8_pix));

  // --------------------------------------------------------- Intra_BL
  logic         bl_valid;
  logic [1:0]   bl_row;
  pixel_t [3:0] bl_pix;

  intra_bl_engine u_bl (
    .clk, .rst_n,
    .wr_en(bl_wr_en), .wr_half(bl_wr_half), .wr_row(bl_wr_row), .wr_word(bl_wr_word),
    .wr_data(bl_wr_data), .swap_half(bl_swap_half), .left_half(bl_left_half),
    .start(bl_start), .il_type(il_type_e'(bl_il_type)), .chroma(bl_chroma),
    .xref(bl_xref), .xphase(bl_xphase), .yref(bl_yref), .yphase(bl_yphase),
    .busy(bl_busy), .out_valid(bl_valid), .out_row(bl_row), .out_pix(bl_pix),
    .done(bl_done), .h_eq(bl_h_eq), .v_eq(bl_v_eq),
    .h_reuse(bl_h_reuse), .v_reuse(bl_v_reuse));

  // ------------------------------------------------------ output select
  always_comb begin
    case (pred_sel)
      2'd1:    begin pred_valid = i8_valid; pred_row = i8_row;        pred_half = i8_half; pred_pix = i8_pix; end
      2'd2:    begin pred_valid = bl_valid; pred_row = {1'b0, bl_row}; pred_half = 1'b0;    pred_pix = bl_pix; end
      default: begin pred_valid = i4_valid; pred_row = {1'b0, i4_row}; pred_half = 1'b0;    pred_pix = i4_pix; end
    endcase
  end
endmodule

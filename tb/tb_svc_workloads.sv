// tb_svc_workloads: cycle budgets of whole macroblocks on svc_intra_top at
// its default sizes.
//
// The engine is specified for HD1080 H.264 intra at 100 MHz (1920x1088 at
// 30 fps is 244800 MB/s, so 408 cycles per MB) and for two SVC spatial
// layers, HD720 base and HD1080 enhancement, at 145 MHz (592 cycles per
// enhancement MB when Intra_BL runs beside the base layer).  This test
// issues the blocks of one macroblock back to back, each as soon as the
// generator is free, counts the cycles from the first start to the last
// predicted row, and checks every predicted pixel against the models:
//   1. an Intra_4x4 luma MB (16 blocks, all modes);
//   2. an Intra_8x8 luma MB in the slowest modes (17 filtered neighbours);
//   3. an I_BL MB at the HD720 -> HD1080 ratio of 1.5, luma and both 4:2:0
//      chroma components, blocks sent down each column so the rows shared
//      with the block above are reused (region loads are not counted: they
//      overlap the previous blocks in a real decoder);
//   4. an I_BL luma MB at 2:1, for comparison;
//   5. an I_BL frame-MBAFF luma MB at 2:1, which adds the extended step.
// A budget that is exceeded counts as a failure; case 5 has no budget and
// is checked against the engine's cycle formula instead.
module tb_svc_workloads;
  import svc_pkg::*;
  import svc_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [1:0] pred_sel;
  logic i4_start, i4_ta, i4_la, upper_from_sram, i4_busy;
  logic [3:0] i4_mode;
  pixel_t [7:0] i4_top;
  pixel_t [3:0] i4_left;
  pixel_t i4_corner;
  logic i8_start, i8_ta, i8_la, i8_ca, i8_busy, i8_filtering, i8_reusing;
  logic [1:0] i8_blk;
  logic [3:0] i8_mode;
  pixel_t [15:0] i8_top;
  pixel_t [7:0] i8_left;
  pixel_t i8_corner;
  logic ls_swap, ls_sel, ls_p_en, ls_p_we, ls_b_en, ls_b_we;
  logic [4:0] ls_p_addr, ls_b_addr;
  logic [31:0] ls_p_wdata, ls_p_rdata, ls_b_wdata, ls_b_rdata;
  logic bl_wr_en, bl_wr_half, bl_swap_half, bl_left_half, bl_start, bl_chroma, bl_busy, bl_done;
  logic [3:0] bl_wr_row;
  logic [2:0] bl_wr_word;
  logic [15:0] bl_wr_data;
  logic [2:0] bl_il_type;
  logic [3:0][4:0] bl_xref;
  logic [3:0][3:0] bl_xphase;
  logic [6:0][3:0] bl_yref, bl_yphase;
  logic [1:0] bl_h_eq, bl_v_eq;
  logic bl_h_reuse, bl_v_reuse;
  logic pred_valid, pred_half;
  logic [2:0] pred_row;
  pixel_t [3:0] pred_pix;

  svc_intra_top dut (
    .clk, .rst_n, .pred_sel,
    .i4_start, .i4_mode, .i4_top, .i4_left, .i4_corner, .i4_top_avail(i4_ta),
    .i4_left_avail(i4_la), .upper_from_sram, .i4_busy,
    .i8_start, .i8_mode, .i8_top, .i8_left, .i8_corner, .i8_top_avail(i8_ta),
    .i8_left_avail(i8_la), .i8_corner_avail(i8_ca), .i8_blk, .i8_busy, .i8_reusing, .i8_filtering,
    .ls_swap, .ls_sel, .ls_p_en, .ls_p_we, .ls_p_addr, .ls_p_wdata, .ls_p_rdata,
    .ls_b_en, .ls_b_we, .ls_b_addr, .ls_b_wdata, .ls_b_rdata,
    .bl_wr_en, .bl_wr_half, .bl_wr_row, .bl_wr_word, .bl_wr_data, .bl_swap_half, .bl_left_half,
    .bl_start, .bl_il_type, .bl_chroma,
    .bl_xref, .bl_xphase, .bl_yref, .bl_yphase, .bl_busy, .bl_done, .bl_h_eq, .bl_v_eq,
    .bl_h_reuse, .bl_v_reuse,
    .pred_valid, .pred_row, .pred_half, .pred_pix);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int P [12][32];
  int t4[8], l4[4], t8[16], l8[8];

  // ------------------------------------------------- reference helpers
  function automatic int href(int r, int i);
    return filt4(bl_chroma, bl_xphase[i], P[r][bl_xref[i] - 1], P[r][bl_xref[i]],
                 P[r][bl_xref[i] + 1], P[r][bl_xref[i] + 2]);
  endfunction

  function automatic int vref(int j, int i);
    int y0;
    y0 = bl_yref[j];
    return vround(filt4(bl_chroma, bl_yphase[j], href(y0 - 1, i), href(y0, i),
                        href(y0 + 1, i), href(y0 + 2, i)));
  endfunction

  // check the output rows as they appear
  always @(negedge clk) if (rst_n && pred_valid) begin
    for (int k = 0; k < 4; k++) begin
      int e;
      unique case (pred_sel)
        2'd0: e = i4_ref(int'(i4_mode), t4, l4, int'(i4_corner), i4_ta, i4_la, k, int'(pred_row));
        2'd1: e = i8_ref(int'(i8_mode), t8, l8, int'(i8_corner), i8_ta, i8_la, i8_ca,
                         4 * int'(pred_half) + k, int'(pred_row));
        default:
          e = il_needs_ext(il_type_e'(bl_il_type))
              ? ext_ref(bl_chroma, vref(int'(pred_row), k), vref(int'(pred_row) + 1, k),
                        vref(int'(pred_row) + 2, k), vref(int'(pred_row) + 3, k))
              : vref(int'(pred_row) + 1, k);
      endcase
      checks++;
      if (int'(pred_pix[k]) != e) begin
        failures++;
        $display("sel %0d row %0d col %0d: got %0d want %0d", pred_sel, pred_row, k, pred_pix[k], e);
      end
    end
  end

  task automatic fill_region();
    for (int r = 0; r < 12; r++)
      for (int c = 0; c < 32; c++) P[r][c] = $urandom_range(0, 255);
    for (int hh = 0; hh < 2; hh++)
      for (int r = 0; r < 12; r++)
        for (int w = 0; w < 8; w++) begin
          @(negedge clk);
          bl_wr_en = 1; bl_wr_half = 1'(hh); bl_wr_row = 4'(r); bl_wr_word = 3'(w);
          bl_wr_data = {8'(P[r][16 * hh + 2 * w + 1]), 8'(P[r][16 * hh + 2 * w])};
        end
    @(negedge clk);
    bl_wr_en = 0;
  endtask

  // source position, in sixteenths of a pixel from region column/row 2, of
  // output sample n when upsampling by num/den (sample centres aligned)
  function automatic int src_pos(int n, int num, int den);
    return 32 + ((2 * n + 1) * 8 * den) / num - 8;
  endfunction

  int bl_cyc;  // cycles spent in I_BL blocks, region loads excluded

  // one I_BL block of size bw at block position (bx, by), ratio num/den;
  // voff moves the region down the plane, in sixteenths of a pixel
  task automatic ibl_block(int bx, int by, int num, int den, int bw, int voff);
    longint t0;
    for (int i = 0; i < 4; i++) begin
      int p;
      p = src_pos(4 * bx + i, num, den);
      bl_xref[i] = 5'(p / 16); bl_xphase[i] = 4'(p % 16);
    end
    for (int j = 0; j < 7; j++) begin
      int p, yy;
      yy = 4 * by + j - 1;
      if (yy < 0) yy = 0;
      if (yy > bw - 1) yy = bw - 1;
      p = src_pos(yy, num, den) - voff;
      bl_yref[j] = 4'(p / 16); bl_yphase[j] = 4'(p % 16);
    end
    t0 = $time;
    bl_start = 1;
    @(negedge clk);
    bl_start = 0;
    while (!bl_done) @(negedge clk);
    @(negedge clk);  // the last row is checked here; start is taken in IDLE
    bl_cyc += int'(($time - t0) / 10);
  endtask

  // the blocks of a bw x bw plane, down each column.  At 1.5x a 16-row luma
  // plane reads 14 source rows, more than the 12 the region holds, so it
  // is done in two halves of 8 rows with a region load between them.
  task automatic ibl_plane(int num, int den, int bw, bit chroma, output int cyc);
    int halves;
    bl_chroma = chroma;
    halves = (bw == 16 && num == 3) ? 2 : 1;
    bl_cyc = 0;
    for (int h = 0; h < halves; h++) begin
      fill_region();
      for (int bx = 0; bx < bw / 4; bx++)
        for (int by = h * (bw / 4) / halves; by < (h + 1) * (bw / 4) / halves; by++)
          ibl_block(bx, by, num, den, bw, 80 * h);
    end
    cyc = bl_cyc;
  endtask

  // a 2:1 frame-MBAFF luma MB (field MB over a frame base layer): the 7
  // basic rows of a block are one source row apart and the extended step
  // makes the field rows between them.  A block row then reads 10 source
  // rows, so two do not fit in the 12-row region: the region is reloaded
  // for each block row, and blocks reuse only along a row of the region.
  task automatic ibl_mbaff_plane(output int cyc);
    bl_chroma = 0;
    bl_il_type = 3'(IL_FRAME_MBAFF);
    bl_cyc = 0;
    for (int by = 0; by < 4; by++) begin
      fill_region();
      for (int bx = 0; bx < 4; bx++) begin
        longint t0;
        for (int i = 0; i < 4; i++) begin
          int p;
          p = src_pos(4 * bx + i, 2, 1);
          bl_xref[i] = 5'(p / 16); bl_xphase[i] = 4'(p % 16);
        end
        for (int j = 0; j < 7; j++) begin
          bl_yref[j] = 4'(1 + j); bl_yphase[j] = 4'(4);
        end
        t0 = $time;
        bl_start = 1;
        @(negedge clk);
        bl_start = 0;
        while (!bl_done) @(negedge clk);
        @(negedge clk);
        bl_cyc += int'(($time - t0) / 10);
      end
    end
    bl_il_type = 3'(IL_FRAME_FRAME);
    cyc = bl_cyc;
  endtask

  task automatic budget(string what, int cyc, int limit);
    $display("%s: %0d cycles (budget %0d)", what, cyc, limit);
    checks++;
    if (cyc > limit) begin failures++; $display("%s over budget", what); end
  endtask

  initial begin
    longint t0;
    int cyc, c_luma, c_cb, c_cr;
    rst_n = 0; pred_sel = 2'd0;
    i4_start = 0; i4_mode = '0; i4_top = '0; i4_left = '0; i4_corner = '0; i4_ta = 1; i4_la = 1;
    upper_from_sram = 0;
    i8_start = 0; i8_mode = '0; i8_top = '0; i8_left = '0; i8_corner = '0;
    i8_ta = 1; i8_la = 1; i8_ca = 1; i8_blk = '0;
    ls_swap = 0; ls_p_en = 0; ls_p_we = 0; ls_p_addr = '0; ls_p_wdata = '0;
    ls_b_en = 0; ls_b_we = 0; ls_b_addr = '0; ls_b_wdata = '0;
    bl_wr_en = 0; bl_wr_half = 0; bl_wr_row = '0; bl_wr_word = '0; bl_wr_data = '0; bl_swap_half = 0;
    bl_start = 0; bl_chroma = 0; bl_il_type = 3'(IL_FRAME_FRAME);
    bl_xref = '0; bl_xphase = '0; bl_yref = '0; bl_yphase = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1. Intra_4x4 macroblock
    pred_sel = 2'd0;
    @(negedge clk);
    t0 = $time;
    for (int b = 0; b < 16; b++) begin
      i4_mode = 4'(b % 9);
      for (int i = 0; i < 8; i++) begin i4_top[i] = 8'($urandom); t4[i] = i4_top[i]; end
      for (int i = 0; i < 4; i++) begin i4_left[i] = 8'($urandom); l4[i] = i4_left[i]; end
      i4_corner = 8'($urandom);
      i4_start = 1;
      @(negedge clk);
      i4_start = 0;
      while (i4_busy) @(negedge clk);
    end
    budget("Intra_4x4 luma MB", int'(($time - t0) / 10), 408);

    // ---- 2. Intra_8x8 macroblock, 17 filtered neighbours per block
    pred_sel = 2'd1;
    @(negedge clk);
    t0 = $time;
    for (int b = 0; b < 4; b++) begin
      i8_blk = 2'(b);
      i8_mode = 4'(4 + b % 3);
      for (int i = 0; i < 16; i++) begin i8_top[i] = 8'($urandom); t8[i] = i8_top[i]; end
      for (int i = 0; i < 8; i++) begin i8_left[i] = 8'($urandom); l8[i] = i8_left[i]; end
      i8_corner = 8'($urandom);
      i8_start = 1;
      @(negedge clk);
      i8_start = 0;
      while (i8_busy) @(negedge clk);
    end
    budget("Intra_8x8 luma MB", int'(($time - t0) / 10), 408);

    // ---- 3. I_BL macroblock, HD720 -> HD1080 (ratio 3/2)
    pred_sel = 2'd2;
    ibl_plane(3, 2, 16, 0, c_luma);
    ibl_plane(3, 2, 8, 1, c_cb);
    ibl_plane(3, 2, 8, 1, c_cr);
    $display("I_BL 1.5x: luma %0d, Cb %0d, Cr %0d cycles", c_luma, c_cb, c_cr);
    budget("I_BL 1.5x 4:2:0 MB", c_luma + c_cb + c_cr, 592);

    // ---- 4. I_BL luma macroblock at 2:1
    ibl_plane(2, 1, 16, 0, cyc);
    budget("I_BL 2:1 luma MB", cyc, 592);

    // ---- 5. I_BL frame-MBAFF luma MB at 2:1 (extended vertical step)
    // each block filters 10 region rows and 7 basic rows and reuses none:
    // 1 + 2*10 + 5 + 2*7 = 40 cycles.  This case has no HD budget here; it
    // compares with the 312-cycle worst case of the macroblock schedule.
    ibl_mbaff_plane(cyc);
    $display("I_BL 2:1 frame-MBAFF luma MB: %0d cycles (expected 640)", cyc);
    checks++;
    if (cyc != 16 * 40) begin failures++; $display("frame-MBAFF cycle count differs"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_svc_intra_top: end-to-end test of the SVC intra prediction engine at
// its default sizes.
//
// 1. Line SRAM ping-pong: the bus side writes an upper line into the idle
//    SRAM, the pair is swapped, and the predictor side reads it back.
// 2. One H.264 macroblock as sixteen Intra_4x4 blocks (all nine modes, DC
//    with every availability case); the top row of blocks takes
//    its upper neighbours A..D straight from the Line SRAM read data.
// 3. Intra_8x8 blocks in all nine modes, with the reference sample
//    filtering, over the availability cases of DC and of the corner; the
//    blocks go round the four 8x8 positions of a macroblock, and the second
//    and fourth share their neighbours with the block before, so the reuse
//    of filtered pixels happens.
// 4. Three SVC enhancement macroblocks of type I_BL, 2:1 dyadic frame-frame,
//    along one macroblock row: the 32x12 reference region is written into
//    the banked SRAM; after two macroblocks the halves are swapped and only
//    the new right half is written; the blocks go down each column so that
//    each reuses the filtered rows of the block above.  Then blocks of the other picture-type
//    combinations (with the extended vertical step) and chroma, with flat
//    regions for the equality bypass.
// Every output is checked against the reference models; the test fails if
// any mechanism (Line SRAM swap, SRAM-fed neighbours, each Intra_4x4 and
// Intra_8x8 mode, DC availability cases, 8x8 filtering, banked-SRAM half
// swap, filtered-pixel reuse, extended step, chroma, both bypasses, all output selections) never
// happened.
module tb_svc_intra_top;
  import svc_pkg::*;
  import svc_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [1:0] pred_sel;
  logic i8_start, i8_ta, i8_la, i8_ca, i8_busy, i8_filtering, i8_reusing;
  logic [1:0] i8_blk;
  logic [3:0] i8_mode;
  pixel_t [15:0] i8_top;
  pixel_t [7:0] i8_left;
  pixel_t i8_corner;
  logic i4_start, i4_ta, i4_la, upper_from_sram, i4_busy;
  logic [3:0] i4_mode;
  pixel_t [7:0] i4_top;
  pixel_t [3:0] i4_left;
  pixel_t i4_corner;
  logic ls_swap, ls_sel, ls_p_en, ls_p_we, ls_b_en, ls_b_we;
  logic [4:0] ls_p_addr, ls_b_addr;
  logic [31:0] ls_p_wdata, ls_p_rdata, ls_b_wdata, ls_b_rdata;
  logic bl_wr_en, bl_start, bl_chroma, bl_busy, bl_done;
  logic bl_wr_half, bl_swap_half, bl_left_half;
  logic [1:0] bl_h_eq, bl_v_eq;
  logic bl_h_reuse, bl_v_reuse;
  logic [3:0] bl_wr_row;
  logic [2:0] bl_wr_word;
  logic [15:0] bl_wr_data;
  logic [2:0] bl_il_type;
  logic [3:0][4:0] bl_xref;
  logic [3:0][3:0] bl_xphase;
  logic [6:0][3:0] bl_yref, bl_yphase;
  logic pred_valid, pred_half;
  logic [2:0] pred_row;
  pixel_t [3:0] pred_pix;

  svc_intra_top dut (
    .clk, .rst_n, .pred_sel,
    .i4_start, .i4_mode, .i4_top, .i4_left, .i4_corner, .i4_top_avail(i4_ta),
    .i4_left_avail(i4_la), .upper_from_sram, .i4_busy,
    .ls_swap, .ls_sel, .ls_p_en, .ls_p_we, .ls_p_addr, .ls_p_wdata, .ls_p_rdata,
    .i8_start, .i8_mode, .i8_top, .i8_left, .i8_corner, .i8_top_avail(i8_ta),
    .i8_left_avail(i8_la), .i8_corner_avail(i8_ca), .i8_blk, .i8_busy, .i8_reusing, .i8_filtering,
    .ls_b_en, .ls_b_we, .ls_b_addr, .ls_b_wdata, .ls_b_rdata,
    .bl_wr_en, .bl_wr_half, .bl_wr_row, .bl_wr_word, .bl_wr_data,
    .bl_swap_half, .bl_left_half, .bl_start, .bl_il_type, .bl_chroma,
    .bl_xref, .bl_xphase, .bl_yref, .bl_yphase, .bl_busy, .bl_done, .bl_h_eq, .bl_v_eq, .bl_h_reuse, .bl_v_reuse,
    .pred_valid, .pred_row, .pred_half, .pred_pix);

  // mechanism counters
  int n_swap = 0, n_sram_top = 0, n_ext = 0, n_chroma = 0, n_heq = 0, n_veq = 0;
  int n_i4_rows = 0, n_bl_rows = 0, n_i8_outs = 0, n_i8_filt = 0, n_half_swap = 0, n_i8_reuse = 0, n_bl_reuse = 0;
  int n_i8_mode [9];
  int n_mode [9];
  int n_dc_avail [4];

  always @(posedge clk) if (rst_n) begin
    n_heq += int'(bl_h_eq[0] && dut.u_bl.hv_q) + int'(bl_h_eq[1] && dut.u_bl.hv_q);
    n_veq += int'(bl_v_eq[0] && dut.u_bl.state == dut.u_bl.S_VPASS)
           + int'(bl_v_eq[1] && dut.u_bl.state == dut.u_bl.S_VPASS);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int P [12][32];
  logic [31:0] upper_line [20];

  // ------------------------------------------------------------ helpers
  // write logical half h of the reference region (both when h < 0)
  task automatic fill_region(int kind, int h);
    int base;
    base = $urandom_range(0, 255);
    for (int r = 0; r < 12; r++)
      for (int c = 0; c < 32; c++)
        if (h < 0 || c / 16 == h) P[r][c] = kind == 0 ? int'($urandom_range(0, 255)) : base;
    for (int hh = 0; hh < 2; hh++)
      if (h < 0 || hh == h)
        for (int r = 0; r < 12; r++)
          for (int w = 0; w < 8; w++) begin
            @(negedge clk);
            bl_wr_en = 1; bl_wr_half = 1'(hh); bl_wr_row = 4'(r); bl_wr_word = 3'(w);
            bl_wr_data = {8'(P[r][16 * hh + 2 * w + 1]), 8'(P[r][16 * hh + 2 * w])};
          end
    @(negedge clk);
    bl_wr_en = 0;
  endtask

  // move on by two 2:1 macroblocks: the right half becomes the left half
  task automatic swap_region();
    logic was;
    was = bl_left_half;
    @(negedge clk);
    bl_swap_half = 1;
    @(negedge clk);
    bl_swap_half = 0;
    checks++;
    if (bl_left_half == was) begin failures++; $display("half swap did not happen"); end
    n_half_swap++;
    for (int r = 0; r < 12; r++)
      for (int c = 0; c < 16; c++) P[r][c] = P[r][c + 16];
    fill_region(0, 1);
  endtask

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

  task automatic run_bl_block();
    int rows;
    bit ext;
    ext = il_needs_ext(il_type_e'(bl_il_type));
    @(negedge clk);
    bl_start = 1;
    @(negedge clk);
    bl_start = 0;
    if (bl_h_reuse) n_bl_reuse++;
    rows = 0;
    for (int c = 0; c < 100 && rows < 4; c++) begin
      if (pred_valid) begin
        for (int i = 0; i < 4; i++) begin
          int e;
          e = ext ? ext_ref(bl_chroma, vref(pred_row, i), vref(pred_row + 1, i),
                            vref(pred_row + 2, i), vref(pred_row + 3, i))
                  : vref(pred_row + 1, i);
          checks++;
          if (int'(pred_pix[i]) != e) begin
            failures++;
            $display("I_BL type %0d row %0d col %0d: got %0d want %0d", bl_il_type, pred_row, i, pred_pix[i], e);
          end
        end
        rows++;
        n_bl_rows++;
      end
      @(negedge clk);
    end
    checks++;
    if (rows != 4) begin failures++; $display("I_BL block gave %0d rows", rows); end
    if (ext) n_ext++;
    if (bl_chroma) n_chroma++;
  endtask

  // --------------------------------------------------------------- test
  initial begin
    int t[8], l[4];
    rst_n = 0; pred_sel = 2'd0;
    i8_start = 0; i8_mode = '0; i8_top = '0; i8_left = '0; i8_corner = '0;
    i8_ta = 1; i8_la = 1; i8_ca = 1; i8_blk = '0; bl_swap_half = 0;
    i4_start = 0; i4_mode = '0; i4_top = '0; i4_left = '0; i4_corner = '0; i4_ta = 1; i4_la = 1;
    upper_from_sram = 0;
    ls_swap = 0; ls_p_en = 0; ls_p_we = 0; ls_p_addr = '0; ls_p_wdata = '0;
    ls_b_en = 0; ls_b_we = 0; ls_b_addr = '0; ls_b_wdata = '0;
    bl_wr_en = 0; bl_start = 0; bl_chroma = 0; bl_wr_half = 0; bl_wr_row = '0; bl_wr_word = '0; bl_wr_data = '0;
    bl_il_type = '0; bl_xref = '0; bl_xphase = '0; bl_yref = '0; bl_yphase = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1. upper line in through the bus side, then swap
    for (int a = 0; a < 20; a++) begin
      upper_line[a] = $urandom;
      @(negedge clk);
      ls_b_en = 1; ls_b_we = 1; ls_b_addr = 5'(a); ls_b_wdata = upper_line[a];
    end
    @(negedge clk);
    ls_b_en = 0; ls_b_we = 0;
    ls_swap = 1;
    @(negedge clk);
    ls_swap = 0;
    n_swap++;
    checks++;
    if (ls_sel != 1'b1) begin failures++; $display("swap did not happen"); end

    // ---- 2. one Intra_4x4 macroblock
    pred_sel = 2'd0;
    for (int blk = 0; blk < 16; blk++) begin
      int bx, by, rows;
      bx = blk % 4; by = blk / 4;
      @(negedge clk);
      // all nine modes, then DC twice more for the availability cases
      i4_mode = blk < 9 ? 4'(blk) : (blk == 9 || blk == 11) ? 4'd2 : 4'(blk - 9);
      i4_ta = (blk != 11);
      i4_la = (blk != 9);
      for (int i = 0; i < 8; i++) i4_top[i] = 8'($urandom);
      for (int i = 0; i < 4; i++) i4_left[i] = 8'($urandom);
      i4_corner = 8'($urandom);
      upper_from_sram = (by == 0);
      if (upper_from_sram) begin
        // read the upper sub-row of this block; data_out holds it
        ls_p_en = 1; ls_p_addr = 5'(bx);
        @(negedge clk);
        ls_p_en = 0;
        n_sram_top++;
      end
      for (int i = 0; i < 8; i++) t[i] = i4_top[i];
      if (upper_from_sram) for (int i = 0; i < 4; i++) t[i] = upper_line[bx][8 * i +: 8];
      for (int i = 0; i < 4; i++) l[i] = i4_left[i];
      i4_start = 1;
      @(negedge clk);
      i4_start = 0;
      rows = 0;
      for (int c = 0; c < 10 && rows < 4; c++) begin
        if (pred_valid) begin
          for (int x = 0; x < 4; x++) begin
            int e;
            e = i4_ref(int'(i4_mode), t, l, int'(i4_corner), i4_ta, i4_la, x, int'(pred_row));
            checks++;
            if (int'(pred_pix[x]) != e) begin
              failures++;
              $display("I4 blk %0d mode %0d (%0d,%0d): got %0d want %0d", blk, i4_mode, x, pred_row, pred_pix[x], e);
            end
          end
          rows++;
          n_i4_rows++;
        end
        @(negedge clk);
      end
      checks++;
      if (rows != 4) begin failures++; $display("I4 block %0d gave %0d rows", blk, rows); end
      n_mode[i4_mode]++;
      if (i4_mode == 4'd2) n_dc_avail[{i4_ta, i4_la}]++;
    end
    // remaining DC availability case (neither neighbour)
    @(negedge clk);
    i4_mode = 4'd2; i4_ta = 0; i4_la = 0; upper_from_sram = 0;
    i4_start = 1;
    @(negedge clk);
    i4_start = 0;
    checks++;
    if (!pred_valid || pred_pix != {4{8'd128}}) begin failures++; $display("DC without neighbours"); end
    n_dc_avail[0]++;
    repeat (4) @(negedge clk);

    // ---- 3. Intra_8x8 blocks
    pred_sel = 2'd1;
    for (int n = 0; n < 36; n++) begin
      int t8[16], l8[8], outs;
      bit exp_reuse;
      logic [3:0] prev_mode;
      pixel_t [15:0] prev_top;
      @(negedge clk);
      prev_mode = i8_mode;
      prev_top = i8_top;
      i8_blk = 2'(n % 4);
      i8_mode = 4'(n % 9);
      i8_ta = 1; i8_la = 1;
      i8_ca = n / 9 != 1;
      if (i8_mode == 4'd2) begin i8_ta = n / 9 != 2; i8_la = n / 9 != 3; end
      for (int i = 0; i < 16; i++) i8_top[i] = 8'($urandom);
      for (int i = 0; i < 8; i++) i8_left[i] = 8'($urandom);
      i8_corner = 8'($urandom);
      if (n % 2 == 1) begin
        // right-hand block: its upper neighbours continue the previous block's
        for (int i = 0; i < 8; i++) i8_top[i] = prev_top[8 + i];
        i8_corner = prev_top[7];
        i8_ta = 1; i8_ca = 1;
      end
      exp_reuse = n % 2 == 1 && (prev_mode == 4'd3 || prev_mode == 4'd7) && i8_mode != 4'd1 && i8_mode != 4'd8;
      for (int i = 0; i < 16; i++) t8[i] = i8_top[i];
      for (int i = 0; i < 8; i++) l8[i] = i8_left[i];
      i8_start = 1;
      @(negedge clk);
      i8_start = 0;
      checks++;
      if (i8_reusing != exp_reuse) begin failures++; $display("I8 block %0d: reuse %0d", n, i8_reusing); end
      if (i8_reusing) n_i8_reuse++;
      while (i8_filtering) begin n_i8_filt++; @(negedge clk); end
      outs = 0;
      for (int c = 0; c < 30 && outs < 16; c++) begin
        if (pred_valid) begin
          for (int k = 0; k < 4; k++) begin
            int x, e;
            x = 4 * int'(pred_half) + k;
            e = i8_ref(int'(i8_mode), t8, l8, int'(i8_corner), i8_ta, i8_la, i8_ca, x, int'(pred_row));
            checks++;
            if (int'(pred_pix[k]) != e) begin
              failures++;
              $display("I8 mode %0d (%0d,%0d): got %0d want %0d", i8_mode, x, pred_row, pred_pix[k], e);
            end
          end
          outs++;
          n_i8_outs++;
        end
        @(negedge clk);
      end
      checks++;
      if (outs != 16) begin failures++; $display("I8 block %0d gave %0d outputs", n, outs); end
      n_i8_mode[i8_mode]++;
    end

    // ---- 4. three I_BL macroblocks, 2:1 dyadic frame-frame
    pred_sel = 2'd2;
    fill_region(0, -1);
    bl_il_type = 3'(IL_FRAME_FRAME);
    bl_chroma = 0;
    for (int blk = 0; blk < 48; blk++) begin
      int bx, by, mb;
      mb = blk / 16;
      // down each column of 4x4 blocks, so that a block reuses the
      // horizontally filtered rows of the block above it
      bx = (blk % 16) / 4; by = blk % 4;
      if (blk == 32) swap_region();
      // output column X (0..15) of macroblock mb sits at reference position
      // 8*X+4 in sixteenths of a reference pixel, from region column
      // 2 + 8*mb (minus 16 once the halves have been swapped)
      for (int i = 0; i < 4; i++) begin
        int pos;
        pos = 8 * (4 * bx + i) + 4;
        bl_xref[i] = 5'(2 + 8 * (mb % 2) + pos / 16);
        bl_xphase[i] = 4'(pos % 16);
      end
      for (int j = 0; j < 7; j++) begin
        int pos, yy;
        yy = 4 * by + j - 1;
        if (yy < 0) yy = 0;
        if (yy > 15) yy = 15;
        pos = 8 * yy + 4;
        bl_yref[j] = 4'(1 + pos / 16);
        bl_yphase[j] = 4'(pos % 16);
      end
      run_bl_block();
    end

    // ---- other picture-type combinations, chroma, flat regions
    for (int n = 0; n < 42; n++) begin
      int x0, y0;
      if (n % 14 == 0) fill_region((n / 14) % 2, -1);
      bl_il_type = 3'(n % 7);
      bl_chroma = (n / 7) % 2 == 1;
      x0 = $urandom_range(1, 26);
      bl_xref[0] = 5'(x0);
      for (int i = 1; i < 4; i++) bl_xref[i] = bl_xref[i - 1] + 5'($urandom_range(0, 1));
      y0 = $urandom_range(1, 3);
      bl_yref[0] = 4'(y0);
      for (int j = 1; j < 7; j++) bl_yref[j] = bl_yref[j - 1] + 4'($urandom_range(0, 1));
      for (int i = 0; i < 4; i++) bl_xphase[i] = 4'($urandom_range(0, 15));
      for (int j = 0; j < 7; j++) bl_yphase[j] = 4'($urandom_range(0, 15));
      run_bl_block();
    end

    // ---- mechanism coverage
    $display("Line SRAM swaps %0d, SRAM-fed upper rows %0d, I4 rows %0d, I8 outputs %0d, I8 filter cycles %0d, I8 reuses %0d",
             n_swap, n_sram_top, n_i4_rows, n_i8_outs, n_i8_filt, n_i8_reuse);
    $display("I_BL reuse of rows %0d", n_bl_reuse);
    $display("I_BL rows %0d, half swaps %0d, extended %0d, chroma %0d, H bypass %0d, V bypass %0d",
             n_bl_rows, n_half_swap, n_ext, n_chroma, n_heq, n_veq);
    for (int m = 0; m < 9; m++) begin
      checks++;
      if (n_i8_mode[m] == 0) begin failures++; $display("Intra_8x8 mode %0d never used", m); end
    end
    for (int m = 0; m < 9; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("mode %0d never used", m); end
    end
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (n_dc_avail[a] == 0) begin failures++; $display("DC availability case %0d never used", a); end
    end
    checks++;
    if (n_swap == 0 || n_sram_top == 0 || n_ext == 0 || n_chroma == 0 || n_heq == 0 || n_veq == 0
        || n_i4_rows == 0 || n_bl_rows == 0 || n_i8_outs == 0 || n_i8_filt == 0 || n_half_swap == 0 || n_i8_reuse == 0 || n_bl_reuse == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

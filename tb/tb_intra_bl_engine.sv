// tb_intra_bl_engine: random Intra_BL blocks over all seven picture-type
// combinations, luma and chroma, with random, smooth and flat reference
// regions.  The 32x12 reference region is written through the fill port;
// now and then the halves are swapped and only the new right half is
// written, as from one macroblock to the next;
// every output row is compared with a direct two-pass filter model
// (horizontal 4-tap sums, vertical 4-tap with (s+512)>>10, and the
// -3/19/19/-3 extended step where the combination needs it), and the cycle
// count from start to done is checked against 2*NROWS + 5 + 2*NBASIC.
module tb_intra_bl_engine;
  import svc_pkg::*;
  import svc_ref_pkg::*;

  localparam int NTESTS = 400;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_ext = 0, n_chroma = 0, n_heq = 0, n_veq = 0;

  logic rst_n, wr_en, wr_half, swap_half, left_half, start, chroma, busy, out_valid, done;
  logic [1:0] out_row, h_eq, v_eq;
  logic h_reuse, v_reuse;
  logic [3:0] wr_row;
  logic [2:0] wr_word;
  logic [15:0] wr_data;
  il_type_e il_type;
  logic [3:0][4:0] xref;
  logic [3:0][3:0] xphase;
  logic [6:0][3:0] yref, yphase;
  pixel_t [3:0] out_pix;

  int P [12][32];
  int n_swaps = 0, n_hreuse = 0, n_vreuse = 0, n_below = 0;
  // schedule model: region rows held in V_BHI, basic rows held in V_BI
  bit m_bhi [12];
  bit m_bi [7];
  logic [6:0][3:0] m_yref, m_yphase;

  intra_bl_engine dut (.clk, .rst_n, .wr_en, .wr_half, .wr_row, .wr_word, .wr_data,
                       .swap_half, .left_half, .start, .il_type,
                       .chroma, .xref, .xphase, .yref, .yphase, .busy, .out_valid, .out_row,
                       .out_pix, .done, .h_eq, .v_eq, .h_reuse, .v_reuse);

  always @(posedge clk) if (rst_n) begin
    n_heq += int'(h_eq[0] && dut.hv_q) + int'(h_eq[1] && dut.hv_q);
    n_veq += int'(v_eq[0] && dut.state == dut.S_VPASS) + int'(v_eq[1] && dut.state == dut.S_VPASS);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fill logical half h (or both when h < 0) with a pattern
  task automatic fill(int kind, int h);
    int base;
    base = $urandom_range(0, 255);
    for (int r = 0; r < 12; r++)
      for (int c = 0; c < 32; c++)
        if (h < 0 || c / 16 == h)
          case (kind)
            0: P[r][c] = $urandom_range(0, 255);
            1: P[r][c] = (base + 7 * r + 5 * c) % 256;
            default: P[r][c] = base;
          endcase
    for (int hh = 0; hh < 2; hh++)
      if (h < 0 || hh == h)
        for (int r = 0; r < 12; r++)
          for (int w = 0; w < 8; w++) begin
            @(negedge clk);
            wr_en = 1; wr_half = 1'(hh); wr_row = 4'(r); wr_word = 3'(w);
            wr_data = {8'(P[r][16 * hh + 2 * w + 1]), 8'(P[r][16 * hh + 2 * w])};
          end
    @(negedge clk);
    wr_en = 0;
  endtask

  // next macroblock: keep the right half as the left half, refill the right
  task automatic next_mb(int kind);
    @(negedge clk);
    swap_half = 1;
    @(negedge clk);
    swap_half = 0;
    n_swaps++;
    for (int r = 0; r < 12; r++)
      for (int c = 0; c < 16; c++) P[r][c] = P[r][c + 16];
    fill(kind, 1);
  endtask

  function automatic int href(int r, int i);
    return filt4(chroma, xphase[i], P[r][xref[i] - 1], P[r][xref[i]], P[r][xref[i] + 1], P[r][xref[i] + 2]);
  endfunction

  function automatic int vref(int j, int i);
    int y0;
    y0 = yref[j];
    return vround(filt4(chroma, yphase[j], href(y0 - 1, i), href(y0, i), href(y0 + 1, i), href(y0 + 2, i)));
  endfunction

  initial begin
    bit below;
    rst_n = 0; wr_en = 0; start = 0; swap_half = 0; wr_half = 0; wr_row = '0; wr_word = '0; chroma = 0; il_type = IL_FRAME_FRAME;
    wr_data = '0; xref = '0; xphase = '0; yref = '0; yphase = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NTESTS; t++) begin
      bit ext;
      int jf, jl, x0, y0, steps, nrows, cyc, exp_cyc, rows_seen, d, rf, rl, rs, nh, nv;
      logic [6:0][3:0] oy, op;
      if (t == 0) fill(0, -1);
      else if (t % 4 == 0) next_mb((t / 4) % 3);
      // every other block within a macroblock is the block below the last one
      below = (t % 4 != 0) && (t % 2 == 1);
      @(negedge clk);
      if (!below) begin
        il_type = il_type_e'(t % 7);
        chroma  = (t / 7) % 2 == 1;
      end
      ext = il_needs_ext(il_type);
      jf = ext ? 0 : 1; jl = ext ? 6 : 4;
      oy = yref; op = yphase;
      if (below) begin
        // rows -1..1 (or row 0) of this block are rows 3..5 (row 3) of the last
        d = ext ? 4 : 3;
        for (int j = 0; j < 7; j++) begin
          if (j >= jf && j + d <= jl) begin
            yref[j] = oy[j + d]; yphase[j] = op[j + d];
          end else if (j > jf) begin
            yref[j] = yref[j - 1] + 4'($urandom_range(0, 1)); yphase[j] = 4'($urandom_range(0, 15));
          end
        end
        if (int'(yref[jl]) + 2 >= 12) below = 0;
      end
      if (!below) begin
      // columns: steps of 0 or 1 (upsampling ratio 1..2 and above)
      x0 = $urandom_range(1, 26);
      xref[0] = 5'(x0);
      for (int i = 1; i < 4; i++) xref[i] = xref[i - 1] + 5'($urandom_range(0, 1));
      steps = jl - jf;
      y0 = $urandom_range(1, 9 - steps);
      for (int j = 0; j < 7; j++) yref[j] = 4'(y0);
      for (int j = jf + 1; j <= jl; j++) yref[j] = yref[j - 1] + 4'($urandom_range(0, 1));
      for (int i = 0; i < 4; i++) xphase[i] = 4'($urandom_range(0, 15));
      for (int j = 0; j < 7; j++) yphase[j] = 4'($urandom_range(0, 15));
      end
      // expected schedule: rows and basic rows held from the last block are skipped
      if (!below) begin
        for (int r = 0; r < 12; r++) m_bhi[r] = 0;
        for (int j = 0; j < 7; j++) m_bi[j] = 0;
      end
      rf = yref[jf] - 1; rl = yref[jl] + 2;
      rs = -1;
      for (int r = rl; r >= rf; r--) if (!m_bhi[r]) rs = r;
      nh = rs < 0 ? 0 : rl - rs + 1;
      nv = 0;
      for (int j = jf; j <= jl; j++) begin
        bit hit;
        hit = 0;
        for (int k = 0; k < 7; k++) if (m_bi[k] && m_yref[k] == yref[j] && m_yphase[k] == yphase[j]) hit = 1;
        if (!hit) nv++;
      end
      if (rs >= 0) for (int r = rs; r <= rl; r++) m_bhi[r] = 1;
      for (int j = 0; j < 7; j++) m_bi[j] = j >= jf && j <= jl;
      m_yref = yref; m_yphase = yphase;
      nrows = yref[jl] - yref[jf] + 4;
      exp_cyc = 2 * nh + 5 + 2 * nv;
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1; rows_seen = 0;
      while (!done && cyc < 100) begin
        if (out_valid) rows_seen++;
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (h_reuse != (nh != nrows) || v_reuse != (nv != jl - jf + 1)) begin
        failures++; $display("test %0d: reuse flags %0d %0d", t, h_reuse, v_reuse);
      end
      n_hreuse += int'(h_reuse);
      n_vreuse += int'(v_reuse);
      n_below += int'(below);
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("test %0d: %0d cycles, want %0d", t, cyc, exp_cyc); end
      // the last row is on the outputs together with done; the earlier
      // rows were checked by the monitor below
      checks++;
      if (rows_seen != 3) begin failures++; $display("test %0d: %0d rows before done", t, rows_seen); end
      if (ext) n_ext++;
      if (chroma) n_chroma++;
      @(negedge clk);
    end
    checks++;
    if (n_ext == 0 || n_chroma == 0 || n_heq == 0 || n_veq == 0 || n_swaps == 0
        || n_hreuse == 0 || n_vreuse == 0) failures++;
    $display("blocks below the last %0d, V_BHI reuses %0d, V_BI reuses %0d", n_below, n_hreuse, n_vreuse);
    $display("extended blocks %0d, chroma blocks %0d, H bypasses %0d, V bypasses %0d, half swaps %0d",
             n_ext, n_chroma, n_heq, n_veq, n_swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare every output row with the model
  always @(negedge clk) if (rst_n && out_valid) begin
    int r;
    r = out_row;
    for (int i = 0; i < 4; i++) begin
      int e;
      if (il_needs_ext(il_type))
        e = ext_ref(chroma, vref(r, i), vref(r + 1, i), vref(r + 2, i), vref(r + 3, i));
      else
        e = vref(r + 1, i);
      checks++;
      if (int'(out_pix[i]) != e) begin
        failures++;
        $display("type %0d ch %0d row %0d col %0d: got %0d want %0d", il_type, chroma, r, i, out_pix[i], e);
      end
    end
  end
endmodule

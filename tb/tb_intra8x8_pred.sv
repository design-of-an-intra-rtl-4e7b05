// tb_intra8x8_pred: runs all nine Intra_8x8 modes on random neighbours with
// random availability of the corner (and of top/left for DC), compares all
// 64 pixels with the filter-then-predict equations, and checks the cycle
// count: ceil(M/4) filter cycles (M = filtered neighbours the mode needs)
// followed by 16 output cycles.  A second part runs pairs of 8x8 blocks of
// one macroblock half (blocks 0/1 or 2/3) that share their neighbours as in
// a real picture: after a diagonal down-left or vertical-left first block,
// the second block must reuse six filtered pixels and filter M-6, and must
// not reuse when its mode does not use the filtered top row.
module tb_intra8x8_pred;
  import svc_pkg::*;
  import svc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, start, ta, la, ca, busy, filtering, valid, half, reusing;
  logic [1:0] blk_idx;
  int n_reuse = 0, n_noreuse = 0;
  i4_mode_e mode;
  pixel_t [15:0] top;
  pixel_t [7:0] left;
  pixel_t corner;
  logic [2:0] row;
  pixel_t [3:0] pix;
  int n_filt_cycles [9];

  intra8x8_pred dut (.clk, .rst_n, .start, .mode, .top, .left, .corner, .top_avail(ta),
                     .left_avail(la), .corner_avail(ca), .blk_idx, .busy, .reusing, .filtering,
                     .pred_valid(valid), .pred_row(row), .pred_half(half), .pred_pix(pix));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int needed(int m, bit a, bit b);
    case (m)
      0, 1, 8: return 8;
      3, 7:    return 16;
      4, 5, 6: return 17;
      default: return (a ? 8 : 0) + (b ? 8 : 0);
    endcase
  endfunction

  int t[16], l[8];

  // drive one block from t/l/corner and check it; exp_reuse says whether
  // the six filtered pixels of the previous block must be reused
  task automatic run_block(bit exp_reuse);
    int fc, outs;
    for (int i = 0; i < 16; i++) top[i] = 8'(t[i]);
    for (int i = 0; i < 8; i++) left[i] = 8'(l[i]);
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (reusing != exp_reuse) begin failures++; $display("mode %0d blk %0d: reuse %0d", mode, blk_idx, reusing); end
    fc = 0;
    while (filtering && fc < 10) begin fc++; @(negedge clk); end
    checks++;
    if (fc != (needed(int'(mode), ta, la) - (exp_reuse ? 6 : 0) + 3) / 4) begin
      failures++; $display("mode %0d reuse %0d: %0d filter cycles", mode, exp_reuse, fc);
    end
    if (!exp_reuse) n_filt_cycles[mode] = fc;
    outs = 0;
    while (valid && outs < 20) begin
      for (int c = 0; c < 4; c++) begin
        int x, e;
        x = 4 * int'(half) + c;
        e = i8_ref(int'(mode), t, l, int'(corner), ta, la, ca, x, int'(row));
        checks++;
        if (int'(pix[c]) != e) begin
          failures++;
          $display("mode %0d ta%0d la%0d ca%0d reuse%0d (%0d,%0d): got %0d want %0d", mode, ta, la, ca,
                   exp_reuse, x, row, pix[c], e);
        end
      end
      checks++;
      if (int'(row) != outs / 2 || int'(half) != outs % 2) begin failures++; $display("order"); end
      outs++;
      @(negedge clk);
    end
    checks++;
    if (outs != 16) begin failures++; $display("mode %0d: %0d output cycles", mode, outs); end
  endtask

  initial begin
    rst_n = 0; start = 0; mode = I4_V; ta = 1; la = 1; ca = 1; top = '0; left = '0; corner = '0;
    blk_idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- single blocks (block 0: never reuses)
    for (int n = 0; n < 720; n++) begin
      @(negedge clk);
      mode = i4_mode_e'(n % 9);
      ta = 1; la = 1;
      ca = n[4];
      if (mode == I4_DC) begin ta = n[5] | n[7]; la = n[6] | n[8]; end
      for (int i = 0; i < 16; i++) t[i] = $urandom_range(0, 255);
      for (int i = 0; i < 8; i++) l[i] = $urandom_range(0, 255);
      corner = 8'($urandom);
      run_block(0);
    end
    // ---- pairs of blocks in one macroblock half
    for (int n = 0; n < 360; n++) begin
      int t1[16];
      bit rsv, exp;
      @(negedge clk);
      blk_idx = 2'(2 * (n % 2));
      // first block: DDL or VL leaves p'[8..13,-1], other modes do not
      mode = (n % 5 == 4) ? i4_mode_e'($urandom_range(0, 2)) : ((n / 2) % 2 == 0 ? I4_DDL : I4_VL);
      rsv = (mode == I4_DDL || mode == I4_VL);
      ta = 1; la = n[2]; ca = n[3];
      for (int i = 0; i < 16; i++) begin t1[i] = $urandom_range(0, 255); t[i] = t1[i]; end
      for (int i = 0; i < 8; i++) l[i] = $urandom_range(0, 255);
      corner = 8'($urandom);
      run_block(0);
      // second block: shares the top row to the right of the first block
      @(negedge clk);
      blk_idx = blk_idx + 2'd1;
      mode = i4_mode_e'((n / 4) % 9);
      ta = 1; la = 1; ca = 1;
      if (mode == I4_DC) la = n[5];
      for (int i = 0; i < 8; i++) t[i] = t1[8 + i];
      for (int i = 8; i < 16; i++) t[i] = $urandom_range(0, 255);
      for (int i = 0; i < 8; i++) l[i] = $urandom_range(0, 255);
      corner = 8'(t1[7]);
      exp = rsv && !(mode == I4_H || mode == I4_HU);
      run_block(exp);
      if (exp) n_reuse++; else n_noreuse++;
    end
    $display("filter cycles per mode: %0d %0d %0d %0d %0d %0d %0d %0d %0d", n_filt_cycles[0],
             n_filt_cycles[1], n_filt_cycles[2], n_filt_cycles[3], n_filt_cycles[4],
             n_filt_cycles[5], n_filt_cycles[6], n_filt_cycles[7], n_filt_cycles[8]);
    $display("second blocks with reuse %0d, without %0d", n_reuse, n_noreuse);
    checks++;
    if (n_reuse == 0 || n_noreuse == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

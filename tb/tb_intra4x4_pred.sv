// tb_intra4x4_pred: runs every Intra_4x4 mode on random neighbours (DC with
// all four availability cases) and compares the 16 predicted pixels with
// the H.264 equations; also checks the one-row-per-cycle timing
// (rows 0..3 in the four cycles after start).
module tb_intra4x4_pred;
  import svc_pkg::*;
  import svc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, start, ta, la, busy, valid;
  i4_mode_e mode;
  pixel_t [7:0] top;
  pixel_t [3:0] left;
  pixel_t corner;
  logic [1:0] row;
  pixel_t [3:0] pix;

  intra4x4_pred dut (.clk, .rst_n, .start, .mode, .top, .left, .corner,
                     .top_avail(ta), .left_avail(la), .busy, .pred_valid(valid),
                     .pred_row(row), .pred_pix(pix));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t[8], l[4];
    rst_n = 0; start = 0; mode = I4_V; ta = 1; la = 1; top = '0; left = '0; corner = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 900; n++) begin
      @(negedge clk);
      mode = i4_mode_e'(n % 9);
      ta = (n % 36) < 27 || mode != I4_DC ? 1'b1 : n[0];
      la = (n % 36) < 27 || mode != I4_DC ? 1'b1 : n[1];
      if (mode == I4_DC && (n / 9) % 4 != 0) begin ta = n[3]; la = n[4]; end
      for (int i = 0; i < 8; i++) begin top[i] = 8'($urandom); t[i] = top[i]; end
      for (int i = 0; i < 4; i++) begin left[i] = 8'($urandom); l[i] = left[i]; end
      if (n % 10 == 0) for (int i = 0; i < 8; i++) begin top[i] = 8'hff; t[i] = 255; end
      corner = 8'($urandom);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (!valid || row != 2'(r)) begin failures++; $display("timing: row %0d valid %0d", row, valid); end
        for (int c = 0; c < 4; c++) begin
          int e;
          e = i4_ref(int'(mode), t, l, int'(corner), ta, la, c, r);
          checks++;
          if (int'(pix[c]) != e) begin
            failures++;
            $display("mode %0d (%0d,%0d): got %0d want %0d", mode, c, r, pix[c], e);
          end
        end
        @(negedge clk);
      end
      checks++;
      if (valid) begin failures++; $display("valid after row 3"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// intra4x4_pred: H.264 Intra_4x4 prediction generator, one row per cycle.
//
// Predicts a 4x4 luma block from its 13 neighbours: A..H above (T0..T7,
// T4..T7 being the above-right samples, already replaced by T3 upstream
// when unavailable), I..L on the left (L0..L3) and the corner M.  All nine
// modes are produced by the four-lane base-mode predictor: for each pixel
// an operand selector picks three neighbours, in the order of a line of
// edge samples L3 L2 L1 L0 M T0 .. T7, so every mode has four pixels per
// cycle.  DC is the mean of the available top and left samples (128 when
// neither is available) from a separate adder.
//
// Interface: start loads the neighbours and the mode; rows 0..3 then come
// out on pred_row/pred_pix with pred_valid in the next four cycles.  A new
// start is accepted when busy is low.
module intra4x4_pred
  import svc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  i4_mode_e     mode,
  input  pixel_t [7:0] top,        // T0..T7 (A..H)
  input  pixel_t [3:0] left,       // L0..L3 (I..L)
  input  pixel_t       corner,     // M
  input  logic         top_avail,
  input  logic         left_avail,
  output logic         busy,
  output logic         pred_valid,
  output logic [1:0]   pred_row,
  output pixel_t [3:0] pred_pix
);
  // edge line: index 0..3 = L3..L0, 4 = M, 5..12 = T0..T7
  pixel_t   edge_q [13];
  i4_mode_e mode_q;
  logic     ta_q, la_q;
  logic     active;
  logic [1:0] row;

  typedef struct packed {
    logic [3:0] ix;
    logic [3:0] iz;
    logic [3:0] iy;
  } opsel_t;

  // edge index of sample e, e = -4..8 (L3..L0 = -4..-1, M = 0, T0..T7 = 1..8)
  function automatic logic [3:0] ei(int e);
    return 4'(e + 4);
  endfunction

  function automatic opsel_t tap3(int a, int b, int c);
    return '{ix: ei(a), iz: ei(b), iy: ei(c)};
  endfunction

  function automatic opsel_t avg2(int a, int b);
    return '{ix: ei(a), iz: ei(b), iy: ei(a)};
  endfunction

  function automatic opsel_t sel(i4_mode_e m, int x, int y);
    int z;
    unique case (m)
      I4_V:   return tap3(x + 1, x + 1, x + 1);
      I4_H:   return tap3(-(y + 1), -(y + 1), -(y + 1));
      I4_DDL: if (x == 3 && y == 3) return tap3(7, 8, 8);
              else return tap3(x + y + 1, x + y + 2, x + y + 3);
      I4_DDR: return tap3(x - y - 1, x - y, x - y + 1);
      I4_VR: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0) return avg2(x - (y >> 1), x - (y >> 1) + 1);
        else if (z > 0)           return tap3(x - (y >> 1) - 1, x - (y >> 1), x - (y >> 1) + 1);
        else if (z == -1)         return tap3(-1, 0, 1);
        else                      return tap3(-y, -(y - 1), -(y - 2));
      end
      I4_HD: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0) return avg2(-(y - (x >> 1)), -(y - (x >> 1) + 1));
        else if (z > 0)           return tap3(-(y - (x >> 1) - 1), -(y - (x >> 1)), -(y - (x >> 1) + 1));
        else if (z == -1)         return tap3(-1, 0, 1);
        else                      return tap3(x, x - 1, x - 2);
      end
      I4_VL:  if (y % 2 == 0) return avg2(x + (y >> 1) + 1, x + (y >> 1) + 2);
              else return tap3(x + (y >> 1) + 1, x + (y >> 1) + 2, x + (y >> 1) + 3);
      I4_HU: begin
        z = x + 2 * y;
        if (z == 0 || z == 2 || z == 4) return avg2(-(y + (x >> 1) + 1), -(y + (x >> 1) + 2));
        else if (z == 1 || z == 3)      return tap3(-(y + (x >> 1) + 1), -(y + (x >> 1) + 2), -(y + (x >> 1) + 3));
        else if (z == 5)                return tap3(-3, -4, -4);
        else                            return tap3(-4, -4, -4);
      end
      default: return tap3(0, 0, 0);   // DC: not used
    endcase
  endfunction

  pixel_t [3:0] op_x, op_z, op_y, lane_out;
  pixel_t       dc;
  logic [10:0]  sum_t, sum_l;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      opsel_t s;
      s = sel(mode_q, c, int'(row));
      op_x[c] = edge_q[s.ix];
      op_z[c] = edge_q[s.iz];
      op_y[c] = edge_q[s.iy];
    end
  end

  base_mode_pred #(.LANES(4)) u_bmp (.op_x, .op_z, .op_y, .pred(lane_out));

  always_comb begin
    sum_t = 11'(edge_q[5]) + 11'(edge_q[6]) + 11'(edge_q[7]) + 11'(edge_q[8]);
    sum_l = 11'(edge_q[0]) + 11'(edge_q[1]) + 11'(edge_q[2]) + 11'(edge_q[3]);
    unique case ({ta_q, la_q})
      2'b11:   dc = 8'((sum_t + sum_l + 11'd4) >> 3);
      2'b10:   dc = 8'((sum_t + 11'd2) >> 2);
      2'b01:   dc = 8'((sum_l + 11'd2) >> 2);
      default: dc = 8'd128;
    endcase
    for (int c = 0; c < 4; c++) pred_pix[c] = (mode_q == I4_DC) ? dc : lane_out[c];
    pred_valid = active;
    pred_row   = row;
    busy       = active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      row    <= '0;
      mode_q <= I4_DC;
      ta_q   <= 1'b0;
      la_q   <= 1'b0;
      for (int i = 0; i < 13; i++) edge_q[i] <= '0;
    end else if (start && !active) begin
      active <= 1'b1;
      row    <= '0;
      mode_q <= mode;
      ta_q   <= top_avail;
      la_q   <= left_avail;
      for (int i = 0; i < 4; i++) edge_q[i] <= left[3 - i];
      edge_q[4] <= corner;
      for (int i = 0; i < 8; i++) edge_q[5 + i] <= top[i];
    end else if (active) begin
      row <= row + 2'd1;
      if (row == 2'd3) active <= 1'b0;
    end
  end
endmodule

// intra8x8_pred: H.264 high-profile luma Intra_8x8 prediction generator
// with the reference sample filtering (RSFP) embedded.
//
// Neighbours in: p[0..15,-1] above and above-right (the above-right half
// already replaced by p[7,-1] upstream when unavailable), p[-1,0..7] on the
// left and the corner p[-1,-1].  Before an 8x8 block is predicted its
// neighbours are low-pass filtered; the filter has the same form as the
// directional predictors, (x + 2z + y + 2) >> 2, so the four base-mode lanes
// do both jobs:
//   FILT: only the filtered neighbours the mode uses are made, four per
//         cycle, and written into a 17-entry filtered-pixel buffer
//         (136 bits).  Per mode: V 8, H 8, DC 0/8/16, diagonal down-left 16,
//         diagonal down-right / vertical-right / horizontal-down 17,
//         vertical-left 16, horizontal-up 8; the FILT phase lasts
//         ceil(M/4) cycles.
//   PRED: the neighbour distribution maps buffer entries back to edge
//         positions for the mode, and the lanes give four predicted pixels
//         per cycle, two cycles per row.
// Buffer layout (this design's choice): for the modes that use left, corner
// and top, entry i is edge position i-8 (p[-1,7]..p[-1,0], corner,
// p[0..7,-1]); for V, diagonal down-left and vertical-left entry i is
// p[i,-1]; for H and horizontal-up entry i is p[-1,i]; for DC entries 0..7
// are the top and 8..15 the left samples.
//
// Filtered-pixel reuse between the two 8x8 blocks of one macroblock half:
// the first (or third) block in diagonal down-left or vertical-left mode
// leaves the filtered p'[8..13,-1] in buffer entries 8..13.  If the block
// that follows is the second (or fourth) of the same macroblock and uses the
// filtered top row (V, DC with top, modes 3..7), its p'[0..5,-1] are the
// same six values (N = 6): they are moved inside the buffer at start and
// only M - 6 neighbours are filtered, ceil((M-6)/4) cycles.  This relies on
// the caller giving the second block the neighbours it shares with the first
// (top[0..7] = first top[8..15], corner = first top[7]), as a decoder does.
// The choice of which six pixels, and the in-buffer move, are this design's.
//
// Timing: start is taken when busy is low.  FILT takes ceil(M/4) cycles
// (ceil((M-6)/4) with reuse, reported on reusing), then 16 cycles with
// pred_valid, pred_row (0..7) and pred_half (columns 0..3 or 4..7).
module intra8x8_pred
  import svc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  i4_mode_e      mode,          // the nine Intra_8x8 modes use the Intra_4x4 numbering
  input  pixel_t [15:0] top,           // p[0..15,-1]
  input  pixel_t [7:0]  left,          // p[-1,0..7]
  input  pixel_t        corner,        // p[-1,-1]
  input  logic          top_avail,
  input  logic          left_avail,
  input  logic          corner_avail,
  input  logic [1:0]    blk_idx,       // 8x8 block number within the macroblock, raster order
  output logic          busy,
  output logic          reusing,       // this block reuses six filtered pixels of the previous one
  output logic          filtering,     // FILT phase
  output logic          pred_valid,
  output logic [2:0]    pred_row,
  output logic          pred_half,
  output pixel_t [3:0]  pred_pix
);
  typedef enum logic [1:0] {S_IDLE, S_FILT, S_PRED} state_e;
  typedef enum logic [1:0] {C_ALL, C_TOP, C_LEFT, C_DC} cls_e;

  typedef struct packed {
    logic signed [5:0] ex;
    logic signed [5:0] ez;
    logic signed [5:0] ey;
  } esel_t;

  state_e   state;
  i4_mode_e mode_q;
  cls_e     cls_q;
  logic     ta_q, la_q, ca_q;
  pixel_t   raw   [25];   // edge positions -8..16: index e+8
  pixel_t   fbuf  [17];   // filtered-pixel buffer
  logic [2:0] fcnt, nfilt;
  logic [4:0] fslot0;     // first buffer entry filtered
  logic [4:0] npix;       // neighbours to filter
  logic       reuse_q;    // current block reuses six filtered pixels
  logic       rsv_ok;     // the previous block left p'[8..13,-1] in entries 8..13
  logic [1:0] rsv_idx;    // and was this 8x8 block
  logic [2:0] row;
  logic       half;

  function automatic cls_e mode_cls(i4_mode_e m);
    unique case (m)
      I4_DDR, I4_VR, I4_HD: return C_ALL;
      I4_V, I4_DDL, I4_VL:  return C_TOP;
      I4_H, I4_HU:          return C_LEFT;
      default:              return C_DC;
    endcase
  endfunction

  // number of filtered neighbours the mode uses
  function automatic int unsigned n_needed(i4_mode_e m, logic ta, logic la);
    unique case (m)
      I4_V, I4_H, I4_HU:    return 8;
      I4_DDL, I4_VL:        return 16;
      I4_DDR, I4_VR, I4_HD: return 17;
      default:              return (ta ? 8 : 0) + (la ? 8 : 0);
    endcase
  endfunction

  // edge position of a buffer entry
  function automatic int slot_edge(cls_e c, int slot);
    unique case (c)
      C_ALL:   return slot - 8;
      C_TOP:   return slot + 1;
      C_LEFT:  return -(slot + 1);
      default: return slot < 8 ? slot + 1 : -(slot - 7);
    endcase
  endfunction

  // buffer entry of an edge position (the neighbour distribution)
  function automatic int edge_slot(cls_e c, int e);
    unique case (c)
      C_ALL:   return e + 8;
      C_TOP:   return e - 1;
      C_LEFT:  return -e - 1;
      default: return 0;          // DC reads the buffer through its sums
    endcase
  endfunction

  function automatic esel_t t3(int a, int b, int c);
    return '{ex: 6'(a), ez: 6'(b), ey: 6'(c)};
  endfunction

  // reference sample filter taps of edge position e
  function automatic esel_t filt_sel(int e, logic ta, logic la, logic ca);
    if (e == 16)              return t3(15, 16, 16);
    if (e == -8)              return t3(-7, -8, -8);
    if (e == 1 && !ca)        return t3(1, 1, 2);
    if (e == -1 && !ca)       return t3(-1, -1, -2);
    if (e == 0 && !(ta && la)) return ta ? t3(0, 0, 1) : t3(0, 0, -1);
    return t3(e - 1, e, e + 1);
  endfunction

  function automatic esel_t avg2(int a, int b);
    return t3(a, b, a);
  endfunction

  // prediction taps of pixel (x,y) as edge positions
  function automatic esel_t pred_taps(i4_mode_e m, int x, int y);
    int z;
    unique case (m)
      I4_V:   return t3(x + 1, x + 1, x + 1);
      I4_H:   return t3(-(y + 1), -(y + 1), -(y + 1));
      I4_DDL: if (x == 7 && y == 7) return t3(15, 16, 16);
              else return t3(x + y + 1, x + y + 2, x + y + 3);
      I4_DDR: return t3(x - y - 1, x - y, x - y + 1);
      I4_VR: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0) return avg2(x - (y >> 1), x - (y >> 1) + 1);
        else if (z > 0)           return t3(x - (y >> 1) - 1, x - (y >> 1), x - (y >> 1) + 1);
        else if (z == -1)         return t3(-1, 0, 1);
        else                      return t3(-(y - 2 * x), -(y - 2 * x - 1), -(y - 2 * x - 2));
      end
      I4_HD: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0) return avg2(-(y - (x >> 1)), -(y - (x >> 1) + 1));
        else if (z > 0)           return t3(-(y - (x >> 1) - 1), -(y - (x >> 1)), -(y - (x >> 1) + 1));
        else if (z == -1)         return t3(-1, 0, 1);
        else                      return t3(x - 2 * y, x - 2 * y - 1, x - 2 * y - 2);
      end
      I4_VL:  if (y % 2 == 0) return avg2(x + (y >> 1) + 1, x + (y >> 1) + 2);
              else return t3(x + (y >> 1) + 1, x + (y >> 1) + 2, x + (y >> 1) + 3);
      I4_HU: begin
        z = x + 2 * y;
        if (z < 13 && z % 2 == 0) return avg2(-(y + (x >> 1) + 1), -(y + (x >> 1) + 2));
        else if (z < 13)          return t3(-(y + (x >> 1) + 1), -(y + (x >> 1) + 2), -(y + (x >> 1) + 3));
        else if (z == 13)         return t3(-7, -8, -8);
        else                      return t3(-8, -8, -8);
      end
      default: return t3(1, 1, 1);   // DC: not used
    endcase
  endfunction

  // ------------------------------------------------------- lane operands
  pixel_t [3:0] op_x, op_z, op_y, lane_out;
  logic   [3:0] fwr;          // lane result is a filtered entry to write
  logic   [4:0] fslot [4];

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      esel_t s;
      int    slot;
      slot     = int'(fslot0) + 4 * int'(fcnt) + l;
      fwr[l]   = (state == S_FILT) && (slot < int'(fslot0) + int'(npix));
      // with reuse, entries 9..14 of the all-neighbour layout are already there
      if (reuse_q && cls_q == C_ALL && slot >= 9) slot += 6;
      fslot[l] = 5'(slot);
      if (state == S_FILT) begin
        s = filt_sel(slot_edge(cls_q, slot), ta_q, la_q, ca_q);
        op_x[l] = raw[5'(int'(s.ex) + 8)];
        op_z[l] = raw[5'(int'(s.ez) + 8)];
        op_y[l] = raw[5'(int'(s.ey) + 8)];
      end else begin
        s = pred_taps(mode_q, 4 * int'(half) + l, int'(row));
        op_x[l] = fbuf[5'(edge_slot(cls_q, int'(s.ex)))];
        op_z[l] = fbuf[5'(edge_slot(cls_q, int'(s.ez)))];
        op_y[l] = fbuf[5'(edge_slot(cls_q, int'(s.ey)))];
      end
    end
  end

  base_mode_pred #(.LANES(4)) u_bmp (.op_x, .op_z, .op_y, .pred(lane_out));

  // ------------------------------------------------------------------ DC
  pixel_t      dc;
  logic [11:0] sum_t, sum_l;

  always_comb begin
    sum_t = '0;
    sum_l = '0;
    for (int i = 0; i < 8; i++) begin
      sum_t += 12'(fbuf[i]);
      sum_l += 12'(fbuf[8 + i]);
    end
    unique case ({ta_q, la_q})
      2'b11:   dc = 8'((sum_t + sum_l + 12'd8) >> 4);
      2'b10:   dc = 8'((sum_t + 12'd4) >> 3);
      2'b01:   dc = 8'((sum_l + 12'd4) >> 3);
      default: dc = 8'd128;
    endcase
    for (int l = 0; l < 4; l++) pred_pix[l] = (mode_q == I4_DC) ? dc : lane_out[l];
    busy       = (state != S_IDLE);
    filtering  = (state == S_FILT);
    pred_valid = (state == S_PRED);
    pred_row   = row;
    pred_half  = half;
  end

  // ------------------------------------------------------------- control
  int unsigned m_in, n_in;
  logic        reuse_in;
  always_comb begin
    // the block after a DDL/VL first/third block, using the filtered top row
    reuse_in = rsv_ok && blk_idx[0] && blk_idx == rsv_idx + 2'd1 && top_avail && corner_avail
               && (mode == I4_V || mode == I4_DC || (mode >= I4_DDL && mode <= I4_VL));
    m_in = n_needed(mode, top_avail, left_avail);
    n_in = reuse_in ? m_in - 6 : m_in;
  end
  assign reusing = reuse_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      mode_q <= I4_DC;
      cls_q  <= C_DC;
      ta_q   <= 1'b0;
      la_q   <= 1'b0;
      ca_q   <= 1'b0;
      fcnt   <= '0;
      nfilt  <= '0;
      fslot0 <= '0;
      npix   <= '0;
      reuse_q <= 1'b0;
      rsv_ok <= 1'b0;
      rsv_idx <= '0;
      row    <= '0;
      half   <= 1'b0;
      for (int i = 0; i < 25; i++) raw[i] <= '0;
      for (int i = 0; i < 17; i++) fbuf[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          mode_q <= mode;
          cls_q  <= mode_cls(mode);
          ta_q   <= top_avail;
          la_q   <= left_avail;
          ca_q   <= corner_avail;
          for (int i = 0; i < 8; i++)  raw[i] <= left[7 - i];
          raw[8] <= corner;
          for (int i = 0; i < 16; i++) raw[9 + i] <= top[i];
          fcnt    <= '0;
          nfilt   <= 3'((n_in + 3) / 4);
          npix    <= 5'(n_in);
          reuse_q <= reuse_in;
          if (reuse_in) begin
            // p'[0..5,-1] of this block are p'[8..13,-1] of the previous one
            for (int i = 0; i < 6; i++)
              fbuf[mode_cls(mode) == C_ALL ? 9 + i : i] <= fbuf[8 + i];
            fslot0 <= mode_cls(mode) == C_ALL ? 5'd0 : 5'd6;
          end else begin
            fslot0 <= (mode == I4_DC && !top_avail) ? 5'd8 : 5'd0;
          end
          rsv_ok  <= !blk_idx[0] && (mode == I4_DDL || mode == I4_VL);
          rsv_idx <= blk_idx;
          row     <= '0;
          half    <= 1'b0;
          state   <= (m_in == 0) ? S_PRED : S_FILT;
        end
        S_FILT: begin
          for (int l = 0; l < 4; l++)
            if (fwr[l]) fbuf[fslot[l]] <= lane_out[l];
          fcnt <= fcnt + 3'd1;
          if (fcnt + 3'd1 == nfilt) state <= S_PRED;
        end
        S_PRED: begin
          half <= ~half;
          if (half) begin
            row <= row + 3'd1;
            if (row == 3'd7) state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

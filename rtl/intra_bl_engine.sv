// intra_bl_engine: Intra_BL (inter-layer intra) prediction engine.
//
// Upsamples reconstructed reference-layer pixels into the prediction of one
// 4x4 enhancement-layer block.  The reference region, REGION_W x REGION_H
// pixels (default 32 x 12), is held in the banked SRAM in two halves of
// 16 columns.  It is written through the fill port in logical coordinates
// (half, row, two-pixel word).  When a macroblock is done, swap_half makes
// the right half the new left half without moving data, and only the new
// right half has to be fetched from external memory.
// For each block the caller gives, per output column, the region column of
// tap e[0] and the filter phase (xref/xphase), and per basic row the region
// row of tap e[0] and the phase (yref/yphase); these follow from the SVC
// resampling position derivation, which is outside this engine.
//
// Flow (one block):
//   1. HPASS: every needed reference row is read from the banked SRAM, one
//      8-pixel window (one word from each bank) per cycle, and filtered by
//      the two basic horizontal interpolators at two output columns.  The
//      raw sums go into the V_BHI register set (one row of 4 values per two
//      cycles).
//   2. VPASS: the two basic vertical interpolators filter V_BHI columns,
//      two outputs per cycle, round with (sum + 512) >> 10, clip to 8 bits
//      and store into the V_BI register set.
//   3. OUT: one row of 4 pixels per cycle.  For the picture-type
//      combinations frame-MBAFF, MBAFF-frame and PAFF-frame the four
//      extended vertical interpolators filter 4 adjacent V_BI rows
//      (basic rows 0..6 are computed, at positions -1..5); otherwise V_BI
//      rows 1..4 are sent out directly.
// The basic interpolators take the equality bypass when their taps are
// equal; h_eq/v_eq report it for each interpolator and cycle.
//
// Reuse for the block below: V_BHI has one entry per region row and keeps
// it, tagged valid, for as long as the column command (xref, xphase,
// chroma) stays the same.  When the next block is the one below, the rows
// it shares with the block above are not read or filtered again: the
// horizontal pass starts at the first row not held.  Likewise V_BI keeps
// the basic rows of the last block with their (yref, yphase); a new block
// copies any basic row it needs at the same position and phase (with the
// extended step, rows -1..1 of a block are rows 3..5 of the block above)
// and the vertical pass only does the others.  h_reuse / v_reuse report
// this for the block.  Any write to the SRAM or half swap drops the tags.
// Which rows are kept and how they are tagged is this design's choice.
//
// Register sets are written only in the cycles that update them (write
// enables standing in for gated clocks).  The H_ST and H_BI sets, which
// carry values from one block to its right-hand neighbour, are not part of
// this engine: blocks side by side share nothing.
//
// Timing: start is taken in IDLE; busy stays high until the last output row.
// Cycles from start to the last out_valid: 2*NH + 1 + 2*NV + 4, where NH is
// the number of region rows filtered horizontally (yref[last]-yref[first]+4
// without reuse) and NV the basic rows filtered vertically (4, or 7 with the
// extended step, without reuse).  A 2:1 frame-frame block takes 23 cycles,
// the block below it 17.  The fill port and swap_half must be idle while
// busy.
//
// Rules on the inputs (checked by assertions): xref and yref non-decreasing,
// all taps inside the region, the taps of the output pair (0,1) and of the
// pair (2,3) inside one 8-pixel window starting at an even column.
module intra_bl_engine
  import svc_pkg::*;
#(
  parameter int unsigned REGION_W = 32,
  parameter int unsigned REGION_H = 12,
  parameter int unsigned NBANKS   = 4,
  parameter int unsigned CW       = $clog2(REGION_W),
  parameter int unsigned RW       = $clog2(REGION_H),
  parameter int unsigned HWW      = $clog2(REGION_W / 4)    // word index within a half
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // reference-layer pixel fill
  input  logic                 wr_en,
  input  logic                 wr_half,     // logical half: 0 left, 1 right
  input  logic [RW-1:0]        wr_row,
  input  logic [HWW-1:0]       wr_word,     // two-pixel word within the half
  input  logic [15:0]          wr_data,     // [7:0] even column, [15:8] odd column
  input  logic                 swap_half,   // right half becomes the left half
  output logic                 left_half,   // physical half now holding the left half
  // block command
  input  logic                 start,
  input  il_type_e             il_type,
  input  logic                 chroma,
  input  logic [3:0][CW-1:0]   xref,
  input  logic [3:0][3:0]      xphase,
  input  logic [6:0][RW-1:0]   yref,
  input  logic [6:0][3:0]      yphase,
  // prediction out
  output logic                 busy,
  output logic                 out_valid,
  output logic [1:0]           out_row,
  output pixel_t [3:0]         out_pix,
  output logic                 done,        // one cycle, with the last row
  output logic [1:0]           h_eq,        // equality bypass, horizontal pass
  output logic [1:0]           v_eq,        // equality bypass, vertical pass
  output logic                 h_reuse,     // this block reuses V_BHI rows of the block before
  output logic                 v_reuse      // this block reuses V_BI rows of the block before
);
  localparam int unsigned HALF_W     = REGION_W / 2;
  localparam int unsigned WPR        = HALF_W / (2 * NBANKS);  // words per bank per row and half
  localparam int unsigned HALF_DEPTH = REGION_H * WPR;
  localparam int unsigned DEPTH      = 2 * HALF_DEPTH;
  localparam int unsigned AW         = $clog2(DEPTH);
  localparam int unsigned BW         = $clog2(NBANKS);
  localparam int unsigned HWPB       = $clog2(NBANKS);        // bits of the bank in a word index

  // physical SRAM address of logical word w (0..REGION_W/2-1) of region row r
  function automatic logic [AW-1:0] word_addr(logic [CW-2:0] w, logic [RW-1:0] r, logic lh);
    logic ph;
    logic [HWW-1:0] wh;
    ph = w[CW-2] ^ lh;
    wh = w[HWW-1:0];
    return AW'(ph) * AW'(HALF_DEPTH) + AW'(r) * AW'(WPR) + AW'(wh >> HWPB);
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_HPASS, S_HDRAIN, S_VPASS, S_OUT} state_e;
  state_e state;

  // latched command
  logic               ext_q, chroma_q;
  logic [3:0][CW-1:0] xref_q;
  logic [3:0][3:0]    xphase_q;
  logic [6:0][RW-1:0] yref_q;
  logic [6:0][3:0]    yphase_q;
  logic [RW-1:0]      rlast_q;     // last region row needed
  logic [2:0]         jfirst_q, jlast_q;
  logic [6:0]         vneed_q;     // basic rows still to interpolate vertically

  // reuse bookkeeping: V_BHI holds one entry per region row, valid for the
  // column command (xref, xphase, chroma) it was made with; V_BI entry j is
  // valid for the (yref, yphase) of the block that made it
  logic [REGION_H-1:0] bhi_ok;
  logic [6:0]          bi_ok;

  // counters
  logic [RW-1:0] hrow;       // region row being read
  logic        hhalf;
  logic [2:0]  vj;
  logic        vhalf;
  logic [1:0]  orow;

  // register sets
  hsum_t  v_bhi [REGION_H][4];   // indexed by region row
  pixel_t v_bi  [7][4];          // indexed by basic row

  // ---------------------------------------------------------------- SRAM
  logic [NBANKS-1:0]         rd_en;
  logic [NBANKS-1:0][AW-1:0] rd_addr;
  logic [NBANKS-1:0][15:0]   rd_data;

  logic [BW-1:0] wr_bank;
  logic [AW-1:0] wr_addr;

  always_comb begin
    wr_bank = wr_word[BW-1:0];
    wr_addr = word_addr({wr_half, wr_word}, wr_row, left_half);
  end

  banked_sram #(.NBANKS(NBANKS), .DEPTH(DEPTH), .WIDTH(16)) u_sram (
    .clk, .wr_en, .wr_bank, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  // half update: after a macroblock the right half is kept as the new left
  // half and the old left half is refilled as the new right half
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         left_half <= 1'b0;
    else if (swap_half) left_half <= ~left_half;
  end

  // window start word for the pair being read
  logic [CW-1:0] win_col;      // even column of the window
  logic [CW-2:0] win_word;
  logic [RW-1:0] rd_row;

  always_comb begin
    win_col  = (xref_q[{hhalf, 1'b0}] - CW'(1)) & ~CW'(1);
    win_word = win_col[CW-1:1];
    rd_row   = hrow;
    rd_en    = '0;
    rd_addr  = '0;
    for (int b = 0; b < NBANKS; b++) begin
      logic [CW-2:0] w;
      logic [BW-1:0] off;
      // the word of this window that falls into bank b
      off = BW'(b) - win_word[BW-1:0];
      w   = win_word + (CW-1)'(off);
      rd_en[b]   = (state == S_HPASS);
      rd_addr[b] = word_addr(w, rd_row, left_half);
    end
  end

  // ------------------------------------------------ horizontal interpolation
  logic          hv_q;        // read data valid this cycle
  logic [RW-1:0] hrow_q;
  logic          hhalf_q;
  logic [CW-1:0] hcol_q;      // window start column of the data
  pixel_t        win [8];
  hsum_t         h_out [2];

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      logic [CW-2:0] w;
      logic [BW-1:0] b;
      w = hcol_q[CW-1:1] + (CW-1)'(k / 2);
      b = w[BW-1:0];
      win[k] = (k % 2 == 0) ? rd_data[b][7:0] : rd_data[b][15:8];
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_hint
    logic [CW-1:0] k0;
    logic signed [8:0] t [4];
    always_comb begin
      k0 = xref_q[{hhalf_q, 1'(i)}] - CW'(1) - hcol_q;
      for (int k = 0; k < 4; k++) t[k] = $signed({1'b0, win[3'(k0) + 3'(k)]});
    end
    basic_interp #(.IW(9)) u_h (
      .chroma(chroma_q), .phase_idx(xphase_q[{hhalf_q, 1'(i)}]),
      .ref1(t[0]), .ref2(t[1]), .ref3(t[2]), .ref4(t[3]),
      .pred_out(h_out[i]), .eq(h_eq[i]));
  end

  // -------------------------------------------------- vertical interpolation
  pixel_t v_pix [2];

  for (genvar i = 0; i < 2; i++) begin : g_vint
    logic [RW-1:0] r0;
    vsum_t         v_sum;
    vsum_t         v_rnd;
    hsum_t         t [4];
    always_comb begin
      r0 = yref_q[vj] - RW'(1);
      for (int k = 0; k < 4; k++) t[k] = v_bhi[r0 + RW'(k)][{vhalf, 1'(i)}];
    end
    basic_interp #(.IW(HW)) u_v (
      .chroma(chroma_q), .phase_idx(yphase_q[vj]),
      .ref1(t[0]), .ref2(t[1]), .ref3(t[2]), .ref4(t[3]),
      .pred_out(v_sum), .eq(v_eq[i]));
    always_comb begin
      v_rnd = (v_sum + vsum_t'(512)) >>> 10;
      if (v_rnd < 0)        v_pix[i] = 8'd0;
      else if (v_rnd > 255) v_pix[i] = 8'd255;
      else                  v_pix[i] = v_rnd[7:0];
    end
  end

  // ------------------------------------------- extended vertical / output
  pixel_t ext_pix [4];

  for (genvar c = 0; c < 4; c++) begin : g_ext
    ext_v_interp u_e (
      .chroma(chroma_q),
      .v_a(v_bi[3'(orow)][c]),     .v_b(v_bi[3'(orow) + 3'd1][c]),
      .v_c(v_bi[3'(orow) + 3'd2][c]), .v_d(v_bi[3'(orow) + 3'd3][c]),
      .pred_out(ext_pix[c]));
  end

  always_comb begin
    for (int c = 0; c < 4; c++)
      out_pix[c] = ext_q ? ext_pix[c] : v_bi[3'(orow) + 3'd1][c];
    out_valid = (state == S_OUT);
    out_row   = orow;
    done      = (state == S_OUT) && (orow == 2'd3);
    busy      = (state != S_IDLE);
  end

  // ------------------------------------------------------------ control
  logic           ext_in;
  logic [2:0]     jf_in, jl_in;
  logic           same_cols;           // column command unchanged since the last block
  logic [RW-1:0]  rfirst_in, rlast_in; // region rows the block needs
  logic [RW-1:0]  rstart_in;           // first of them not held in V_BHI
  logic           hskip_in;            // all of them held
  logic [6:0]     vneed_in;            // basic rows not held in V_BI
  logic [6:0][2:0] vsrc_in;            // V_BI entry that holds basic row j
  logic           hreuse_in, vreuse_in;

  always_comb begin
    ext_in    = il_needs_ext(il_type);
    jf_in     = ext_in ? 3'd0 : 3'd1;
    jl_in     = ext_in ? 3'd6 : 3'd4;
    same_cols = (chroma == chroma_q) && (xref == xref_q) && (xphase == xphase_q);
    rfirst_in = yref[jf_in] - RW'(1);
    rlast_in  = yref[jl_in] + RW'(2);
    // V_BHI rows of the block above are a prefix of the rows needed: the
    // horizontal pass starts at the first row not held
    rstart_in = rfirst_in;
    hskip_in  = 1'b1;
    for (int r = int'(REGION_H) - 1; r >= 0; r--)
      if (r >= int'(rfirst_in) && r <= int'(rlast_in) && !(same_cols && bhi_ok[r])) begin
        rstart_in = RW'(r);
        hskip_in  = 1'b0;
      end
    // V_BI rows made by the block above at the same position and phase
    vneed_in = '0;
    vsrc_in  = '0;
    for (int j = 0; j < 7; j++) begin
      logic hit;
      hit = 1'b0;
      for (int k = 6; k >= 0; k--)
        if (same_cols && bi_ok[k] && yref_q[k] == yref[j] && yphase_q[k] == yphase[j]) begin
          hit = 1'b1;
          vsrc_in[j] = 3'(k);
        end
      vneed_in[j] = (j >= int'(jf_in)) && (j <= int'(jl_in)) && !hit;
    end
    hreuse_in = rstart_in != rfirst_in || hskip_in;
    vreuse_in = vneed_in != ((7'h7f >> (6 - jl_in)) & (7'h7f << jf_in));
  end

  // lowest basic row still needed above j, 7 when none
  function automatic logic [2:0] next_need(logic [6:0] need, logic [2:0] j, logic incl);
    logic [2:0] n;
    n = 3'd7;
    for (int k = 6; k >= 0; k--)
      if (need[k] && (k > int'(j) || (incl && k == int'(j)))) n = 3'(k);
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ext_q    <= 1'b0;
      chroma_q <= 1'b0;
      xref_q   <= '0;
      xphase_q <= '0;
      yref_q   <= '0;
      yphase_q <= '0;
      rlast_q  <= '0;
      jfirst_q <= '0;
      jlast_q  <= '0;
      vneed_q  <= '0;
      bhi_ok   <= '0;
      bi_ok    <= '0;
      h_reuse  <= 1'b0;
      v_reuse  <= 1'b0;
      hrow     <= '0;
      hhalf    <= 1'b0;
      vj       <= '0;
      vhalf    <= 1'b0;
      orow     <= '0;
      hv_q     <= 1'b0;
      hrow_q   <= '0;
      hhalf_q  <= 1'b0;
      hcol_q   <= '0;
    end else begin
      hv_q    <= (state == S_HPASS);
      hrow_q  <= hrow;
      hhalf_q <= hhalf;
      hcol_q  <= win_col;
      if (hv_q && hhalf_q) bhi_ok[hrow_q] <= 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          ext_q    <= ext_in;
          chroma_q <= chroma;
          xref_q   <= xref;
          xphase_q <= xphase;
          yref_q   <= yref;
          yphase_q <= yphase;
          rlast_q  <= rlast_in;
          jfirst_q <= jf_in;
          jlast_q  <= jl_in;
          vneed_q  <= vneed_in;
          h_reuse  <= hreuse_in;
          v_reuse  <= vreuse_in;
          if (!same_cols) bhi_ok <= '0;
          // V_BI entries reused by this block are kept, the others rewritten
          for (int j = 0; j < 7; j++) bi_ok[j] <= !vneed_in[j] && j >= int'(jf_in) && j <= int'(jl_in);
          hrow     <= rstart_in;
          hhalf    <= 1'b0;
          state    <= hskip_in ? S_HDRAIN : S_HPASS;
        end
        S_HPASS: begin
          hhalf <= ~hhalf;
          if (hhalf) begin
            hrow <= hrow + 1'b1;
            if (hrow == rlast_q) state <= S_HDRAIN;
          end
        end
        S_HDRAIN: begin
          vj    <= next_need(vneed_q, 3'd0, 1'b1);
          vhalf <= 1'b0;
          orow  <= '0;
          state <= (vneed_q == '0) ? S_OUT : S_VPASS;
        end
        S_VPASS: begin
          vhalf <= ~vhalf;
          if (vhalf) begin
            bi_ok[vj] <= 1'b1;
            vj <= next_need(vneed_q, vj, 1'b0);
            if (next_need(vneed_q, vj, 1'b0) == 3'd7) begin
              orow  <= '0;
              state <= S_OUT;
            end
          end
        end
        S_OUT: begin
          orow <= orow + 2'd1;
          if (orow == 2'd3) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      // new reference pixels make every held value stale
      if (wr_en || swap_half) begin
        bhi_ok <= '0;
        bi_ok  <= '0;
      end
    end
  end

  // V_BHI: written by the horizontal pass, one pair per cycle
  always_ff @(posedge clk) begin
    if (hv_q) begin
      v_bhi[RW'(hrow_q)][{hhalf_q, 1'b0}] <= h_out[0];
      v_bhi[RW'(hrow_q)][{hhalf_q, 1'b1}] <= h_out[1];
    end
  end

  // V_BI: written by the vertical pass, one pair per cycle
  always_ff @(posedge clk) begin
    if (state == S_IDLE && start)
      for (int j = 0; j < 7; j++)
        if (!vneed_in[j]) v_bi[j] <= v_bi[vsrc_in[j]];
    if (state == S_VPASS) begin
      v_bi[vj][{vhalf, 1'b0}] <= v_pix[0];
      v_bi[vj][{vhalf, 1'b1}] <= v_pix[1];
    end
  end

  // ------------------------------------------------------------ rules
  property p_cmd_ok;
    @(posedge clk) disable iff (!rst_n)
      (state == S_IDLE && start) |->
        (yref[jf_in] >= RW'(1)) && (32'(yref[jl_in]) + 2 < REGION_H) &&
        (xref[0] >= CW'(1)) && (32'(xref[3]) + 2 < REGION_W);
  endproperty
  a_cmd_ok: assert property (p_cmd_ok);

  a_window: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_HPASS |->
      32'(xref_q[{hhalf, 1'b1}]) + 2 - 32'(win_col) <= 7);

  a_no_fill_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(wr_en || swap_half));
endmodule

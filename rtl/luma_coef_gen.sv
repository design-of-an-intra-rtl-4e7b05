// luma_coef_gen: luma 4-tap coefficient generator of the basic interpolator.
//
// The SVC luma filter table has 16 phases.  Phase 16-p holds the same
// weights as phase p with the taps mirrored (e[-1]<->e[2], e[0]<->e[1]), so
// only phases 0..8 are stored.  For phase_idx[3]=1 the folded index is the
// two's complement of phase_idx[2:0]; phase 8 itself folds to index 0 and is
// therefore selected separately as the ninth entry.  The tap mirroring is
// done on the pixels, by the interpolator (see swap).  The two outer taps
// are negative in the table; this block gives their magnitudes, and the
// interpolator subtracts them at its last adder.
//
// Interface: phase_idx in; l_coef1/l_coef4 are the magnitudes of the outer
// taps (3 bits, at most 4), l_coef2/l_coef3 the inner taps (6 bits, at most
// 32), all for the folded phase; swap is high when the pixels have to be
// mirrored (phase 9..15).  Purely combinational.
module luma_coef_gen (
  input  logic [3:0] phase_idx,
  output logic [2:0] l_coef1,
  output logic [5:0] l_coef2,
  output logic [5:0] l_coef3,
  output logic [2:0] l_coef4,
  output logic       swap
);
  logic [2:0] fold;
  logic       mid;   // phase 8: the ninth stored set

  always_comb begin
    fold = phase_idx[3] ? (~phase_idx[2:0] + 3'd1) : phase_idx[2:0];
    mid  = phase_idx[3] && (phase_idx[2:0] == 3'd0);
    swap = phase_idx[3];

    if (mid) begin
      l_coef1 = 3'd3; l_coef2 = 6'd19; l_coef3 = 6'd19; l_coef4 = 3'd3;
    end else begin
      unique case (fold)
        3'd0: begin l_coef1 = 3'd0; l_coef2 = 6'd32; l_coef3 = 6'd0;  l_coef4 = 3'd0; end
        3'd1: begin l_coef1 = 3'd1; l_coef2 = 6'd32; l_coef3 = 6'd2;  l_coef4 = 3'd1; end
        3'd2: begin l_coef1 = 3'd2; l_coef2 = 6'd31; l_coef3 = 6'd4;  l_coef4 = 3'd1; end
        3'd3: begin l_coef1 = 3'd3; l_coef2 = 6'd30; l_coef3 = 6'd6;  l_coef4 = 3'd1; end
        3'd4: begin l_coef1 = 3'd3; l_coef2 = 6'd28; l_coef3 = 6'd8;  l_coef4 = 3'd1; end
        3'd5: begin l_coef1 = 3'd4; l_coef2 = 6'd26; l_coef3 = 6'd11; l_coef4 = 3'd1; end
        3'd6: begin l_coef1 = 3'd4; l_coef2 = 6'd24; l_coef3 = 6'd14; l_coef4 = 3'd2; end
        default: begin l_coef1 = 3'd3; l_coef2 = 6'd22; l_coef3 = 6'd16; l_coef4 = 3'd3; end
      endcase
    end
  end
endmodule

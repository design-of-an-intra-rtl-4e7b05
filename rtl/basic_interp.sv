// basic_interp: hybrid basic interpolator of the Intra_BL engine.
//
// Computes one output of the SVC upsampling filter from four reference
// values: the luma 4-tap poly-phase filter or, with chroma=1, the chroma
// bilinear filter, both selected by a 4-bit phase.  The same block serves
// the horizontal pass (8-bit pixels in) and the vertical pass (horizontal
// results in); IW sets the input width.
//
// Structure, without multipliers:
//   * coefficient generators give the weights of the folded phase
//     (luma_coef_gen, chr_coef_gen);
//   * pixel shifters form the scaled copies x<<0..x<<5 of the two inner taps
//     and x<<0..x<<2 of the two outer taps, after mirroring the taps for
//     luma phases 9..15;
//   * scaling engines add the copies picked by the coefficient bits; the
//     inner-tap engine needs four adders because a weight of 32 never has
//     another bit set, the outer-tap engine one adder because a weight of 4
//     never does;
//   * the positive (inner) and negative (outer) sums meet at one final
//     subtractor, so the wires before it stay narrow.
// Equality bypass: every weight set sums to 32, so when all used taps are
// equal (all four for luma, the two inner ones for chroma) the result is
// the tap shifted left by 5.  eq flags that case and the output is then taken
// from the shifter; in silicon this is where the adder tree can be held
// idle.
//
// Interface: ref1..ref4 are the taps e[-1], e[0], e[1], e[2]; the output is
// the raw weighted sum (no rounding), signed, IW+7 bits.  Combinational.
module basic_interp #(
  parameter int unsigned IW = 9          // signed input width (9 = 8-bit pixel plus sign)
) (
  input  logic                 chroma,   // 1: bilinear chroma filter, 0: 4-tap luma filter
  input  logic [3:0]           phase_idx,
  input  logic signed [IW-1:0] ref1,     // e[-1]
  input  logic signed [IW-1:0] ref2,     // e[0]
  input  logic signed [IW-1:0] ref3,     // e[1]
  input  logic signed [IW-1:0] ref4,     // e[2]
  output logic signed [IW+6:0] pred_out, // sum of weight*tap
  output logic                 eq        // equality bypass taken
);
  localparam int unsigned OW = IW + 7;
  typedef logic signed [OW-1:0] acc_t;

  logic [2:0] l_c1, l_c4;
  logic [5:0] l_c2, l_c3, c_c1, c_c2;
  logic       l_swap;

  luma_coef_gen u_lcoef (.phase_idx, .l_coef1(l_c1), .l_coef2(l_c2),
                         .l_coef3(l_c3), .l_coef4(l_c4), .swap(l_swap));
  chr_coef_gen  u_ccoef (.phase_idx, .c_coef1(c_c1), .c_coef2(c_c2));

  // Inner-tap scaling engine: weight up to 32 from the six shifted copies.
  function automatic acc_t scale6(logic signed [IW-1:0] x, logic [5:0] c);
    acc_t s;
    acc_t xx;
    xx = acc_t'(x);
    if (c[5]) s = xx <<< 5;
    else s = (c[0] ? xx : '0) + (c[1] ? xx <<< 1 : '0) + (c[2] ? xx <<< 2 : '0)
           + (c[3] ? xx <<< 3 : '0) + (c[4] ? xx <<< 4 : '0);
    return s;
  endfunction

  // Outer-tap scaling engine: weight up to 4 from three shifted copies.
  function automatic acc_t scale3(logic signed [IW-1:0] x, logic [2:0] c);
    acc_t xx;
    xx = acc_t'(x);
    if (c[2]) return xx <<< 2;
    return (c[0] ? xx : '0) + (c[1] ? xx <<< 1 : '0);
  endfunction

  logic signed [IW-1:0] s1, s2, s3, s4;    // taps after the pixel-shifter muxes
  logic [5:0] w2, w3;
  logic [2:0] w1, w4;
  acc_t pos, neg;

  always_comb begin
    // pixel-shifter input muxes: mirror the taps for luma phases 9..15
    if (!chroma && l_swap) begin
      s1 = ref4; s2 = ref3; s3 = ref2; s4 = ref1;
    end else begin
      s1 = ref1; s2 = ref2; s3 = ref3; s4 = ref4;
    end
    if (chroma) begin
      w1 = 3'd0; w2 = c_c2; w3 = c_c1; w4 = 3'd0;
    end else begin
      w1 = l_c1; w2 = l_c2; w3 = l_c3; w4 = l_c4;
    end

    pos = scale6(s2, w2) + scale6(s3, w3);
    neg = scale3(s1, w1) + scale3(s4, w4);

    eq = chroma ? (ref2 == ref3) : ((ref1 == ref2) && (ref2 == ref3) && (ref3 == ref4));
    pred_out = eq ? (acc_t'(ref2) <<< 5) : (pos - neg);
  end
endmodule

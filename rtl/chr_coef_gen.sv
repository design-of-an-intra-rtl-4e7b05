// chr_coef_gen: chroma (bilinear) coefficient generator of the basic
// interpolator.
//
// The chroma upsampling filter has two non-zero taps whose weights are
// 2*phase and 32-2*phase.  No table is stored: coef1 is phase_idx shifted
// left by one, and coef2 is the two's complement of phase_idx, taken modulo
// 16 with the carry kept (16 - phase_idx), shifted left by one.
//
// Interface: phase_idx (0..15) in, two 6-bit unsigned weights out.
// coef1 weights the tap at e[1] and coef2 the tap at e[0], following the
// phase table of the SVC chroma filter.  Purely combinational.
module chr_coef_gen (
  input  logic [3:0] phase_idx,
  output logic [5:0] c_coef1,   // 2*phase       (tap e[1])
  output logic [5:0] c_coef2    // 32 - 2*phase  (tap e[0])
);
  logic [4:0] neg_phase;

  always_comb begin
    neg_phase = 5'd16 - {1'b0, phase_idx};   // ~phase_idx + 1 with the carry into bit 4
    c_coef1   = {1'b0, phase_idx, 1'b0};
    c_coef2   = {neg_phase, 1'b0};
  end
endmodule

// tb_luma_coef_gen: checks that the folded luma coefficients, with their
// signs and the tap mirroring applied, give the SVC luma filter table for
// all 16 phases.
module tb_luma_coef_gen;
  import svc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] phase;
  logic [2:0] c1, c4;
  logic [5:0] c2, c3;
  logic swap;

  luma_coef_gen dut (.phase_idx(phase), .l_coef1(c1), .l_coef2(c2), .l_coef3(c3),
                     .l_coef4(c4), .swap(swap));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t[4];
    for (int p = 0; p < 16; p++) begin
      phase = 4'(p);
      @(posedge clk);
      if (swap) begin t[0] = -int'(c4); t[1] = int'(c3); t[2] = int'(c2); t[3] = -int'(c1); end
      else      begin t[0] = -int'(c1); t[1] = int'(c2); t[2] = int'(c3); t[3] = -int'(c4); end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (t[k] != LUMA_TAB[p][k]) begin
          failures++;
          $display("phase %0d tap %0d: got %0d want %0d", p, k, t[k], LUMA_TAB[p][k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

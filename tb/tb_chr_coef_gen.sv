// tb_chr_coef_gen: checks the chroma coefficient generator against the
// bilinear filter table for all 16 phases.
module tb_chr_coef_gen;
  import svc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] phase;
  logic [5:0] c1, c2;

  chr_coef_gen dut (.phase_idx(phase), .c_coef1(c1), .c_coef2(c2));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 16; p++) begin
      phase = 4'(p);
      @(posedge clk);
      checks += 2;
      if (int'(c1) != chroma_tap(p, 2)) begin failures++; $display("phase %0d coef1 %0d", p, c1); end
      if (int'(c2) != chroma_tap(p, 1)) begin failures++; $display("phase %0d coef2 %0d", p, c2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

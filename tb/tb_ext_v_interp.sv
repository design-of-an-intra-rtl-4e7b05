// tb_ext_v_interp: checks the extended vertical interpolator against the
// direct -3/19/19/-3 filter (luma, clipped) and the bilinear average
// (chroma), on random and extreme inputs.
module tb_ext_v_interp;
  import svc_pkg::*;
  import svc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic chroma;
  pixel_t a, b, c, d, y;

  ext_v_interp dut (.chroma, .v_a(a), .v_b(b), .v_c(c), .v_d(d), .pred_out(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      chroma = n[0];
      if (n < 8) begin
        a = n[1] ? 8'd255 : 8'd0; d = a;
        b = n[2] ? 8'd255 : 8'd0; c = b;
      end else begin
        a = 8'($urandom); b = 8'($urandom); c = 8'($urandom); d = 8'($urandom);
      end
      @(posedge clk);
      checks++;
      if (int'(y) != ext_ref(chroma, a, b, c, d)) begin
        failures++;
        $display("ch=%0d %0d %0d %0d %0d: got %0d want %0d", chroma, a, b, c, d, y, ext_ref(chroma, a, b, c, d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

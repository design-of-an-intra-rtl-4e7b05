// tb_basic_interp: checks the hybrid basic interpolator, at the
// horizontal-pass width (8-bit pixels) and the vertical-pass width (signed
// horizontal sums), against a direct multiply-and-add with the filter
// tables; random taps for every phase in luma and chroma, plus equal taps,
// for which the equality bypass must be flagged.
module tb_basic_interp;
  import svc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, eq_seen = 0;

  logic chroma;
  logic [3:0] phase;
  logic signed [8:0]  h1, h2, h3, h4;
  logic signed [15:0] v1, v2, v3, v4;
  logic signed [15:0] h_out;
  logic signed [22:0] v_out;
  logic h_eq, v_eq;

  basic_interp #(.IW(9))  u_h (.chroma, .phase_idx(phase), .ref1(h1), .ref2(h2), .ref3(h3), .ref4(h4),
                               .pred_out(h_out), .eq(h_eq));
  basic_interp #(.IW(16)) u_v (.chroma, .phase_idx(phase), .ref1(v1), .ref2(v2), .ref3(v3), .ref4(v4),
                               .pred_out(v_out), .eq(v_eq));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit expect_eq);
    int eh, ev;
    @(posedge clk);
    eh = filt4(chroma, phase, h1, h2, h3, h4);
    ev = filt4(chroma, phase, v1, v2, v3, v4);
    checks += 2;
    if (int'(h_out) != eh) begin failures++; $display("H ch=%0d ph=%0d got %0d want %0d", chroma, phase, h_out, eh); end
    if (int'(v_out) != ev) begin failures++; $display("V ch=%0d ph=%0d got %0d want %0d", chroma, phase, v_out, ev); end
    if (expect_eq) begin
      checks++;
      if (!h_eq || !v_eq) begin failures++; $display("equality not flagged"); end
      else eq_seen++;
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      chroma = n[0];
      phase  = 4'(n >> 1);
      h1 = 9'($urandom_range(0, 255)); h2 = 9'($urandom_range(0, 255));
      h3 = 9'($urandom_range(0, 255)); h4 = 9'($urandom_range(0, 255));
      v1 = 16'(int'($urandom_range(0, 10200)) - 2040); v2 = 16'(int'($urandom_range(0, 10200)) - 2040);
      v3 = 16'(int'($urandom_range(0, 10200)) - 2040); v4 = 16'(int'($urandom_range(0, 10200)) - 2040);
      if (n % 5 == 0) begin h4 = h1; v4 = v1; end   // partly equal: bypass must not be taken wrongly
      check(1'b0);
    end
    for (int n = 0; n < 64; n++) begin
      chroma = n[0];
      phase  = 4'(n >> 2);
      h1 = 9'($urandom_range(0, 255)); h2 = h1; h3 = h1; h4 = h1;
      v1 = 16'(int'($urandom_range(0, 10200)) - 2040); v2 = v1; v3 = v1; v4 = v1;
      check(1'b1);
    end
    // chroma bypass looks at the two inner taps only
    chroma = 1; phase = 4'd5;
    h1 = 9'd3; h2 = 9'd77; h3 = 9'd77; h4 = 9'd200;
    v1 = 16'sd1; v2 = 16'sd900; v3 = 16'sd900; v4 = -16'sd7;
    check(1'b1);
    checks++;
    if (eq_seen != 65) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

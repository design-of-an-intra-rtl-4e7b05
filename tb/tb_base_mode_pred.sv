// tb_base_mode_pred: checks the four base-mode lanes on random operands
// against (x + 2z + y + 2) >> 2, including the two-tap and copy forms.
module tb_base_mode_pred;
  import svc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  pixel_t [3:0] x, z, y, p;

  base_mode_pred dut (.op_x(x), .op_z(z), .op_y(y), .pred(p));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int l = 0; l < 4; l++) begin
        x[l] = 8'($urandom); z[l] = 8'($urandom); y[l] = 8'($urandom);
        if (n % 3 == 1) y[l] = x[l];                    // average form
        if (n % 3 == 2) begin y[l] = x[l]; z[l] = x[l]; end   // copy form
        if (n < 4) begin x[l] = 8'hff; y[l] = 8'hff; z[l] = 8'hff; end
      end
      @(posedge clk);
      for (int l = 0; l < 4; l++) begin
        int e;
        if (n % 3 == 1)      e = (int'(x[l]) + int'(z[l]) + 1) / 2;
        else if (n % 3 == 2) e = int'(x[l]);
        else                 e = (int'(x[l]) + 2 * int'(z[l]) + int'(y[l]) + 2) / 4;
        checks++;
        if (int'(p[l]) != e) begin failures++; $display("lane %0d got %0d want %0d", l, p[l], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

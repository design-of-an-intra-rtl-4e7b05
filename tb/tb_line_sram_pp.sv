// tb_line_sram_pp: fills the SRAM on each side through both ports, swaps
// the pair and checks that each side now sees what the other port wrote,
// and that predictor read data hold between reads.
module tb_line_sram_pp;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, swap, sel;
  logic p_en, p_we, b_en, b_we;
  logic [4:0] p_addr, b_addr;
  logic [31:0] p_wdata, b_wdata, p_rdata, b_rdata;
  logic [31:0] pat_p [20], pat_b [20];

  line_sram_pp dut (.clk, .rst_n, .swap, .sel, .p_en, .p_we, .p_addr, .p_wdata, .p_rdata,
                    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; swap = 0; p_en = 0; p_we = 0; b_en = 0; b_we = 0;
    p_addr = '0; b_addr = '0; p_wdata = '0; b_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 20; a++) begin pat_p[a] = $urandom; pat_b[a] = $urandom; end
    for (int rnd = 0; rnd < 4; rnd++) begin
      // both ports write their own SRAM in the same cycles
      for (int a = 0; a < 20; a++) begin
        p_en = 1; p_we = 1; p_addr = 5'(a); p_wdata = pat_p[a] ^ rnd;
        b_en = 1; b_we = 1; b_addr = 5'(a); b_wdata = pat_b[a] ^ rnd;
        @(negedge clk);
      end
      p_en = 0; p_we = 0; b_en = 0; b_we = 0;
      checks++;
      if (sel != 1'(rnd % 2)) begin failures++; $display("sel %0d in round %0d", sel, rnd); end
      swap = 1; @(negedge clk); swap = 0;
      // after the swap the predictor side reads what the bus wrote, and back
      for (int a = 0; a < 20; a++) begin
        p_en = 1; p_addr = 5'(a); b_en = 1; b_addr = 5'(19 - a);
        @(negedge clk);
        p_en = 0; b_en = 0;
        checks += 2;
        if (p_rdata != (pat_b[a] ^ rnd)) begin failures++; $display("p read %0d: %h", a, p_rdata); end
        if (b_rdata != (pat_p[19 - a] ^ rnd)) begin failures++; $display("b read %0d: %h", a, b_rdata); end
        @(negedge clk);
        checks++;
        if (p_rdata != (pat_b[a] ^ rnd)) begin failures++; $display("p data not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_banked_sram: writes random words into every bank and reads all banks
// in parallel at independent random addresses, comparing with a model;
// also checks that read data hold while a bank is not read.
module tb_banked_sram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en;
  logic [1:0] wr_bank;
  logic [5:0] wr_addr;
  logic [15:0] wr_data;
  logic [3:0] rd_en;
  logic [3:0][5:0] rd_addr;
  logic [3:0][15:0] rd_data;
  logic [15:0] model [4][48];
  logic [3:0][15:0] expect_q;
  logic [3:0] was_read = '0;

  banked_sram dut (.clk, .wr_en, .wr_bank, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = '0; wr_bank = '0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    @(negedge clk);
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < 48; a++) begin
        wr_en = 1; wr_bank = 2'(b); wr_addr = 6'(a); wr_data = 16'($urandom);
        model[b][a] = wr_data;
        @(negedge clk);
      end
    wr_en = 0;
    for (int n = 0; n < 500; n++) begin
      for (int b = 0; b < 4; b++) begin
        rd_en[b] = (n % 7 != b);
        rd_addr[b] = 6'($urandom_range(0, 47));
        if (rd_en[b]) begin expect_q[b] = model[b][rd_addr[b]]; was_read[b] = 1'b1; end
      end
      @(negedge clk);
      for (int b = 0; b < 4; b++) if (was_read[b]) begin
        checks++;
        if (rd_data[b] != expect_q[b]) begin
          failures++;
          $display("bank %0d got %h want %h", b, rd_data[b], expect_q[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

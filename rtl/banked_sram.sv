// banked_sram: reference-layer pixel store of the Intra_BL engine.
//
// NBANKS banks of DEPTH words, each word two 8-bit pixels.  The default
// 4 x 48 x 16 bits is 3072 bits.  Every bank can be read in the same cycle
// at its own address, so a window of 8 horizontally adjacent pixels, which
// holds the four taps of two neighbouring outputs, comes out in one cycle
// when consecutive two-pixel words sit in consecutive banks.  How pixels are
// placed is up to the user (intra_bl_engine: word w of a row goes to bank
// w % NBANKS, each bank split into two halves of 24 words, one per half of
// the reference region).
//
// Interface: one write port (one word into one bank per cycle, from the
// reference-layer pixel fetch) and a read port with an enable and address
// per bank.  Reads are synchronous: rd_data is valid the cycle after rd_en
// and holds until the bank is read again.  A write and a read of the same
// word in one cycle return the old word.
module banked_sram #(
  parameter int unsigned NBANKS = 4,
  parameter int unsigned DEPTH  = 48,
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned AW     = $clog2(DEPTH),
  parameter int unsigned BW     = $clog2(NBANKS)
) (
  input  logic                         clk,
  input  logic                         wr_en,
  input  logic [BW-1:0]                wr_bank,
  input  logic [AW-1:0]                wr_addr,
  input  logic [WIDTH-1:0]             wr_data,
  input  logic [NBANKS-1:0]            rd_en,
  input  logic [NBANKS-1:0][AW-1:0]    rd_addr,
  output logic [NBANKS-1:0][WIDTH-1:0] rd_data
);
  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    logic [WIDTH-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (wr_en && wr_bank == BW'(b)) mem[wr_addr] <= wr_data;
      if (rd_en[b]) rd_data[b] <= mem[rd_addr[b]];
    end
  end

  initial assert (NBANKS > 1 && DEPTH > 1);
endmodule

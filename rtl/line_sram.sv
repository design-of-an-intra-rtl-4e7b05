// line_sram: single-port synchronous SRAM holding upper-line pixels.
//
// DEPTH words of WIDTH bits (default 20 x 32: four pixels per word, luma and
// chroma of the upper line of an MB or MB pair).  One access per cycle:
// a write when en && we, otherwise a read when en.  Read data appear the
// cycle after the read and then hold until the next read, which lets the
// predictor use data_out as the last sub-row of the upper buffer.
module line_sram #(
  parameter int unsigned DEPTH = 20,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && we)  mem[addr] <= wdata;
    else if (en)   rdata <= mem[addr];
  end
endmodule

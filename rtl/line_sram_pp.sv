// line_sram_pp: ping-pong pair of Line SRAMs between the system bus and
// the intra predictor.
//
// While the predictor reads the upper neighbours of the current MB (or MB
// pair) from one Line SRAM and writes its new bottom pixels back there, the
// other Line SRAM exchanges data with external memory over the system bus
// (write-back of the finished line part, fetch of the next one).  A swap
// pulse, given at an MB (pair) boundary, exchanges the roles.  The read
// data of the predictor side hold between reads.
//
// Interface: a predictor port and a bus port, each en/we/addr/wdata/rdata;
// sel tells which SRAM is on the predictor side (0: SRAM1).  Both ports are
// single-cycle synchronous; a swap takes effect from the next cycle.
module line_sram_pp #(
  parameter int unsigned DEPTH = 20,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             swap,
  output logic             sel,
  // predictor side
  input  logic             p_en,
  input  logic             p_we,
  input  logic [AW-1:0]    p_addr,
  input  logic [WIDTH-1:0] p_wdata,
  output logic [WIDTH-1:0] p_rdata,
  // system bus side
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic             en   [2];
  logic             we   [2];
  logic [AW-1:0]    addr [2];
  logic [WIDTH-1:0] wd   [2];
  logic [WIDTH-1:0] rd   [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sel <= 1'b0;
    else if (swap) sel <= ~sel;
  end

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      logic pred_side;
      pred_side = (sel == 1'(i));
      en[i]   = pred_side ? p_en    : b_en;
      we[i]   = pred_side ? p_we    : b_we;
      addr[i] = pred_side ? p_addr  : b_addr;
      wd[i]   = pred_side ? p_wdata : b_wdata;
    end
    p_rdata = sel ? rd[1] : rd[0];
    b_rdata = sel ? rd[0] : rd[1];
  end

  for (genvar i = 0; i < 2; i++) begin : g_sram
    line_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_sram (
      .clk, .en(en[i]), .we(we[i]), .addr(addr[i]), .wdata(wd[i]), .rdata(rd[i]));
  end
endmodule

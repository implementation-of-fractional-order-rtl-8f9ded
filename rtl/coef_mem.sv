// coef_mem: storage for the L binomial weights b_0 .. b_{L-1}.
//
// A simple dual-port RAM: the coefficient generator writes one weight per
// write strobe, and the multiply-accumulate unit reads weight j with one
// cycle of latency, in the same cycle as it reads sample x[n-j] from the
// sample window. The weights are computed once per value of gamma and then
// only read. That the weights are computed in advance and stored is the
// operator's; the RAM organisation and its one-cycle read are this design's.
module coef_mem
  import gl_pkg::*;
#(
  parameter int unsigned L = 100
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(L)-1:0] waddr,
  input  coef_t                wdata,
  input  logic                 rd_en,
  input  logic [$clog2(L)-1:0] raddr,
  output coef_t                rdata
);

  coef_t mem [L];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) rdata <= mem[raddr];
  end

endmodule

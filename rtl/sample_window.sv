// sample_window: the short memory of the Grunwald-Letnikov operator.
//
// Holds the last L input samples x[n], x[n-1], ..., x[n-L+1]. Conceptually
// the window is an array that is shifted right by one place on every new
// sample, with the new sample entering at index 0 and the oldest dropping
// out; after a clear it holds zeros, so the first L outputs are a start-up
// transient. This module gives the same behaviour with a circular buffer in
// a single RAM (as a FIFO would): a push writes over the oldest entry and
// moves the head pointer, and a read of lag j returns x[n-j] from address
// head-j modulo L. No data moves on a push, so a long window costs memory,
// not registers.
//
// Interface and timing:
//   clear      starts zeroing the whole buffer, one word per cycle; `clearing`
//              is high for L cycles and pushes are ignored meanwhile.
//   push, din  stores a new sample x[n]; it is readable from the next cycle.
//   rd_en, rd_lag  read x[n-rd_lag]; `rd_data` is valid one cycle later.
// The right-shifted, zero-initialised window of L samples is the operator's;
// the circular-buffer organisation is this design's.
module sample_window
  import gl_pkg::*;
#(
  parameter int unsigned L = 100
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  output logic                 clearing,
  input  logic                 push,
  input  data_t                din,
  input  logic                 rd_en,
  input  logic [$clog2(L)-1:0] rd_lag,
  output data_t                rd_data
);

  localparam int unsigned AW = $clog2(L);
  localparam logic [AW-1:0] LAST = AW'(L - 1);

  data_t         mem [L];
  logic [AW-1:0] head;
  logic [AW-1:0] clr_addr;
  logic [AW-1:0] head_next;
  logic [AW-1:0] rd_addr;

  always_comb begin
    head_next = (head == LAST) ? '0 : head + AW'(1);
    rd_addr   = (head >= rd_lag) ? head - rd_lag : head + AW'(L) - rd_lag;
  end

  // control: head pointer and clear sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head     <= '0;
      clearing <= 1'b0;
      clr_addr <= '0;
    end else if (clear) begin
      clearing <= 1'b1;
      clr_addr <= '0;
      head     <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + AW'(1);
      if (clr_addr == LAST) clearing <= 1'b0;
    end else if (push) begin
      head <= head_next;
    end
  end

  // a push during the clear would be lost: the controller never issues one
  a_no_push_while_clearing: assert property (@(posedge clk) disable iff (!rst_n) !(push && clearing))
    else $error("sample_window: push while clearing");

  // storage: one write port, one registered read port
  always_ff @(posedge clk) begin
    if (clearing)  mem[clr_addr]  <= '0;
    else if (push && !clear) mem[head_next] <= din;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule

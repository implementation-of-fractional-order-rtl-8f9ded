// loop_timer: acquisition-loop timer of the differintegral operator.
//
// The operator takes one input sample per loop iteration, and the loop
// period is the sampling interval T. This timer counts clock cycles and
// raises `tick` for one cycle every `period` cycles while `enable` is high.
// One loop iteration must finish inside the period; a tick that arrives while
// `busy` is still high is not passed on (`tick` stays low, that sample is
// skipped) and `overrun` pulses instead, so the caller can count overruns.
//
// Interface: `period` is the number of clock cycles per sample (values below
// 2 are treated as 2) and is sampled continuously. The first tick comes
// `period` cycles after `enable` rises. Taking the sampling interval from a
// cycle count, and skipping a sample on overrun, are choices of this design;
// the operator only requires the interval to exceed one iteration time.
module loop_timer #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [CNT_W-1:0] period,
  input  logic             busy,
  output logic             tick,
  output logic             overrun
);

  logic [CNT_W-1:0] count;
  logic [CNT_W-1:0] last;
  logic             expire;

  always_comb begin
    last   = (period < CNT_W'(2)) ? CNT_W'(1) : period - CNT_W'(1);
    expire = enable && (count >= last);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      tick    <= 1'b0;
      overrun <= 1'b0;
    end else begin
      tick    <= expire && !busy;
      overrun <= expire && busy;
      if (!enable || expire) count <= '0;
      else                   count <= count + CNT_W'(1);
    end
  end

  a_tick_xor_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(tick && overrun))
    else $error("loop_timer: tick and overrun together");

endmodule

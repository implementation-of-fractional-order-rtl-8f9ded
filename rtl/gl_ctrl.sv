// gl_ctrl: sequencer of the fractional differintegral operator.
//
// Configuration. On `cfg_load` (accepted when idle or waiting for a sample)
// the controller starts, in the same cycle, the binomial-weight generator,
// the T^-gamma computation and the zeroing of the sample window, and waits
// until all three have finished. It then enables the acquisition loop
// (`ready`).
//
// Acquisition loop, once per sampling tick:
//   1. `sample_req`: the input code is taken and converted to volts;
//   2. `win_push`:   the converted sample enters the window as x[n];
//   3. `mac_start`:  the weighted sum over the window is formed;
//   4. `out_start`:  the sum is scaled by T^-gamma and the output updated;
// then it waits for the next tick. `busy` is high from the tick until the
// output has been written, so the loop timer can detect a sampling interval
// shorter than one iteration. `settled` rises once L samples have entered
// the window since the last clear: before that the output is the start-up
// transient of the zero-initialised window.
//
// The order of the loop follows the operator's flowchart; the handshakes,
// running the three configuration jobs in parallel and the `settled` flag
// are this design's.
module gl_ctrl #(
  parameter int unsigned L = 100
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cfg_load,
  input  logic tick,
  // configuration jobs
  output logic coef_start,
  input  logic coef_busy,
  output logic scale_start,
  input  logic scale_busy,
  output logic win_clear,
  input  logic win_clearing,
  // per-sample steps
  output logic sample_req,
  input  logic sample_valid,
  output logic win_push,
  output logic mac_start,
  input  logic mac_done,
  output logic out_start,
  input  logic out_valid,
  // status
  output logic ready,
  output logic busy,
  output logic settled
);

  localparam int unsigned SW = $clog2(L + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_CFG_START, S_CFG_WAIT, S_WAIT, S_ACQ, S_PUSH, S_MAC, S_OUT
  } state_t;
  state_t state;

  logic [SW-1:0] nsamp;
  logic          cfg_ok;

  assign cfg_ok  = (state == S_IDLE) || (state == S_WAIT);
  assign ready   = (state != S_IDLE) && (state != S_CFG_START) && (state != S_CFG_WAIT);
  assign busy    = ready && (state != S_WAIT);
  assign settled = (nsamp == SW'(L));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      nsamp       <= '0;
      coef_start  <= 1'b0;
      scale_start <= 1'b0;
      win_clear   <= 1'b0;
      sample_req  <= 1'b0;
      win_push    <= 1'b0;
      mac_start   <= 1'b0;
      out_start   <= 1'b0;
    end else begin
      coef_start  <= 1'b0;
      scale_start <= 1'b0;
      win_clear   <= 1'b0;
      sample_req  <= 1'b0;
      win_push    <= 1'b0;
      mac_start   <= 1'b0;
      out_start   <= 1'b0;
      if (cfg_load && cfg_ok) begin
        coef_start  <= 1'b1;
        scale_start <= 1'b1;
        win_clear   <= 1'b1;
        nsamp       <= '0;
        state       <= S_CFG_START;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_CFG_START: state <= S_CFG_WAIT;   // jobs raise busy this cycle
          S_CFG_WAIT: if (!coef_busy && !scale_busy && !win_clearing) state <= S_WAIT;
          S_WAIT: if (tick) begin
            sample_req <= 1'b1;
            state      <= S_ACQ;
          end
          S_ACQ: if (sample_valid) begin
            win_push <= 1'b1;
            if (nsamp != SW'(L)) nsamp <= nsamp + SW'(1);
            state    <= S_PUSH;
          end
          S_PUSH: begin
            mac_start <= 1'b1;
            state     <= S_MAC;
          end
          S_MAC: if (mac_done) begin
            out_start <= 1'b1;
            state     <= S_OUT;
          end
          S_OUT: if (out_valid) state <= S_WAIT;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // handshake rules: per-sample steps only while configured, one at a time,
  // and configuration jobs only together
  a_steps_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
      (sample_req || win_push || mac_start || out_start) |-> ready)
    else $error("gl_ctrl: sample step while not configured");
  a_one_step: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({sample_req, win_push, mac_start, out_start}))
    else $error("gl_ctrl: two sample steps in one cycle");
  a_jobs_together: assert property (@(posedge clk) disable iff (!rst_n)
      (coef_start == scale_start) && (coef_start == win_clear))
    else $error("gl_ctrl: configuration jobs started apart");

endmodule

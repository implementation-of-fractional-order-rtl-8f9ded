// gl_top: fractional-order integrator/differentiator on the
// Grunwald-Letnikov short-memory approximation,
//
//     y[n] = T^-gamma * sum_{j=0}^{L-1} b_j * x[n-j],
//     b_0 = 1,  b_j = (1 - (1 + gamma) / j) * b_{j-1},
//
// which approximates s^gamma (a derivative for gamma > 0, an integral for
// gamma < 0) with the backward difference (1 - z^-1)/T raised to the power
// gamma, truncated to a window of L samples.
//
// Datapath: the input code from the analog input is scaled to volts
// (adc_scale), pushed into a window of the last L samples (sample_window),
// weighted by the stored binomial coefficients and summed on one multiplier
// (gl_mac with coef_mem), multiplied by T^-gamma (out_scale) and sent as a
// code to the analog output (dac_scale). The coefficients (coef_gen) and
// T^-gamma = (e^(-gamma ln T / 10))^10 (scale_factor) are computed in
// hardware whenever a new gamma is loaded. gl_ctrl sequences the work and
// loop_timer sets the sampling interval.
//
// Interface:
//   cfg_load   pulse: latch `gamma` and `ln_t` (Q7.17), recompute the
//              coefficients and T^-gamma, zero the window. `ln_t` must be
//              the natural log of the sampling interval in seconds.
//   period     sampling interval in clock cycles (T = period / f_clk).
//   adc_code   signed input code, 3276.7 counts per volt, sampled once per
//              period; `dac_code` is the output code in the same scale,
//              updated with a one-cycle `dac_valid` strobe.
//   y, y_valid the output in volts (Q7.17), one cycle ahead of dac_code.
//   ready      configured and sampling; `busy` an iteration is in progress;
//   settled    L samples have been taken since the last cfg_load;
//   overrun    pulse: a sampling tick came during an iteration and that
//              sample was skipped; `range_err` gamma*ln T was beyond +-10;
//   out_sat, dac_sat  the last output was clipped to +-64 V or +-10 V.
// Timing: an iteration keeps `busy` high for L + 8 clock cycles, after the tick,
// so `period` must exceed that. Configuration takes about L*(DATA_W+COEF_W+3)
// cycles. The defaults (L = 100, 24-bit Q7.17 data) are the operator's; the
// clock frequency is left to the user (at 40 MHz a 0.5 ms interval is
// period = 20000).
module gl_top
  import gl_pkg::*;
#(
  parameter int unsigned L       = 100,
  parameter int unsigned CNT_W   = 32,
  parameter int unsigned N_TERMS = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_load,
  input  data_t            gamma,
  input  data_t            ln_t,
  input  logic [CNT_W-1:0] period,
  input  adc_t             adc_code,
  output adc_t             dac_code,
  output logic             dac_valid,
  output data_t            y,
  output logic             y_valid,
  output logic             ready,
  output logic             busy,
  output logic             settled,
  output logic             overrun,
  output logic             range_err,
  output logic             out_sat,
  output logic             dac_sat
);

  localparam int unsigned AW    = $clog2(L);
  localparam int unsigned ACC_W = DATA_W + COEF_W + $clog2(L);

  logic tick;
  logic coef_start, coef_busy, scale_start, scale_busy, win_clear, win_clearing;
  logic sample_req, sample_valid, win_push, mac_start, mac_done, out_start;

  data_t   gamma_q;
  data_t   ln_t_q;
  data_t   x_new;
  logic    coef_we;
  logic [AW-1:0] coef_waddr;
  coef_t   coef_wdata;
  wide_t   scale;
  logic    rd_en;
  logic [AW-1:0] rd_idx;
  data_t   x_rd;
  coef_t   b_rd;
  logic signed [ACC_W-1:0] acc;

  // configuration registers, held for the jobs that read them
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gamma_q <= '0;
      ln_t_q  <= '0;
    end else if (cfg_load && !busy) begin
      gamma_q <= gamma;
      ln_t_q  <= ln_t;
    end
  end

  gl_ctrl #(.L(L)) u_ctrl (
    .clk, .rst_n, .cfg_load, .tick,
    .coef_start, .coef_busy, .scale_start, .scale_busy, .win_clear, .win_clearing,
    .sample_req, .sample_valid, .win_push, .mac_start, .mac_done,
    .out_start, .out_valid(y_valid), .ready, .busy, .settled
  );

  loop_timer #(.CNT_W(CNT_W)) u_timer (
    .clk, .rst_n, .enable(ready), .period, .busy, .tick, .overrun
  );

  adc_scale u_adc (
    .clk, .rst_n, .valid(sample_req), .code(adc_code), .y_valid(sample_valid), .y(x_new)
  );

  coef_gen #(.L(L)) u_coef_gen (
    .clk, .rst_n, .start(coef_start), .gamma(gamma_q), .busy(coef_busy),
    .we(coef_we), .waddr(coef_waddr), .wdata(coef_wdata), .done()
  );

  coef_mem #(.L(L)) u_coef_mem (
    .clk, .we(coef_we), .waddr(coef_waddr), .wdata(coef_wdata),
    .rd_en, .raddr(rd_idx), .rdata(b_rd)
  );

  scale_factor #(.N_TERMS(N_TERMS)) u_scale (
    .clk, .rst_n, .start(scale_start), .gamma(gamma_q), .ln_t(ln_t_q),
    .busy(scale_busy), .done(), .scale, .range_err
  );

  sample_window #(.L(L)) u_window (
    .clk, .rst_n, .clear(win_clear), .clearing(win_clearing),
    .push(win_push), .din(x_new), .rd_en, .rd_lag(rd_idx), .rd_data(x_rd)
  );

  gl_mac #(.L(L), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .start(mac_start), .busy(), .rd_en, .rd_idx,
    .x(x_rd), .b(b_rd), .done(mac_done), .acc
  );

  out_scale #(.L(L), .ACC_W(ACC_W)) u_out (
    .clk, .rst_n, .in_valid(out_start), .acc, .scale, .y_valid, .y, .sat(out_sat)
  );

  dac_scale u_dac (
    .clk, .rst_n, .valid(y_valid), .y, .code_valid(dac_valid), .code(dac_code), .sat(dac_sat)
  );

endmodule

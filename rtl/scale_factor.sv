// scale_factor: computes the operator's gain T^-gamma.
//
// The weighted sum of the Grunwald-Letnikov operator is multiplied by
// T^-gamma, T being the sampling interval. Without a general power function
// the factor is obtained as
//
//     T^-gamma = e^(-gamma * ln T) = ( e^(-gamma * ln T / 10) )^10
//
// because the exponential unit accepts arguments in [-1, +1] only: the
// argument is divided by 10 (so |gamma * ln T| up to 10 is covered), passed
// through exp_unit, and the result raised to the tenth power by pow10_unit.
// An argument with |gamma * ln T| > 10 is clamped to +-10 and `range_err` is
// set, so the factor saturates at e^+-10 instead of wrapping.
//
// Interface and timing: `start` latches `gamma` and `ln_t` (both Q7.17;
// ln T is supplied by the host, e.g. -7.6009 for T = 0.5 ms). `done` pulses
// with `scale` (wide_t, Q20.28) about N_TERMS+7 cycles later. Eqs. 6 and 7,
// the +-1 range and the division by 10 are the operator's; the clamp and
// taking ln T as an input are this design's.
module scale_factor
  import gl_pkg::*;
#(
  parameter int unsigned N_TERMS = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  data_t gamma,
  input  data_t ln_t,
  output logic  busy,
  output logic  done,
  output wide_t scale,
  output logic  range_err
);

  localparam wide_t ONE_TENTH = wide_t'(((64'sd1 <<< WIDE_F) + 64'sd5) / 64'sd10);
  localparam int unsigned SH = 2 * DATA_F - WIDE_F;  // 34 -> 28 fraction bits

  typedef enum logic [1:0] {S_IDLE, S_ARG, S_EXP, S_POW} state_t;
  state_t state;

  logic signed [2*DATA_W-1:0] gl;       // gamma * ln T, 2*DATA_F fraction bits
  wide_t arg;                           // -gamma * ln T / 10
  wide_t arg_w;
  wide_t arg_div;
  logic  exp_start, exp_done;
  wide_t exp_y;
  logic  pow_start, pow_done, pow_ovf;
  wide_t pow_y;

  always_comb begin
    arg_w   = wide_t'(-((gl + (2*DATA_W)'(1 << (SH - 1))) >>> SH));
    arg_div = wide_mul(arg_w, ONE_TENTH);
  end

  exp_unit #(.N_TERMS(N_TERMS)) u_exp (
    .clk, .rst_n, .start(exp_start), .x(arg), .busy(), .done(exp_done), .y(exp_y)
  );

  pow10_unit u_pow (
    .clk, .rst_n, .start(pow_start), .a(exp_y), .busy(), .done(pow_done),
    .y(pow_y), .ovf(pow_ovf)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      gl        <= '0;
      arg       <= '0;
      exp_start <= 1'b0;
      pow_start <= 1'b0;
      done      <= 1'b0;
      scale     <= WIDE_ONE;
      range_err <= 1'b0;
    end else begin
      exp_start <= 1'b0;
      pow_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          gl    <= gamma * ln_t;
          state <= S_ARG;
        end
        S_ARG: begin
          if (arg_div > WIDE_ONE) begin
            arg       <= WIDE_ONE;
            range_err <= 1'b1;
          end else if (arg_div < -WIDE_ONE) begin
            arg       <= -WIDE_ONE;
            range_err <= 1'b1;
          end else begin
            arg       <= arg_div;
            range_err <= 1'b0;
          end
          exp_start <= 1'b1;
          state     <= S_EXP;
        end
        S_EXP: if (exp_done) begin
          pow_start <= 1'b1;
          state     <= S_POW;
        end
        S_POW: if (pow_done) begin
          scale <= pow_y;
          if (pow_ovf) range_err <= 1'b1;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

// coef_gen: generator of the Grunwald-Letnikov binomial weights.
//
// The weights b_j = (-1)^j * binom(gamma, j) of the backward-difference
// expansion of s^gamma follow the recursion
//
//     b_0 = 1,   b_j = b_{j-1} - b_{j-1} * (1 + gamma) / j,   j = 1, 2, ...
//
// and this module evaluates it for j = 0 .. L-1, writing each weight to the
// coefficient memory as soon as it is known. Per weight it forms
// p = b_{j-1} * (1 + gamma) with one multiplication, divides |p| by j with a
// restoring divider that produces one quotient bit per cycle, rounds the
// quotient to the weight format, restores the sign and subtracts. A weight
// that would leave the Q4.28 range is saturated (only for gamma < -1).
//
// Interface and timing: `start` latches `gamma` (Q7.17) and begins; each
// weight appears on `we`/`waddr`/`wdata` for one cycle; `done` pulses after
// b_{L-1} has been written, about L*(DIV_W+2) cycles after start, and `busy`
// is high in between. The recursion is the operator's; computing it in
// hardware with a serial divider is this design's choice.
module coef_gen
  import gl_pkg::*;
#(
  parameter int unsigned L = 100
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  data_t                gamma,
  output logic                 busy,
  output logic                 we,
  output logic [$clog2(L)-1:0] waddr,
  output coef_t                wdata,
  output logic                 done
);

  localparam int unsigned AW    = $clog2(L);
  localparam int unsigned JW    = AW + 1;
  localparam int unsigned DIV_W = COEF_W + DATA_W + 1;  // |b * (1+gamma)|
  localparam int unsigned CNT_W = $clog2(DIV_W);

  typedef enum logic [2:0] {S_IDLE, S_MUL, S_DIV, S_UPD, S_DONE} state_t;
  state_t state;

  logic signed [DATA_W:0]  g1;       // 1 + gamma, Q8.17
  coef_t                   b;        // b_{j-1}
  logic [JW-1:0]           j;        // index of the weight being computed
  logic                    neg;      // sign of p
  logic [DIV_W-1:0]        dividend; // |p|, shifted out MSB first
  logic [DIV_W-1:0]        quot;
  logic [JW-1:0]           rem;      // partial remainder, always < j
  logic [CNT_W-1:0]        bitcnt;

  logic signed [DIV_W-1:0] p;
  logic [JW:0]             rem_sh;
  logic                    ge;
  logic [DIV_W-1:0]        q_round;
  logic signed [DIV_W:0]   term;
  logic signed [DIV_W+1:0] b_next_w;
  coef_t                   b_next;

  always_comb begin
    p        = b * g1;
    rem_sh   = {rem, dividend[DIV_W-1]};
    ge       = rem_sh >= (JW+1)'(j);
    q_round  = (quot + DIV_W'(1 << (DATA_F - 1))) >> DATA_F;
    term     = neg ? -$signed({1'b0, q_round}) : $signed({1'b0, q_round});
    b_next_w = (DIV_W+2)'(b) - (DIV_W+2)'(term);
    if (b_next_w > (DIV_W+2)'(COEF_MAX))      b_next = COEF_MAX;
    else if (b_next_w < (DIV_W+2)'(COEF_MIN)) b_next = COEF_MIN;
    else                                      b_next = coef_t'(b_next_w);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      g1       <= '0;
      b        <= '0;
      j        <= '0;
      neg      <= 1'b0;
      dividend <= '0;
      quot     <= '0;
      rem      <= '0;
      bitcnt   <= '0;
      we       <= 1'b0;
      waddr    <= '0;
      wdata    <= '0;
      done     <= 1'b0;
    end else begin
      we   <= 1'b0;
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          g1    <= (DATA_W+1)'(gamma) + (DATA_W+1)'(1 << DATA_F);
          b     <= COEF_ONE;
          j     <= JW'(1);
          we    <= 1'b1;            // b_0 = 1
          waddr <= '0;
          wdata <= COEF_ONE;
          state <= (L > 1) ? S_MUL : S_DONE;
        end
        S_MUL: begin
          neg      <= p[DIV_W-1];
          dividend <= p[DIV_W-1] ? DIV_W'(-p) : DIV_W'(p);
          quot     <= '0;
          rem      <= '0;
          bitcnt   <= '0;
          state    <= S_DIV;
        end
        S_DIV: begin
          rem      <= ge ? JW'(rem_sh - (JW+1)'(j)) : JW'(rem_sh);
          quot     <= {quot[DIV_W-2:0], ge};
          dividend <= {dividend[DIV_W-2:0], 1'b0};
          bitcnt   <= bitcnt + CNT_W'(1);
          if (bitcnt == CNT_W'(DIV_W - 1)) state <= S_UPD;
        end
        S_UPD: begin
          b     <= b_next;
          we    <= 1'b1;
          waddr <= AW'(j);
          wdata <= b_next;
          j     <= j + JW'(1);
          state <= (j == JW'(L - 1)) ? S_DONE : S_MUL;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

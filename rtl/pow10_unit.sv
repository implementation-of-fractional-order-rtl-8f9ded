// pow10_unit: raises a wide_t value to the tenth power.
//
// y^10 is formed with four multiplications on one multiplier,
// y^2 = y*y, y^4 = y^2*y^2, y^5 = y^4*y, y^10 = y^5*y^5, one per clock
// cycle, each rounded back to Q20.28. A result beyond the wide_t range is
// saturated and flagged with `ovf`; for the inputs the operator feeds it
// (e^x with |x| <= 1, so y^10 <= e^10 = 22026) this does not happen.
//
// Interface and timing: `start` latches `a`; `done` pulses with `y` and
// `ovf` valid 4 cycles later. Raising to the tenth power is the operator's;
// the square-and-multiply schedule is this design's.
module pow10_unit
  import gl_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  wide_t a,
  output logic  busy,
  output logic  done,
  output wide_t y,
  output logic  ovf
);

  localparam wide_t WIDE_MAX = wide_t'({1'b0, {(WIDE_W-1){1'b1}}});
  localparam wide_t WIDE_MIN = wide_t'({1'b1, {(WIDE_W-1){1'b0}}});

  logic [2:0] step;
  wide_t      base;     // y
  wide_t      acc;      // running power
  logic       ovf_acc;
  wide_t      op_b;
  logic signed [2*WIDE_W-1:0] p;
  logic signed [2*WIDE_W-1:0] pr;
  wide_t      m;
  logic       m_ovf;

  always_comb begin
    // step 0: y*y, 1: y^2*y^2, 2: y^4*y, 3: y^5*y^5
    op_b  = (step == 3'd2) ? base : acc;
    p     = acc * op_b;
    pr    = (p + (2*WIDE_W)'(64'sd1 <<< (WIDE_F - 1))) >>> WIDE_F;
    m_ovf = (pr > (2*WIDE_W)'(WIDE_MAX)) || (pr < (2*WIDE_W)'(WIDE_MIN));
    if (pr > (2*WIDE_W)'(WIDE_MAX))      m = WIDE_MAX;
    else if (pr < (2*WIDE_W)'(WIDE_MIN)) m = WIDE_MIN;
    else                                 m = wide_t'(pr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step    <= '0;
      base    <= '0;
      acc     <= '0;
      ovf_acc <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
      y       <= '0;
      ovf     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        base    <= a;
        acc     <= a;
        step    <= '0;
        ovf_acc <= 1'b0;
        busy    <= 1'b1;
      end else if (busy) begin
        acc     <= m;
        ovf_acc <= ovf_acc | m_ovf;
        step    <= step + 3'd1;
        if (step == 3'd3) begin
          busy <= 1'b0;
          done <= 1'b1;
          y    <= m;
          ovf  <= ovf_acc | m_ovf;
        end
      end
    end
  end

endmodule

// exp_unit: natural exponential for arguments in [-1, +1].
//
// Computes e^x by the Taylor series evaluated in Horner form,
//
//     r_N = 1,   r_{k-1} = 1 + (x * r_k) / k,   e^x ~ r_0,
//
// one step per clock cycle, with the division by k done as a multiplication
// by a constant 1/k (rounded to the wide_t grid when the module is built).
// With N_TERMS = 12 the truncation error for |x| <= 1 is below 1/13! which is
// smaller than one step of the Q20.28 format, so the result is accurate to a
// few least significant bits. Arguments outside [-1, +1] are outside the
// unit's range, as for the exponential function the operator was specified
// with; the caller scales them first.
//
// Interface and timing: `start` latches `x` (wide_t); `done` pulses with `y`
// (wide_t) valid N_TERMS cycles later and `y` holds until the next start.
// The +-1 input range is the operator's; the series evaluation is this
// design's choice.
module exp_unit
  import gl_pkg::*;
#(
  parameter int unsigned N_TERMS = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  wide_t x,
  output logic  busy,
  output logic  done,
  output wide_t y
);

  localparam int unsigned KW = $clog2(N_TERMS + 1);

  function automatic wide_t recip(input int unsigned k);
    return wide_t'(((64'sd1 <<< WIDE_F) + 64'(k / 2)) / 64'(k));
  endfunction

  wide_t         xr;
  wide_t         r;
  logic [KW-1:0] k;
  wide_t         rk;
  wide_t         r_next;

  always_comb begin
    rk     = recip(32'(k));
    r_next = WIDE_ONE + wide_mul(wide_mul(xr, r), rk);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr   <= '0;
      r    <= '0;
      k    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      y    <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        xr   <= x;
        r    <= WIDE_ONE;
        k    <= KW'(N_TERMS);
        busy <= 1'b1;
      end else if (busy) begin
        r <= r_next;
        k <= k - KW'(1);
        if (k == KW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          y    <= r_next;
        end
      end
    end
  end

endmodule

// out_scale: applies the gain T^-gamma to the weighted sum.
//
//     y[n] = T^-gamma * sum_j b_j x[n-j]
//
// The accumulator word from gl_mac (binary point at DATA_F+COEF_F) is
// multiplied by the Q20.28 scale factor, rounded to nearest on the Q7.17
// output grid and saturated to the data_t range (+-64 V); `sat` marks a
// clipped output. With one register stage, `y_valid` follows `in_valid` by
// one clock cycle and `y` holds until the next valid input. The scaling is
// the operator's; rounding and saturation are this design's.
module out_scale
  import gl_pkg::*;
#(
  parameter int unsigned L     = 100,
  parameter int unsigned ACC_W = DATA_W + COEF_W + $clog2(L)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ACC_W-1:0] acc,
  input  wide_t                   scale,
  output logic                    y_valid,
  output data_t                   y,
  output logic                    sat
);

  localparam int unsigned PW = ACC_W + WIDE_W;
  localparam int unsigned SH = COEF_F + WIDE_F;   // (DATA_F+COEF_F+WIDE_F) - DATA_F

  logic signed [PW-1:0] p;
  logic signed [PW-1:0] q;
  data_t                y_next;
  logic                 sat_next;

  always_comb begin
    p = acc * scale;
    q = (p + (PW'(1) <<< (SH - 1))) >>> SH;
    if (q > PW'(DATA_MAX)) begin
      y_next = DATA_MAX; sat_next = 1'b1;
    end else if (q < PW'(DATA_MIN)) begin
      y_next = DATA_MIN; sat_next = 1'b1;
    end else begin
      y_next = data_t'(q); sat_next = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
      sat     <= 1'b0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) begin
        y   <= y_next;
        sat <= sat_next;
      end
    end
  end

endmodule

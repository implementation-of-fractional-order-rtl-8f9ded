// dac_scale: converts the operator's output word to the analog-output code.
//
// The inverse of adc_scale: a Q7.17 value in volts is multiplied by
// COUNTS_PER_VOLT_X10/10 counts per volt (3276.7, so 1 V is written as
// 3276.7 counts), rounded to nearest and saturated to the signed ADC_W-bit
// code range, which is +-10 V for the default. `sat` is high with a result
// that was clipped: an output that large would drive the converter to its
// rail, as happens for a full derivative of a 20 Hz sine.
//
// Timing: one register stage. The counts-per-volt constant is the operator's;
// the rounding, the saturation flag and the register stage are this design's.
module dac_scale
  import gl_pkg::*;
#(
  parameter int unsigned COUNTS_PER_VOLT_X10 = 32767
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  data_t y,
  output logic  code_valid,
  output adc_t  code,
  output logic  sat
);

  localparam int unsigned EXTRA = 16;
  // counts per volt with EXTRA fraction bits
  localparam longint K = ((longint'(COUNTS_PER_VOLT_X10) <<< EXTRA) + 64'sd5) / 64'sd10;
  localparam int unsigned SH = DATA_F + EXTRA;
  localparam longint CODE_MAX = (64'sd1 <<< (ADC_W - 1)) - 1;
  localparam longint CODE_MIN = -(64'sd1 <<< (ADC_W - 1));

  logic signed [63:0] prod;
  logic signed [63:0] q;
  adc_t               code_next;
  logic               sat_next;

  always_comb begin
    prod = 64'(y) * K + (64'sd1 <<< (SH - 1));
    q    = prod >>> SH;
    if (q > CODE_MAX) begin
      code_next = adc_t'(CODE_MAX);
      sat_next  = 1'b1;
    end else if (q < CODE_MIN) begin
      code_next = adc_t'(CODE_MIN);
      sat_next  = 1'b1;
    end else begin
      code_next = adc_t'(q);
      sat_next  = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code       <= '0;
      sat        <= 1'b0;
      code_valid <= 1'b0;
    end else begin
      code_valid <= valid;
      if (valid) begin
        code <= code_next;
        sat  <= sat_next;
      end
    end
  end

endmodule

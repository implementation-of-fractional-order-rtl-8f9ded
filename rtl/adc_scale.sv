// adc_scale: converts the analog-input code to the operator's data word.
//
// The analog input delivers a signed code with COUNTS_PER_VOLT_X10/10 counts
// per volt (3276.7 for a 16-bit converter with a +-10 V span, so 1 V reads
// as 3276.7). The operator works in volts, as Q7.17 (gl_pkg::data_t). The
// conversion is one multiplication by the constant 2^17*10/COUNTS_PER_VOLT_X10
// held with 16 extra fraction bits, rounded to nearest.
//
// Timing: one register stage; `y` and `y_valid` follow `code` and `valid`
// by one clock cycle. The constant 3276.7 counts per volt is the operator's;
// the rounding and the register stage are this design's.
module adc_scale
  import gl_pkg::*;
#(
  parameter int unsigned COUNTS_PER_VOLT_X10 = 32767
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  adc_t  code,
  output logic  y_valid,
  output data_t y
);

  localparam int unsigned EXTRA = 16;
  localparam longint K = ((64'sd10 <<< (DATA_F + EXTRA)) + longint'(COUNTS_PER_VOLT_X10) / 2)
                         / longint'(COUNTS_PER_VOLT_X10);

  logic signed [63:0] prod;
  data_t              y_next;

  always_comb begin
    prod   = 64'(code) * K + (64'sd1 <<< (EXTRA - 1));
    y_next = data_t'(prod >>> EXTRA);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= valid;
      if (valid) y <= y_next;
    end
  end

endmodule

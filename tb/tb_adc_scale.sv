// tb_adc_scale: checks the code-to-volts conversion of adc_scale against
// v = code / 3276.7 computed in floating point, over the end points and
// random codes, within half a Q7.17 step plus rounding, and the one-cycle
// latency of y_valid.
module tb_adc_scale;
  import gl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0, y_valid;
  adc_t code = '0;
  data_t y;
  int checks = 0, failures = 0;

  adc_scale dut (.clk, .rst_n, .valid, .code, .y_valid, .y);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(input adc_t c);
    real exp_v, got_v;
    @(negedge clk); code = c; valid = 1'b1;
    @(negedge clk); valid = 1'b0;
    checks++;
    if (!y_valid) begin failures++; $display("FAIL y_valid not one cycle after valid"); end
    exp_v = real'(c) / 3276.7;
    got_v = real'(y) / real'(1 << DATA_F);
    checks++;
    if ((got_v - exp_v) > 0.6 / 131072.0 || (exp_v - got_v) > 0.6 / 131072.0) begin
      failures++; $display("FAIL code %0d: got %f expected %f", c, got_v, exp_v);
    end
    @(negedge clk); checks++;
    if (y_valid) begin failures++; $display("FAIL y_valid stays high"); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    one(16'sd0); one(16'sd3277); one(-16'sd3277); one(16'sd32767); one(-16'sd32768);
    repeat (200) one(adc_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

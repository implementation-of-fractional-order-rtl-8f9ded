// tb_dac_scale: checks the volts-to-code conversion of dac_scale against
// code = round(v * 3276.7) in floating point, clipped to the 16-bit range,
// with the saturation flag, for end points, in-range and out-of-range
// random values.
module tb_dac_scale;
  import gl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0, code_valid, sat;
  data_t y = '0;
  adc_t code;
  int checks = 0, failures = 0, nsat = 0;

  dac_scale dut (.clk, .rst_n, .valid, .y, .code_valid, .code, .sat);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(input data_t v);
    real e;
    bit  es;
    @(negedge clk); y = v; valid = 1'b1;
    @(negedge clk); valid = 1'b0;
    e = real'(v) / 131072.0 * 3276.7;
    es = 1'b0;
    if (e > 32767.0)  begin e = 32767.0;  es = 1'b1; end
    if (e < -32768.0) begin e = -32768.0; es = 1'b1; end
    checks++;
    if (!code_valid || sat != es || real'(code) - e > 0.51 || e - real'(code) > 0.51) begin
      failures++;
      $display("FAIL v=%f: code %0d sat %0b, expected %f sat %0b", real'(v) / 131072.0, code, sat, e, es);
    end
    if (es) nsat++;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    one(data_t'(0)); one(data_t'(131072)); one(-data_t'(131072)); one(DATA_MAX); one(DATA_MIN);
    repeat (200) one(data_t'(int'($urandom_range(0, 2 * 1310000)) - 1310000));  // within +-10 V
    repeat (50)  one(data_t'($urandom));
    checks++;
    if (nsat < 3) begin failures++; $display("FAIL saturation too rarely exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

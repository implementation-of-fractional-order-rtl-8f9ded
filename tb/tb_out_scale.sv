// tb_out_scale: checks y = T^-gamma * acc on the Q7.17 output grid.
// Accumulator values are built as sums of sample*weight products in volts,
// the scale factor is drawn from the range T^-gamma takes, and the
// expected output is their product in floating point, rounded and clipped
// to +-64 V with the saturation flag. Tolerance: one output step.
module tb_out_scale;
  import gl_pkg::*;
  localparam int L = 100;
  localparam int ACC_W = DATA_W + COEF_W + $clog2(L);
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, y_valid, sat;
  logic signed [ACC_W-1:0] acc = '0;
  wide_t scale = '0;
  data_t y;
  int checks = 0, failures = 0, nsat = 0;

  out_scale dut (.clk, .rst_n, .in_valid, .acc, .scale, .y_valid, .y, .sat);
  always #5 clk = ~clk;

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(input real av, input real sv);
    real e, got;
    bit  es;
    acc   = ACC_W'(longint'(av * 1048576.0)) <<< (DATA_F + COEF_F - 20);
    scale = wide_t'(longint'(sv * 268435456.0));
    e = (real'(acc) / (2.0 ** (DATA_F + COEF_F))) * (real'(scale) / 268435456.0);
    es = 1'b0;
    if (e > 64.0 - 1.0 / 131072.0) begin e = 64.0 - 1.0 / 131072.0; es = 1'b1; end
    if (e < -64.0) begin e = -64.0; es = 1'b1; end
    @(negedge clk); in_valid = 1'b1;
    @(negedge clk); in_valid = 1'b0;
    got = real'(y) / 131072.0;
    checks++;
    if (!y_valid || sat != es || got - e > 1.0 / 131072.0 || e - got > 1.0 / 131072.0) begin
      failures++; $display("FAIL acc %f scale %f: got %f expected %f sat %0b", av, sv, got, e, sat);
    end
    if (es) nsat++;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    one(0.0, 4.57); one(1.0, 4.57); one(-0.56, 4.57); one(0.5, 0.0104); one(-3.0, 0.0104);
    repeat (200) one(real'($urandom_range(0, 4000000)) / 1.0e6 - 2.0,
                     real'($urandom_range(1, 30000)) / 1000.0);
    one(0.07, 1853.0); one(-0.07, 1853.0); one(100.0, 22026.0);
    checks++;
    if (nsat < 3) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gl_freq: frequency response of the operator with the long window,
// L = 400, over 2-20 Hz at T = 0.5 ms, for the derivative of order 0.2 and
// the integral of order 0.6. For each frequency a 1 V sine is applied for
// L samples (the start-up transient) plus one full cycle of the wave, and
// the output amplitude (half the peak-to-peak swing) over that last cycle is compared with a
// floating-point model of the same truncated sum (within 1%) and reported
// next to the ideal gain (2*pi*f)^gamma. The sampling period is shortened
// to 500 clock cycles to keep the run short; it does not enter the
// arithmetic, which only sees T through ln T.
module tb_gl_freq;
  import gl_pkg::*;
  localparam int L = 400;
  localparam real T = 0.0005;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, cfg_load = 1'b0;
  data_t gamma = '0, ln_t = '0;
  logic [31:0] period = 32'd500;
  adc_t adc_code = '0, dac_code;
  logic dac_valid, y_valid, ready, busy, settled, overrun, range_err, out_sat, dac_sat;
  data_t y;

  gl_top #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real hist [L];
  real b_model [L];
  real s_model;

  initial begin
    #400000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic data_t q17(input real v);
    return data_t'($rtoi(v * 131072.0 + (v < 0 ? -0.5 : 0.5)));
  endfunction

  task automatic configure(input real g);
    real gq;
    gamma = q17(g);
    ln_t  = q17($ln(T));
    gq = real'(gamma) / 131072.0;
    b_model[0] = 1.0;
    for (int j = 1; j < L; j++) b_model[j] = b_model[j-1] * (real'(j) - 1.0 - gq) / real'(j);
    s_model = $exp(-gq * real'(ln_t) / 131072.0);
    for (int j = 0; j < L; j++) hist[j] = 0.0;
    @(negedge clk); cfg_load = 1'b1;
    @(negedge clk); cfg_load = 1'b0;
    @(posedge clk iff ready);
  endtask

  task automatic point(input real g, input real f, input real tol_ideal);
    int  spc = $rtoi(1.0 / (f * T) + 0.5);
    real amp, amp_m, s, gotv, ideal;
    real hi = -1.0e9, lo = 1.0e9, hi_m = -1.0e9, lo_m = 1.0e9;
    configure(g);
    for (int n = 0; n < L + spc; n++) begin
      adc_code = adc_t'($rtoi($sin(2.0 * PI * f * T * real'(n)) * 3276.7 + 32768.5) - 32768);
      @(posedge clk iff y_valid);
      for (int j = L - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = real'(adc_code) / 3276.7;
      s = 0.0;
      for (int j = 0; j < L; j++) s += b_model[j] * hist[j];
      s = s * s_model;
      gotv = real'(y) / 131072.0;
      if (n >= L) begin
        if (gotv > hi) hi = gotv;
        if (gotv < lo) lo = gotv;
        if (s > hi_m) hi_m = s;
        if (s < lo_m) lo_m = s;
      end
    end
    amp   = (hi - lo) / 2.0;       // half the peak-to-peak swing: a decaying
    amp_m = (hi_m - lo_m) / 2.0;   // offset from the start does not count
    ideal = (2.0 * PI * f) ** g;
    $display("gamma %5.2f  f %4.1f Hz: gain %.4f  model %.4f  ideal %.4f", g, f, amp, amp_m, ideal);
    checks++;
    if (amp - amp_m > 0.01 * amp_m + 2.0e-4 || amp_m - amp > 0.01 * amp_m + 2.0e-4) begin
      failures++; $display("FAIL gain differs from the model");
    end
    checks++;
    if (amp < (1.0 - tol_ideal) * ideal || amp > (1.0 + tol_ideal) * ideal) begin
      failures++; $display("FAIL gain too far from the ideal");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1'b1;
    point(0.2, 2.0, 0.1); point(0.2, 5.0, 0.1); point(0.2, 10.0, 0.1); point(0.2, 20.0, 0.1);
    point(-0.6, 2.0, 0.5); point(-0.6, 5.0, 0.5); point(-0.6, 10.0, 0.5); point(-0.6, 20.0, 0.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

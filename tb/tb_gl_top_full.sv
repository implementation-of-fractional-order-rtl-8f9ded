// tb_gl_top_full: the operator at its default parameters (window L = 100)
// and a realistic sampling interval: period = 20000 clock cycles, which is
// T = 0.5 ms with a 40 MHz clock. One complete operation per order:
// configure, then run a 1 V, 20 Hz sine for 250 samples (2.5 cycles of the
// wave, the first 100 being the start-up transient of the empty window).
//   gamma =  0.2: fractional derivative, ideal gain (2*pi*20)^0.2 = 2.63
//   gamma = -0.6: fractional integral,  ideal gain (2*pi*20)^-0.6 = 0.055
//   gamma = 0.99: near-full derivative of a 50 mV sine (a 1 V sine would
//                 clip), ideal gain 120 and a lead of about 90 degrees
// Every output is compared with a floating-point model of the truncated
// Grunwald-Letnikov sum (weights prod (k-1-gamma)/k, gain exp(-gamma ln T));
// the settled amplitude and phase (rising zero crossing of the output
// against that of the input at sample 200) are reported; the amplitude and must be within 10% (derivative) and
// 30% (integral, where the 50 ms window is short) of the ideal gain, and
// the phase within a sample of the ideal lead of 18 degrees (derivative)
// or between 4 and 8.5 ms of lag (integral; 7.5 ms ideal).
module tb_gl_top_full;
  import gl_pkg::*;
  localparam int L = 100;
  localparam real T = 0.0005;

  logic clk = 1'b0, rst_n = 1'b0, cfg_load = 1'b0;
  data_t gamma = '0, ln_t = '0;
  logic [31:0] period = 32'd20000;
  adc_t adc_code = '0, dac_code;
  logic dac_valid, y_valid, ready, busy, settled, overrun, range_err, out_sat, dac_sat;
  data_t y;

  gl_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, last_y_cyc;
  real hist [L];
  real b_model [L];
  real s_model, held_v, y_exp, amp;
  int  zc;                 // sample index of the last rising zero crossing of the output

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000000; failures++; $display("watchdog expired");
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

  task automatic run_sine(input int nsamp, input real g, input real a_in);
    real s, gotv, tol, prev;
    amp = 0.0;
    zc = -1;
    prev = 0.0;
    last_y_cyc = -1;
    for (int n = 0; n < nsamp; n++) begin
      adc_code = adc_t'($rtoi(a_in * $sin(2.0 * 3.14159265358979 * real'(n) / 100.0) * 3276.7 + 32768.5) - 32768);
      held_v = real'(adc_code) / 3276.7;
      @(posedge clk iff y_valid);
      checks++;
      if (last_y_cyc >= 0 && cyc - last_y_cyc != 20000) begin
        failures++; $display("FAIL output spacing %0d", cyc - last_y_cyc);
      end
      last_y_cyc = cyc;
      for (int j = L - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = held_v;
      s = 0.0;
      for (int j = 0; j < L; j++) s += b_model[j] * hist[j];
      y_exp = s * s_model;
      gotv = real'(y) / 131072.0;
      tol = 5.0e-4 + 2.0e-4 * s_model;
      checks++;
      if (gotv - y_exp > tol || y_exp - gotv > tol || overrun || out_sat) begin
        failures++; $display("FAIL gamma %f sample %0d: y %f expected %f", g, n, gotv, y_exp);
      end
      if (n >= nsamp - 100 && (gotv > amp || -gotv > amp)) amp = (gotv > 0) ? gotv : -gotv;
      if (n >= nsamp - 100 && prev < 0.0 && gotv >= 0.0) zc = n;
      prev = gotv;
    end
  endtask

  initial begin
    real ideal;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    configure(0.2);
    run_sine(250, 0.2, 1.0);
    ideal = (2.0 * 3.14159265358979 * 20.0) ** 0.2;
    $display("gamma  0.2: amplitude %.4f V, ideal %.4f V; output crosses zero %0d samples before the input (ideal 18 deg = 5)",
             amp, ideal, 200 - zc);
    checks++;
    if (200 - zc < 4 || 200 - zc > 6) begin failures++; $display("FAIL derivative phase"); end
    checks++;
    if (amp < 0.9 * ideal || amp > 1.1 * ideal) begin failures++; $display("FAIL derivative gain"); end
    configure(-0.6);
    run_sine(250, -0.6, 1.0);
    ideal = (2.0 * 3.14159265358979 * 20.0) ** -0.6;
    $display("gamma -0.6: amplitude %.4f V, ideal %.4f V; output crosses zero %0d samples after the input (ideal 54 deg = 15)",
             amp, ideal, zc - 200);
    checks++;
    if (zc - 200 < 8 || zc - 200 > 17) begin failures++; $display("FAIL integral phase"); end
    checks++;
    if (amp < 0.7 * ideal || amp > 1.3 * ideal) begin failures++; $display("FAIL integral gain"); end
    // near-full derivative: 50 mV in, so that about 6 V comes out unclipped
    configure(0.99);
    run_sine(250, 0.99, 0.05);
    ideal = 0.05 * (2.0 * 3.14159265358979 * 20.0) ** 0.99;
    $display("gamma 0.99: amplitude %.4f V, ideal %.4f V; output crosses zero %0d samples before the input (ideal 89 deg = 24.7)",
             amp, ideal, 200 - zc);
    checks++;
    if (amp < 0.9 * ideal || amp > 1.1 * ideal) begin failures++; $display("FAIL gamma 0.99 gain"); end
    checks++;
    if (200 - zc < 23 || 200 - zc > 26) begin failures++; $display("FAIL gamma 0.99 phase"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

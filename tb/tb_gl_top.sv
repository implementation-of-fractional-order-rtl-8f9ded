// tb_gl_top: end-to-end test of the fractional differintegral operator at
// its default size (L = 100), with a short sampling period so that it runs
// quickly (the period is an input, not a parameter).
//
// The input is a 1 V, 20 Hz sine or square wave sampled at T = 0.5 ms
// (100 samples per cycle of the wave); the input code is advanced after
// every output. A floating-point model in the testbench keeps its own
// window of input volts (code / 3276.7), computes the weights as
// prod (k - 1 - gamma) / k and the gain as exp(-gamma * ln T), and predicts
// every output; outputs and DAC codes are compared with it.
//
// Scenarios, each a configuration of the operator:
//   gamma =  0.2  sine   fractional derivative; reports the settled gain
//   gamma =  0.2  square fractional derivative of a square wave
//   short period         a sampling tick during an iteration -> overrun
//   gamma = -0.6  square fractional integral (mode switch by cfg_load)
//   gamma =  0.99 sine   nearly a full derivative: output beyond +-64 V and
//                        +-10 V, so out_sat and dac_sat
//   gamma =  2.0         gamma * ln T = 15.2 > 10: range_err, gain clamped
// Each mechanism must occur at least once. The sampling rate is checked
// (one output per period) as is the iteration time.
module tb_gl_top;
  import gl_pkg::*;
  localparam int L = 100;
  localparam real T = 0.0005;

  logic clk = 1'b0, rst_n = 1'b0, cfg_load = 1'b0;
  data_t gamma = '0, ln_t = '0;
  logic [31:0] period = 32'd250;
  adc_t adc_code = '0, dac_code;
  logic dac_valid, y_valid, ready, busy, settled, overrun, range_err, out_sat, dac_sat;
  data_t y;

  gl_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_cfg = 0, n_settle = 0, n_ovr = 0, n_rerr = 0, n_osat = 0, n_dsat = 0, n_out = 0;
  real hist [L];
  real g_model, s_model, b_model [L];
  real held_v;
  real y_exp;
  int  last_y_cyc = -1, busy_len = 0, busy_len_ref = -1;
  logic settled_q = 1'b0;
  real amp;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #50000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic data_t q17(input real v);
    return data_t'($rtoi(v * 131072.0 + (v < 0 ? -0.5 : 0.5)));
  endfunction

  function automatic real wave(input int kind, input int n, input real a);
    real ph = 2.0 * 3.14159265358979 * real'(n % 100) / 100.0;
    if (kind == 0) return a * $sin(ph);
    return (n % 100 < 50) ? a : -a;
  endfunction

  // ---- model: advance on every output ---------------------------------
  task automatic model_step();
    real s = 0.0;
    for (int j = L - 1; j > 0; j--) hist[j] = hist[j-1];
    hist[0] = held_v;
    for (int j = 0; j < L; j++) s += b_model[j] * hist[j];
    y_exp = s * s_model;
    if (y_exp > 64.0 - 1.0 / 131072.0) y_exp = 64.0 - 1.0 / 131072.0;
    if (y_exp < -64.0) y_exp = -64.0;
  endtask

  // ---- monitors ----------------------------------------------------------
  always @(posedge clk) if (rst_n) begin
    if (overrun) n_ovr++;
    if (settled && !settled_q) n_settle++;
    settled_q <= settled;
    if (busy) busy_len <= busy_len + 1;
    else if (busy_len != 0) begin
      if (busy_len_ref < 0) busy_len_ref = busy_len;
      checks++;
      if (busy_len != busy_len_ref || busy_len != L + 8) begin
        failures++; $display("FAIL iteration took %0d cycles (first %0d)", busy_len, busy_len_ref);
      end
      busy_len <= 0;
    end
  end

  // ---- configuration -----------------------------------------------------
  task automatic configure(input real g);
    real gq, lq, a;
    gamma = q17(g);
    ln_t  = q17($ln(T));
    gq = real'(gamma) / 131072.0;
    lq = real'(ln_t) / 131072.0;
    b_model[0] = 1.0;
    for (int j = 1; j < L; j++) b_model[j] = b_model[j-1] * (real'(j) - 1.0 - gq) / real'(j);
    a = -gq * lq;
    if (a > 10.0) a = 10.0;
    if (a < -10.0) a = -10.0;
    s_model = $exp(a);
    for (int j = 0; j < L; j++) hist[j] = 0.0;
    g_model = gq;
    @(negedge clk); cfg_load = 1'b1;
    @(negedge clk); cfg_load = 1'b0;
    @(posedge clk iff ready);
    n_cfg++;
    if (range_err) n_rerr++;
    checks++;
    if (range_err != ((-gq * lq) > 10.0 || (-gq * lq) < -10.0)) begin
      failures++; $display("FAIL range_err %0b for gamma %f", range_err, gq);
    end
    last_y_cyc = -1;
  endtask

  // ---- run n samples of a waveform --------------------------------------
  task automatic run(input int kind, input int nsamp, input real a, input int start_n);
    real tol, gotv, dexp;
    amp = 0.0;
    last_y_cyc = -1;             // the first spacing after a period change is not checked
    for (int n = 0; n < nsamp; n++) begin
      adc_code = adc_t'($rtoi(wave(kind, start_n + n, a) * 3276.7 + 32768.5) - 32768);
      held_v = real'(adc_code) / 3276.7;
      @(posedge clk iff y_valid);
      if (last_y_cyc >= 0 && period >= 32'(L + 10)) begin
        checks++;
        if (cyc - last_y_cyc != int'(period)) begin
          failures++; $display("FAIL output spacing %0d, period %0d", cyc - last_y_cyc, period);
        end
      end
      last_y_cyc = cyc;
      model_step();
      n_out++;
      gotv = real'(y) / 131072.0;
      tol = 5.0e-4 + 2.0e-4 * s_model + 1.0e-4 * (y_exp < 0 ? -y_exp : y_exp);
      checks++;
      if (gotv - y_exp > tol || y_exp - gotv > tol) begin
        failures++; $display("FAIL gamma %f sample %0d: y %f expected %f", g_model, n, gotv, y_exp);
      end
      if (out_sat) n_osat++;
      if (n >= nsamp - 100 && (gotv > amp || -gotv > amp)) amp = (gotv > 0) ? gotv : -gotv;
      @(posedge clk iff dac_valid);
      dexp = gotv * 3276.7;
      if (dexp > 32767.0) dexp = 32767.0;
      if (dexp < -32768.0) dexp = -32768.0;
      checks++;
      if (real'(dac_code) - dexp > 0.51 || dexp - real'(dac_code) > 0.51) begin
        failures++; $display("FAIL dac code %0d for %f V", dac_code, gotv);
      end
      if (dac_sat) n_dsat++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1'b1;

    configure(0.2);
    run(0, 250, 1.0, 0);
    $display("gamma 0.2, 20 Hz sine of 1 V: output amplitude %.3f V (ideal (2*pi*20)^0.2 = 2.63)", amp);
    checks++;
    if (amp < 2.4 || amp > 2.8) begin failures++; $display("FAIL derivative gain"); end

    configure(0.2);
    run(1, 150, 1.0, 0);
    $display("gamma 0.2, 20 Hz square of 1 V: output peak %.3f V", amp);

    // sampling interval shorter than one iteration
    period = 32'd60;
    run(0, 10, 1.0, 250);
    period = 32'd250;
    run(0, 5, 1.0, 260);

    configure(-0.6);
    run(1, 250, 1.0, 0);
    $display("gamma -0.6, 20 Hz square of 1 V: output peak %.4f V", amp);
    configure(-0.6);
    run(0, 250, 1.0, 0);
    $display("gamma -0.6, 20 Hz sine of 1 V: output amplitude %.4f V (ideal 1/18.18 = 0.055)", amp);
    checks++;
    if (amp < 0.03 || amp > 0.07) begin failures++; $display("FAIL integral gain"); end

    configure(0.99);
    run(0, 150, 1.0, 0);

    configure(2.0);
    run(0, 20, 0.001, 0);

    $display("iteration (busy) %0d cycles", busy_len_ref);
    $display("configurations %0d, settled %0d, outputs %0d, overruns %0d, range errors %0d, out_sat %0d, dac_sat %0d",
             n_cfg, n_settle, n_out, n_ovr, n_rerr, n_osat, n_dsat);
    checks++; if (n_settle < 3) begin failures++; $display("FAIL transient end not seen"); end
    checks++; if (n_ovr < 1)    begin failures++; $display("FAIL no overrun"); end
    checks++; if (n_rerr < 1)   begin failures++; $display("FAIL no range error"); end
    checks++; if (n_osat < 1)   begin failures++; $display("FAIL no output saturation"); end
    checks++; if (n_dsat < 1)   begin failures++; $display("FAIL no DAC saturation"); end
    checks++; if (n_cfg < 5)    begin failures++; $display("FAIL too few mode switches"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_scale_factor: checks T^-gamma for T = 0.5 ms and the orders used by the
// operator (0.2 -> 4.573, -0.6 -> 0.01038, 0.99 -> 1853), for T = 1 ms and
// T = 0.1 s, and random orders, against pow(T, -gamma) in floating point
// with the Q7.17-quantised gamma and ln T, to a relative error of 1e-4.
// Also checks the clamp: gamma*ln T beyond +-10 sets range_err and gives
// e^+-10.
module tb_scale_factor;
  import gl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done, range_err;
  data_t gamma = '0, ln_t = '0;
  wide_t scale;
  int checks = 0, failures = 0, nclamp = 0;

  scale_factor dut (.clk, .rst_n, .start, .gamma, .ln_t, .busy, .done, .scale, .range_err);
  always #5 clk = ~clk;

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic data_t q17(input real v);
    return data_t'($rtoi(v * 131072.0 + (v < 0 ? -0.5 : 0.5)));
  endfunction

  task automatic one(input real g, input real t);
    real got, e, a;
    bit  clamp;
    gamma = q17(g);
    ln_t  = q17($ln(t));
    a = -(real'(gamma) / 131072.0) * (real'(ln_t) / 131072.0);
    clamp = (a > 10.0 || a < -10.0);
    if (a > 10.0) a = 10.0;
    if (a < -10.0) a = -10.0;
    e = $exp(a);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    @(posedge clk iff done); #1;
    got = real'(scale) / 268435456.0;
    checks++;
    if (got - e > e * 1.0e-4 + 1.0e-8 || e - got > e * 1.0e-4 + 1.0e-8 || range_err != clamp) begin
      failures++;
      $display("FAIL gamma %f T %f: got %.8f expected %.8f range_err %0b", g, t, got, e, range_err);
    end
    if (clamp) nclamp++;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    one(0.2, 0.0005); one(-0.6, 0.0005); one(0.99, 0.0005); one(0.0, 0.0005);
    one(0.2, 0.001); one(-0.6, 0.1); one(1.0, 0.0001);
    repeat (50) one(real'($urandom_range(0, 2000)) / 1000.0 - 1.0, 0.0005);
    one(2.0, 0.0005); one(-2.0, 0.0005);
    checks++;
    if (nclamp != 2) begin failures++; $display("FAIL clamp cases %0d", nclamp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

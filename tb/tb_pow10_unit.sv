// tb_pow10_unit: compares pow10_unit with a**10 in floating point for a in
// [e^-1, e] (the range the scale-factor path uses) to a relative error of
// 2e-6 plus one Q20.28 step, checks the 4-cycle latency, and checks that a
// result beyond the Q20.28 range saturates with ovf set.
module tb_pow10_unit;
  import gl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done, ovf;
  wide_t a = '0, y;
  int checks = 0, failures = 0, cyc = 0;

  pow10_unit dut (.clk, .rst_n, .start, .a, .busy, .done, .y, .ovf);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(input real av, input bit exp_ovf);
    int t0;  // cycle count is taken at the negedge before start is sampled and read
             // on the edge that samples done: 2 more than the latency
    real got, e, ar;
    a = wide_t'(longint'(av * 268435456.0));
    ar = real'(a) / 268435456.0;
    @(negedge clk); start = 1'b1; t0 = cyc;
    @(negedge clk); start = 1'b0;
    @(posedge clk iff done); #1;
    got = real'(y) / 268435456.0;
    e   = ar ** 10;
    checks++;
    if (cyc - t0 != 4 + 2) begin failures++; $display("FAIL latency %0d", cyc - t0); end
    checks++;
    if (ovf != exp_ovf) begin failures++; $display("FAIL ovf %0b for %f", ovf, av); end
    if (!exp_ovf) begin
      checks++;
      if (got - e > e * 2.0e-6 + 4.0e-9 || e - got > e * 2.0e-6 + 4.0e-9) begin
        failures++; $display("FAIL %f^10: got %.10f expected %.10f", av, got, e);
      end
    end else begin
      checks++;
      if (y != wide_t'({1'b0, {(WIDE_W-1){1'b1}}})) begin failures++; $display("FAIL not saturated"); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    one(1.0, 0); one(2.718281828, 0); one(0.367879441, 0); one(1.5, 0); one(-1.2, 0);
    repeat (100) one(0.367879441 + real'($urandom_range(0, 1000000)) / 1.0e6 * 2.3504, 0);
    one(4.0, 1); one(10.0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

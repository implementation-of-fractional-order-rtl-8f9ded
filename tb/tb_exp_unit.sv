// tb_exp_unit: compares exp_unit with the floating-point exponential for
// x = -1, 0, +1 and random arguments in [-1, 1]; the result must agree to
// 4e-8 absolute (about ten Q20.28 steps) and arrive N_TERMS = 12 cycles
// after start.
module tb_exp_unit;
  import gl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  wide_t x = '0, y;
  int checks = 0, failures = 0, cyc = 0;

  exp_unit dut (.clk, .rst_n, .start, .x, .busy, .done, .y);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(input real xv);
    int t0;  // cycle count is taken at the negedge before start is sampled and read
             // on the edge that samples done: 2 more than the latency
    real got, e;
    x = wide_t'($rtoi(xv * 268435456.0));
    @(negedge clk); start = 1'b1; t0 = cyc;
    @(negedge clk); start = 1'b0;
    @(posedge clk iff done); #1;
    got = real'(y) / 268435456.0;
    e   = $exp(real'(x) / 268435456.0);
    checks++;
    if (cyc - t0 != 12 + 2) begin failures++; $display("FAIL latency %0d", cyc - t0); end
    checks++;
    if (got - e > 4.0e-8 || e - got > 4.0e-8) begin
      failures++; $display("FAIL exp(%f): got %.10f expected %.10f", xv, got, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    one(-1.0); one(0.0); one(1.0); one(0.5); one(-0.1520);
    repeat (100) one(real'($urandom_range(0, 2000000)) / 1.0e6 - 1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

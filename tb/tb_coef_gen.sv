// tb_coef_gen: checks the binomial weights produced by coef_gen for the
// orders used by the operator (0.2, -0.6, 0.99) and a few random ones.
// The reference is (-1)^j * binom(gamma, j), evaluated in floating point
// from the product formula prod_{k=1..j} (k - 1 - gamma) / k with the
// Q7.17-quantised gamma; every weight must agree within 2e-7 and arrive at
// address j, in order, once. Also checks done and the run time.
module tb_coef_gen;
  import gl_pkg::*;
  localparam int L = 100;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, we, done;
  data_t gamma = '0;
  logic [$clog2(L)-1:0] waddr;
  coef_t wdata;
  int checks = 0, failures = 0;
  int nwr, cyc;
  real gq;

  coef_gen dut (.clk, .rst_n, .start, .gamma, .busy, .we, .waddr, .wdata, .done);
  always #5 clk = ~clk;

  initial begin
    #50000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real ref_b(input real g, input int j);
    real r = 1.0;
    for (int k = 1; k <= j; k++) r = r * (real'(k) - 1.0 - g) / real'(k);
    return r;
  endfunction

  always @(posedge clk) if (rst_n && we) begin
    real got, e;
    got = real'(wdata) / real'(64'd1 << COEF_F);
    e   = ref_b(gq, nwr);
    checks++;
    if (int'(waddr) != nwr || got - e > 2.0e-7 || e - got > 2.0e-7) begin
      failures++;
      $display("FAIL gamma %f j %0d addr %0d: got %.9f expected %.9f", gq, nwr, waddr, got, e);
    end
    nwr <= nwr + 1;
  end

  task automatic run(input real g);
    int t0;
    gamma = data_t'($rtoi(g * 131072.0 + (g < 0 ? -0.5 : 0.5)));
    gq = real'(gamma) / 131072.0;
    nwr = 0;
    @(negedge clk); start = 1'b1; t0 = cyc;
    @(negedge clk); start = 1'b0;
    @(posedge clk iff done);
    #1;
    checks++;
    if (nwr != L) begin failures++; $display("FAIL %0d weights written", nwr); end
    checks++;
    if (cyc - t0 > L * 62) begin failures++; $display("FAIL took %0d cycles", cyc - t0); end
    $display("gamma %f: b1 %f b99 %e, %0d cycles", gq, ref_b(gq, 1), ref_b(gq, L - 1), cyc - t0);
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    cyc = 0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    run(0.2); run(-0.6); run(0.99); run(1.0); run(-1.0);
    repeat (3) run(real'($urandom_range(0, 2900)) / 1000.0 - 1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

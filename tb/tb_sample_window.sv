// tb_sample_window: checks the short memory of L = 100 samples. After a
// clear every lag reads zero; then random samples are pushed and, after each
// push, random lags are read and compared with a reference history kept in
// the testbench (x[n-j], zero where fewer than j+1 samples were pushed).
// Also checks that the clear takes L cycles and that pushes wrap around the
// buffer more than once.
module tb_sample_window;
  import gl_pkg::*;
  localparam int L = 100;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, push = 1'b0, rd_en = 1'b0, clearing;
  data_t din = '0, rd_data;
  logic [$clog2(L)-1:0] rd_lag = '0;
  int checks = 0, failures = 0;
  data_t hist[$];

  sample_window dut (.clk, .rst_n, .clear, .clearing, .push, .din, .rd_en, .rd_lag, .rd_data);
  always #5 clk = ~clk;

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic rd(input int j);
    data_t e;
    @(negedge clk); rd_lag = ($clog2(L))'(j); rd_en = 1'b1;
    @(negedge clk); rd_en = 1'b0;
    e = (j < hist.size()) ? hist[j] : '0;
    checks++;
    if (rd_data !== e) begin failures++; $display("FAIL lag %0d: got %0d expected %0d", j, rd_data, e); end
  endtask

  task automatic do_clear();
    int n;
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0; n = 0;
    while (clearing) begin @(negedge clk); n++; end
    checks++;
    if (n != L) begin failures++; $display("FAIL clear took %0d cycles", n); end
    hist.delete();
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    do_clear();
    for (int j = 0; j < L; j += 7) rd(j);
    for (int n = 0; n < 3 * L + 17; n++) begin
      @(negedge clk); din = data_t'($urandom); push = 1'b1;
      hist.push_front(din);
      if (hist.size() > L) void'(hist.pop_back());
      @(negedge clk); push = 1'b0;
      rd(0);
      rd(int'($urandom_range(0, L - 1)));
    end
    for (int j = 0; j < L; j++) rd(j);
    do_clear();
    rd(0); rd(L - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

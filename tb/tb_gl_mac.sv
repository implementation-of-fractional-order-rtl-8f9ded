// tb_gl_mac: checks the serial multiply-accumulate. The testbench plays the
// sample window and the coefficient memory (one-cycle read latency, indexed
// by rd_idx) with random Q7.17 samples and Q4.28 weights, and compares acc
// with the exact integer sum of products. Also checks that each index
// 0..L-1 is read exactly once per run, that done comes L+1 cycles after
// start, and that a start while busy is ignored.
module tb_gl_mac;
  import gl_pkg::*;
  localparam int L = 100;
  localparam int ACC_W = DATA_W + COEF_W + $clog2(L);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, rd_en, done;
  logic [$clog2(L)-1:0] rd_idx;
  data_t x;
  coef_t b;
  logic signed [ACC_W-1:0] acc;
  data_t xs [L];
  coef_t bs [L];
  int reads [L];
  int checks = 0, failures = 0, cyc = 0;

  gl_mac dut (.clk, .rst_n, .start, .busy, .rd_en, .rd_idx, .x, .b, .done, .acc);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rd_en) begin
    x <= xs[rd_idx];
    b <= bs[rd_idx];
    reads[rd_idx] <= reads[rd_idx] + 1;
  end

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      logic signed [127:0] e;
      int t0;  // cycle count is taken at the negedge before start is sampled and read
               // on the edge that samples done: 2 more than the latency
      e = '0;
      for (int i = 0; i < L; i++) begin
        xs[i] = (t == 0) ? DATA_MAX : data_t'($urandom);
        bs[i] = (t == 0) ? COEF_MIN : coef_t'($urandom);
        reads[i] = 0;
        e += 128'(xs[i]) * 128'(bs[i]);
      end
      @(negedge clk); start = 1'b1; t0 = cyc;
      @(negedge clk); start = 1'b0;
      repeat (5) @(negedge clk);
      start = 1'b1;                    // ignored: busy
      @(negedge clk); start = 1'b0;
      @(posedge clk iff done);
      #1;
      checks++;
      if (cyc - t0 != L + 1 + 2) begin failures++; $display("FAIL latency %0d", cyc - t0); end
      checks++;
      if (128'(acc) != e) begin failures++; $display("FAIL run %0d: acc %0d expected %0d", t, acc, e); end
      for (int i = 0; i < L; i++) begin
        checks++;
        if (reads[i] != 1) begin failures++; $display("FAIL index %0d read %0d times", i, reads[i]); end
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

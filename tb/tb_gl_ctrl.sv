// tb_gl_ctrl: checks the sequencing of gl_ctrl with L = 4. Small models
// stand in for the configuration jobs (busy for a few cycles after their
// start) and for the per-sample units (fixed latencies). The testbench
// checks that a cfg_load starts all three jobs together, that ready rises
// only after all have finished, that each tick produces sample_req, push,
// mac_start and out_start once and in that order, that busy covers the
// iteration, that settled rises with the L-th sample, that a cfg_load
// during an iteration is ignored and a later one restarts the
// configuration and clears settled.
module tb_gl_ctrl;
  localparam int L = 4;
  logic clk = 1'b0, rst_n = 1'b0, cfg_load = 1'b0, tick = 1'b0;
  logic coef_start, coef_busy, scale_start, scale_busy, win_clear, win_clearing;
  logic sample_req, sample_valid, win_push, mac_start, mac_done, out_start, out_valid;
  logic ready, busy, settled;
  int checks = 0, failures = 0;
  int coef_cnt = 0, scale_cnt = 0, clr_cnt = 0, mac_cnt = 0;
  int seq[$];

  gl_ctrl #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  // job models
  always @(posedge clk) begin
    if (coef_start) coef_cnt <= 30; else if (coef_cnt > 0) coef_cnt <= coef_cnt - 1;
    if (scale_start) scale_cnt <= 10; else if (scale_cnt > 0) scale_cnt <= scale_cnt - 1;
    if (win_clear) clr_cnt <= L; else if (clr_cnt > 0) clr_cnt <= clr_cnt - 1;
    sample_valid <= sample_req;
    out_valid    <= out_start;
    if (mac_start) mac_cnt <= L + 1; else if (mac_cnt > 0) mac_cnt <= mac_cnt - 1;
    mac_done <= (mac_cnt == 1);
    if (sample_req) seq.push_back(1);
    if (win_push)   seq.push_back(2);
    if (mac_start)  seq.push_back(3);
    if (out_start)  seq.push_back(4);
  end
  assign coef_busy    = coef_cnt > 0;
  assign scale_busy   = scale_cnt > 0;
  assign win_clearing = clr_cnt > 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic configure();
    @(negedge clk); cfg_load = 1'b1;
    @(negedge clk); cfg_load = 1'b0;
    check(coef_start && scale_start && win_clear, "three jobs start together");
    check(!ready, "not ready during configuration");
    repeat (20) @(negedge clk);
    check(!ready, "still waiting for the slowest job");
    repeat (15) @(negedge clk);
    check(ready && !busy, "ready after all jobs");
  endtask

  task automatic one_sample(input int n);
    int iter;
    seq.delete();
    @(negedge clk); tick = 1'b1;
    @(negedge clk); tick = 1'b0;
    check(busy, "busy after tick");
    iter = 0;
    while (busy && iter < 100) begin @(negedge clk); iter++; end
    check(seq.size() == 4 && seq[0] == 1 && seq[1] == 2 && seq[2] == 3 && seq[3] == 4,
          "one request, push, mac start, out start in order");
    check(settled == (n >= L), "settled after L samples");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    check(!ready, "not ready out of reset");
    @(negedge clk); tick = 1'b1;                 // ignored: not configured
    @(negedge clk); tick = 1'b0;
    check(!busy && !sample_req, "tick ignored before configuration");
    configure();
    for (int n = 1; n <= L + 2; n++) one_sample(n);
    // cfg_load during an iteration is ignored
    @(negedge clk); tick = 1'b1;
    @(negedge clk); tick = 1'b0; cfg_load = 1'b1;
    @(negedge clk); cfg_load = 1'b0;
    check(!coef_start && busy, "cfg_load ignored while busy");
    while (busy) @(negedge clk);
    configure();
    check(!settled, "settled cleared by reconfiguration");
    one_sample(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

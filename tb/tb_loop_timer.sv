// tb_loop_timer: checks the sampling-tick spacing and the overrun path of
// loop_timer. With period = 7 the ticks must be exactly 7 cycles apart and
// the first must come 7 cycles after enable; while `busy` is held high an
// expiry must give `overrun` and no tick; period 0 and 1 behave as 2.
module tb_loop_timer;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, busy = 1'b0;
  logic [31:0] period = 32'd7;
  logic tick, overrun;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, nticks = 0, novr = 0;

  loop_timer dut (.clk, .rst_n, .enable, .period, .busy, .tick, .overrun);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int en_cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); enable = 1'b1; en_cyc = cyc;
    // five ticks at period 7
    for (int i = 0; i < 5; i++) begin
      @(posedge clk iff tick);
      if (i == 0) check(cyc - en_cyc == 7, "first tick 7 cycles after enable");
      else        check(cyc - last_tick == 7, "tick spacing 7");
      check(!overrun, "no overrun while idle");
      last_tick = cyc;
    end
    // busy: the next expiry is an overrun, not a tick
    @(negedge clk); busy = 1'b1;
    @(posedge clk iff (tick || overrun));
    check(overrun && !tick, "overrun instead of tick while busy");
    check(cyc - last_tick == 7, "overrun at the period boundary");
    last_tick = cyc;
    @(negedge clk); busy = 1'b0;
    @(posedge clk iff tick);
    check(cyc - last_tick == 7, "tick resumes after overrun");
    // period 1 acts as 2
    @(negedge clk); period = 32'd1;
    @(posedge clk iff tick); last_tick = cyc;
    @(posedge clk iff tick);
    check(cyc - last_tick == 2, "minimum period of 2");
    // disable stops ticks
    @(negedge clk); enable = 1'b0;
    repeat (2) @(posedge clk);
    nticks = 0;
    repeat (20) begin @(posedge clk); if (tick) nticks++; end
    check(nticks == 0, "no ticks while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

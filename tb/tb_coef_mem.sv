// tb_coef_mem: writes random weights to every address of coef_mem, reads
// them back in a different order, and checks the one-cycle read latency
// and that a read with rd_en low leaves rdata unchanged.
module tb_coef_mem;
  import gl_pkg::*;
  localparam int L = 100;
  logic clk = 1'b0, we = 1'b0, rd_en = 1'b0;
  logic [$clog2(L)-1:0] waddr = '0, raddr = '0;
  coef_t wdata = '0, rdata;
  coef_t ref_m [L];
  int checks = 0, failures = 0;

  coef_mem dut (.clk, .we, .waddr, .wdata, .rd_en, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < L; i++) begin
      @(negedge clk); we = 1'b1; waddr = 7'(i); wdata = coef_t'($urandom); ref_m[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int k = 0; k < L; k++) begin
      int i = (k * 37) % L;
      @(negedge clk); rd_en = 1'b1; raddr = 7'(i);
      @(negedge clk); rd_en = 1'b0;
      checks++;
      if (rdata !== ref_m[i]) begin failures++; $display("FAIL addr %0d", i); end
      raddr = 7'((i + 1) % L);
      @(negedge clk);
      checks++;
      if (rdata !== ref_m[i]) begin failures++; $display("FAIL rdata changed without rd_en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

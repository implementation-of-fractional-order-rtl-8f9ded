// gl_mac: the weighted sum of the Grunwald-Letnikov operator,
//
//     acc = sum_{j=0}^{L-1} b_j * x[n-j]
//
// computed with one multiplier, one term per clock cycle. On `start` it
// issues read index j = 0 .. L-1 to both the coefficient memory (`rd_idx`
// as address) and the sample window (`rd_idx` as lag); both return their
// word one cycle later, and the product is added to the accumulator in that
// cycle. `done` pulses with `acc` valid L+1 cycles after `start`, and `acc`
// holds its value until the next start. The accumulator has
// DATA_W+COEF_W+clog2(L) bits, so it cannot overflow; its binary point is
// at DATA_F+COEF_F.
//
// The sum over L stored samples with precomputed weights is the operator's;
// the serial one-multiplier schedule is this design's choice, which makes
// the iteration time L+1 clock cycles.
module gl_mac
  import gl_pkg::*;
#(
  parameter int unsigned L     = 100,
  parameter int unsigned ACC_W = DATA_W + COEF_W + $clog2(L)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    rd_en,
  output logic [$clog2(L)-1:0]    rd_idx,
  input  data_t                   x,
  input  coef_t                   b,
  output logic                    done,
  output logic signed [ACC_W-1:0] acc
);

  localparam int unsigned AW = $clog2(L);
  localparam logic [AW-1:0] LAST = AW'(L - 1);

  logic issuing;
  logic data_vld;
  logic last_vld;
  logic signed [DATA_W+COEF_W-1:0] prod;

  assign rd_en = issuing;
  assign busy  = issuing || data_vld;
  assign prod  = x * b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      rd_idx   <= '0;
      data_vld <= 1'b0;
      last_vld <= 1'b0;
      done     <= 1'b0;
      acc      <= '0;
    end else begin
      data_vld <= issuing;
      last_vld <= issuing && (rd_idx == LAST);
      done     <= data_vld && last_vld;
      if (start && !busy) begin
        issuing <= 1'b1;
        rd_idx  <= '0;
        acc     <= '0;
      end else begin
        if (issuing) begin
          if (rd_idx == LAST) issuing <= 1'b0;
          else                rd_idx  <= rd_idx + AW'(1);
        end
        if (data_vld) acc <= acc + ACC_W'(prod);
      end
    end
  end

  // the accumulator is only cleared by a start that is taken
  a_done_after_data: assert property (@(posedge clk) disable iff (!rst_n) done |-> !issuing)
    else $error("gl_mac: done while still issuing reads");

endmodule

// ppi_dp: dot-product unit of the Pixel Purity Index array.
//
// Computes dp = sum over d of SKEWER[k][d] * PIXEL[n][d] for one skewer k
// and one pixel n, one dimension per cycle: the skewer element is signed
// 3-bit, the pixel element unsigned 8-bit, as in the text. in_first marks
// dimension 0 and restarts the sum; in_last marks dimension D-1. The cycle
// after in_last, done is high for one cycle and dp holds the finished dot
// product; dp keeps that value until the next in_first element arrives.
// The accumulator width (enough for D dimensions without overflow) is this
// design's choice.
module ppi_dp #(
  parameter int PIX_W = 8,
  parameter int SKW_W = 3,
  parameter int D     = 16,
  parameter int DP_W  = PIX_W + SKW_W + $clog2(D) + 1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic                   in_first,
  input  logic                   in_last,
  input  logic [PIX_W-1:0]       pixel,
  input  logic signed [SKW_W-1:0] skewer,
  output logic                   done,
  output logic signed [DP_W-1:0] dp
);
  logic signed [PIX_W+SKW_W-1:0] prod;

  assign prod = $signed({1'b0, pixel}) * skewer;

  always_ff @(posedge clk) begin
    if (rst) begin
      dp   <= '0;
      done <= 1'b0;
    end else begin
      done <= in_valid && in_last;
      if (in_valid) dp <= (in_first ? '0 : dp) + DP_W'(prod);
    end
  end
endmodule

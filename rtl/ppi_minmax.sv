// ppi_minmax: extrema detector of one skewer row of the PPI array.
//
// Dot products arrive one per cycle with the index of their pixel. The unit
// keeps the largest dot product and its pixel index (Max, IdxMax) and the
// smallest (Min, IdxMin) seen since clr. On equal values the smaller pixel
// index is kept, which gives the same answer as scanning pixels in order
// with strict comparisons. The first value after clr always loads both.
//
// Result chain: the MinMax units of the array are chained, the bottom one
// fed with zero. load copies the unit's current result into its chain
// register; shift moves every chain register one row towards the top, so
// the top of the column delivers the results of row 0, 1, ... on
// successive shift cycles. Result word layout (this design's choice):
// {max, idxmax, min, idxmin}.
module ppi_minmax #(
  parameter int DP_W  = 16,
  parameter int IDX_W = 16,
  parameter int RES_W = 2 * (DP_W + IDX_W)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   clr,
  input  logic                   in_valid,
  input  logic signed [DP_W-1:0] in_dp,
  input  logic [IDX_W-1:0]       in_idx,
  output logic signed [DP_W-1:0] max_dp,
  output logic [IDX_W-1:0]       max_idx,
  output logic signed [DP_W-1:0] min_dp,
  output logic [IDX_W-1:0]       min_idx,
  input  logic                   load,
  input  logic                   shift,
  input  logic [RES_W-1:0]       chain_in,
  output logic [RES_W-1:0]       chain_out
);
  logic have;

  always_ff @(posedge clk) begin
    if (rst) begin
      have      <= 1'b0;
      max_dp    <= '0;
      max_idx   <= '0;
      min_dp    <= '0;
      min_idx   <= '0;
      chain_out <= '0;
    end else begin
      if (clr) have <= 1'b0;
      else if (in_valid) begin
        have <= 1'b1;
        if (!have || in_dp > max_dp || (in_dp == max_dp && in_idx < max_idx)) begin
          max_dp  <= in_dp;
          max_idx <= in_idx;
        end
        if (!have || in_dp < min_dp || (in_dp == min_dp && in_idx < min_idx)) begin
          min_dp  <= in_dp;
          min_idx <= in_idx;
        end
      end
      if (load)       chain_out <= {max_dp, max_idx, min_dp, min_idx};
      else if (shift) chain_out <= chain_in;
    end
  end
endmodule

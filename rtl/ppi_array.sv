// ppi_array: the KS x NS dot-product grid of the Pixel Purity Index engine.
//
// Row r computes the dot products of skewer k+r; column c those of pixel
// n+c. Each cycle every row receives one dimension of its skewer and every
// column one dimension of its pixel, so after D cycles the grid has
// computed KS*NS dot products at once. Each row then copies its NS results,
// with their pixel indices, into a shift register that moves them one per
// cycle into the row's MinMax unit, while the DP units already work on the
// next NS pixels. The shift register must be empty before the next batch is
// done, hence D >= NS. The MinMax units form a column whose result chain is
// read from the top (row 0 first, zero shifted in at the bottom).
//
// Interface: in_pix packs NS pixel elements (column c in bits
// [c*PIX_W +: PIX_W]), in_skw packs KS skewer elements (row r in bits
// [r*SKW_W +: SKW_W]); in_base is the index of the column-0 pixel. clr starts
// a new skewer pass, dump loads the MinMax results into the chain and then
// shifts them out over KS cycles on res_valid/res.
// Timing: a batch's dot products are in the MinMax units NS+2 cycles after
// its in_last element; give the column those cycles before dump.
// KS and NS defaults (2 x 4 = 8 dot products) are this design's split of the
// eight parallel dot products of the hand-built version; NS = 4 matches four
// 8-bit pixels per 32-bit memory word. D is not given and defaults to 16.
module ppi_array #(
  parameter int KS    = 2,
  parameter int NS    = 4,
  parameter int D     = 16,
  parameter int PIX_W = 8,
  parameter int SKW_W = 3,
  parameter int IDX_W = 16,
  parameter int DP_W  = PIX_W + SKW_W + $clog2(D) + 1,
  parameter int RES_W = 2 * (DP_W + IDX_W)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic [IDX_W-1:0]      in_base,
  input  logic [NS*PIX_W-1:0]   in_pix,
  input  logic [KS*SKW_W-1:0]   in_skw,
  input  logic                  clr,
  input  logic                  dump,
  output logic                  res_valid,
  output logic [RES_W-1:0]      res
);
  logic                   done   [KS][NS];
  logic signed [DP_W-1:0] dp     [KS][NS];
  logic                   sv     [KS][NS];   // shift register valid
  logic signed [DP_W-1:0] sdp    [KS][NS];
  logic [IDX_W-1:0]       sidx   [KS][NS];
  logic [IDX_W-1:0]       base_q;
  logic [RES_W-1:0]       chain  [KS+1];
  logic [$clog2(KS+1)-1:0] out_cnt;
  logic                   shifting;

  always_ff @(posedge clk)
    if (in_valid && in_last) base_q <= in_base;

  for (genvar r = 0; r < KS; r++) begin : g_row
    for (genvar c = 0; c < NS; c++) begin : g_col
      ppi_dp #(.PIX_W(PIX_W), .SKW_W(SKW_W), .D(D), .DP_W(DP_W)) u_dp (
        .clk, .rst, .in_valid, .in_first, .in_last,
        .pixel (in_pix[c*PIX_W +: PIX_W]),
        .skewer(in_skw[r*SKW_W +: SKW_W]),
        .done  (done[r][c]),
        .dp    (dp[r][c]));

      always_ff @(posedge clk) begin
        if (rst) sv[r][c] <= 1'b0;
        else if (done[r][0]) begin
          sv[r][c]   <= 1'b1;
          sdp[r][c]  <= dp[r][c];
          sidx[r][c] <= base_q + IDX_W'(c);
        end else if (c == 0) begin
          sv[r][c] <= 1'b0;
        end else begin
          sv[r][c]   <= sv[r][c-1];
          sdp[r][c]  <= sdp[r][c-1];
          sidx[r][c] <= sidx[r][c-1];
        end
      end
    end

    ppi_minmax #(.DP_W(DP_W), .IDX_W(IDX_W), .RES_W(RES_W)) u_mm (
      .clk, .rst, .clr,
      .in_valid(sv[r][NS-1]), .in_dp(sdp[r][NS-1]), .in_idx(sidx[r][NS-1]),
      .max_dp(), .max_idx(), .min_dp(), .min_idx(),
      .load(dump), .shift(shifting),
      .chain_in(chain[r+1]), .chain_out(chain[r]));
  end

  assign chain[KS] = '0;

  // Read-out of the result column: KS shift cycles after dump.
  always_ff @(posedge clk) begin
    if (rst) begin
      out_cnt  <= '0;
      shifting <= 1'b0;
    end else if (dump) begin
      out_cnt  <= '0;
      shifting <= 1'b1;
    end else if (shifting) begin
      out_cnt  <= out_cnt + 1'b1;
      shifting <= (out_cnt != $bits(out_cnt)'(KS - 1));
    end
  end

  assign res_valid = shifting;
  assign res       = chain[0];

  initial assert (D >= NS) else $error("ppi_array: D must be at least NS");
endmodule

// km_filter: exit stage of the K-means systolic array.
//
// Tokens leave the last processor one per cycle. The filter counts the band
// position of each token; when the last band (NB_BAND-1) of a pixel leaves,
// its left_index is the class with the smallest L1 distance and left_dist
// that distance. The filter then emits one result to the host, registered
// (one cycle latency). Centre tokens and the other bands of a pixel are
// dropped. The result stream has no back-pressure, like the array itself.
module km_filter
  import km_pkg::*;
#(
  parameter int DATA_W  = 8,
  parameter int NB_BAND = 8,
  parameter int DIST_W  = DATA_W + $clog2(NB_BAND) + 1,
  parameter int IDX_W   = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  km_flag_e          in_flag,
  input  logic [DIST_W-1:0] in_dist,
  input  logic [IDX_W-1:0]  in_index,
  output logic              res_valid,
  output logic [IDX_W-1:0]  res_class,
  output logic [DIST_W-1:0] res_dist
);
  localparam int BW = (NB_BAND > 1) ? $clog2(NB_BAND) : 1;
  logic [BW-1:0] band;
  logic          last_band;

  assign last_band = (band == BW'(NB_BAND - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      band      <= '0;
      res_valid <= 1'b0;
      res_class <= '0;
      res_dist  <= '0;
    end else begin
      res_valid <= in_valid && last_band && (in_flag == KM_PIXEL);
      if (in_valid) begin
        band <= last_band ? '0 : band + 1'b1;
        if (last_band && in_flag == KM_PIXEL) begin
          res_class <= in_index;
          res_dist  <= in_dist;
        end
      end
    end
  end
endmodule

// km_front: entry stage of the K-means systolic array.
//
// The host sends a stream of vectors, each NB_BAND elements long, that mixes
// pixels to classify and class centres to load. The front turns every
// element into an array token: a pixel element gets left_dist set to the
// largest representable distance, so the first processor always takes it,
// and left_index 0; a centre element gets left_index set to the class
// number it is destined for, which is how a processor recognises its own
// centre. The token is registered, so the front adds one cycle of latency.
// The array never stalls, so the front is always ready; the host-side
// valid/ready pair is kept so that the stream protocol is explicit.
// The field values are the design's own encoding.
module km_front
  import km_pkg::*;
#(
  parameter int DATA_W  = 8,
  parameter int NB_BAND = 8,
  parameter int DIST_W  = DATA_W + $clog2(NB_BAND) + 1,
  parameter int IDX_W   = 5
) (
  input  logic              clk,
  input  logic              rst,
  // host stream
  input  logic              s_valid,
  output logic              s_ready,
  input  km_flag_e          s_flag,
  input  logic [DATA_W-1:0] s_data,
  input  logic [IDX_W-1:0]  s_class,    // destination class of a centre
  // first processor
  output logic              out_valid,
  output km_flag_e          out_flag,
  output logic [DATA_W-1:0] out_data,
  output logic [DIST_W-1:0] out_dist,
  output logic [IDX_W-1:0]  out_index
);
  assign s_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_flag  <= KM_PIXEL;
      out_data  <= '0;
      out_dist  <= '0;
      out_index <= '0;
    end else begin
      out_valid <= s_valid;
      if (s_valid) begin
        out_flag  <= s_flag;
        out_data  <= s_data;
        out_dist  <= (s_flag == KM_PIXEL) ? '1 : '0;
        out_index <= (s_flag == KM_PIXEL) ? '0 : s_class;
      end
    end
  end
endmodule

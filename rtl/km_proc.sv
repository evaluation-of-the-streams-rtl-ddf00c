// km_proc: one processor of the K-means systolic array.
//
// Each processor owns one class and stores that class centre, a vector of
// NB_BAND values, in a small local memory. Tokens arrive one band per cycle
// from the left neighbour and leave, registered, to the right neighbour.
// A token carries (flag, data, left_dist, left_index):
//   - pixel token: the processor adds |data - centre[d]| to its running
//     distance; if that distance is below the incoming left_dist it replaces
//     left_dist/left_index with its own distance and INDEX. On the last band
//     of a pixel the token therefore carries the minimum distance over this
//     processor and all processors to its left, and the class that has it.
//   - centre token: if left_index equals INDEX the processor writes data into
//     centre[d]; the token passes on unchanged.
// This is the per-element processor program of the heterogeneous-stream
// version of the algorithm. Ties keep the leftmost class (strict "<").
//
// Timing: one token per cycle, one cycle of latency. The band position d is
// counted locally, so every vector must be sent as exactly NB_BAND tokens.
// Choices of this design: data and distance widths, unsigned pixel data,
// synchronous reset of the band counter and distance (centres are not reset).
module km_proc
  import km_pkg::*;
#(
  parameter int DATA_W  = 8,
  parameter int NB_BAND = 8,
  parameter int DIST_W  = DATA_W + $clog2(NB_BAND) + 1,
  parameter int IDX_W   = 5,
  parameter int INDEX   = 0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  km_flag_e          in_flag,
  input  logic [DATA_W-1:0] in_data,
  input  logic [DIST_W-1:0] in_dist,
  input  logic [IDX_W-1:0]  in_index,
  output logic              out_valid,
  output km_flag_e          out_flag,
  output logic [DATA_W-1:0] out_data,
  output logic [DIST_W-1:0] out_dist,
  output logic [IDX_W-1:0]  out_index
);
  localparam int BW = (NB_BAND > 1) ? $clog2(NB_BAND) : 1;
  localparam logic [IDX_W-1:0] MY_INDEX = IDX_W'(INDEX);

  logic [DATA_W-1:0] center [NB_BAND];
  logic [BW-1:0]     band;
  logic [DIST_W-1:0] run_dist;
  logic [DATA_W-1:0] absdiff;
  logic [DIST_W-1:0] new_dist;

  always_comb begin
    absdiff  = (in_data >= center[band]) ? in_data - center[band]
                                         : center[band] - in_data;
    new_dist = ((band == '0) ? '0 : run_dist) + DIST_W'(absdiff);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      band      <= '0;
      run_dist      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        band <= (band == BW'(NB_BAND - 1)) ? '0 : band + 1'b1;
        out_flag  <= in_flag;
        out_data  <= in_data;
        out_dist  <= in_dist;
        out_index <= in_index;
        if (in_flag == KM_PIXEL) begin
          run_dist <= new_dist;
          if (new_dist < in_dist) begin
            out_dist  <= new_dist;
            out_index <= MY_INDEX;
          end
        end else begin
          run_dist <= '0;
          if (in_index == MY_INDEX) center[band] <= in_data;
        end
      end
    end
  end

  initial assert (NB_BAND >= 1 && INDEX < (1 << IDX_W))
    else $error("km_proc: bad parameters");
endmodule

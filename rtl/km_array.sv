// km_array: the K-means classification array (front, NB_CLASS processors,
// filter).
//
// Pixels flow as a stream of band values through a linear array with one
// processor per class. Each processor holds its class centre and forwards
// the minimum distance found so far; the filter at the right end reports,
// for every pixel, the number of the nearest class. Class centres travel in
// the same stream and are captured by the processor whose number they carry,
// so the host can reload centres between blocks of pixels without a second
// port. Computing new centres stays on the host.
//
// Interface: host stream in (valid/ready, flag, data, class), result stream
// out (valid, class, distance). Timing: one band per cycle; the result for a
// pixel appears NB_CLASS+2 cycles after its last band is accepted.
// Processors are numbered 0..NB_CLASS-1 from the front; the default of 32
// classes is the class count the text uses as its example.
module km_array
  import km_pkg::*;
#(
  parameter int DATA_W   = 8,
  parameter int NB_BAND  = 8,
  parameter int NB_CLASS = 32,
  parameter int IDX_W    = (NB_CLASS > 1) ? $clog2(NB_CLASS) : 1,
  parameter int DIST_W   = DATA_W + $clog2(NB_BAND) + 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              s_valid,
  output logic              s_ready,
  input  km_flag_e          s_flag,
  input  logic [DATA_W-1:0] s_data,
  input  logic [IDX_W-1:0]  s_class,
  output logic              res_valid,
  output logic [IDX_W-1:0]  res_class,
  output logic [DIST_W-1:0] res_dist
);
  logic              v   [NB_CLASS+1];
  km_flag_e          f   [NB_CLASS+1];
  logic [DATA_W-1:0] d   [NB_CLASS+1];
  logic [DIST_W-1:0] ds  [NB_CLASS+1];
  logic [IDX_W-1:0]  ix  [NB_CLASS+1];

  km_front #(.DATA_W(DATA_W), .NB_BAND(NB_BAND), .DIST_W(DIST_W), .IDX_W(IDX_W)) u_front (
    .clk, .rst, .s_valid, .s_ready, .s_flag, .s_data, .s_class,
    .out_valid(v[0]), .out_flag(f[0]), .out_data(d[0]), .out_dist(ds[0]), .out_index(ix[0]));

  for (genvar k = 0; k < NB_CLASS; k++) begin : g_proc
    km_proc #(.DATA_W(DATA_W), .NB_BAND(NB_BAND), .DIST_W(DIST_W), .IDX_W(IDX_W),
              .INDEX(k)) u_proc (
      .clk, .rst,
      .in_valid(v[k]),    .in_flag(f[k]),    .in_data(d[k]),
      .in_dist(ds[k]),    .in_index(ix[k]),
      .out_valid(v[k+1]), .out_flag(f[k+1]), .out_data(d[k+1]),
      .out_dist(ds[k+1]), .out_index(ix[k+1]));
  end

  km_filter #(.DATA_W(DATA_W), .NB_BAND(NB_BAND), .DIST_W(DIST_W), .IDX_W(IDX_W)) u_filter (
    .clk, .rst, .in_valid(v[NB_CLASS]), .in_flag(f[NB_CLASS]),
    .in_dist(ds[NB_CLASS]), .in_index(ix[NB_CLASS]),
    .res_valid, .res_class, .res_dist);
endmodule

// streams_c_apps_top: the four stream-processing designs side by side.
//
// The four designs do not share data; each keeps its own ports, prefixed
// with its name:
//   ce_*  contrast enhancement (histogram projection) over two chips, with
//         the ports of its two SRAM banks;
//   pf_*  bank of four polyphase filter branches;
//   ppi_* Pixel Purity Index engine, with the port of its pixel SRAM;
//   km_*  K-means classification array.
// The SRAM banks (32-bit x 65K words) are external parts. All parameters are
// at the defaults of the individual designs. One clock and one synchronous,
// active-high reset serve all four.
module streams_c_apps_top
  import km_pkg::*;
#(
  parameter int ADDR_W      = 16,
  parameter int PPI_KS      = 2,
  parameter int PPI_NS      = 4,
  parameter int PPI_D       = 16,
  parameter int KM_DATA_W   = 8,
  parameter int KM_NB_BAND  = 8,
  parameter int KM_NB_CLASS = 32,
  localparam int PPI_DP_W   = 8 + 3 + $clog2(PPI_D) + 1,
  localparam int PPI_RES_W  = 2 * (PPI_DP_W + 16),
  localparam int KM_IDX_W   = (KM_NB_CLASS > 1) ? $clog2(KM_NB_CLASS) : 1,
  localparam int KM_DIST_W  = KM_DATA_W + $clog2(KM_NB_BAND) + 1
) (
  input  logic                    clk,
  input  logic                    rst,
  // contrast enhancement
  input  logic                    ce_in_valid,
  output logic                    ce_in_ready,
  input  logic [31:0]             ce_in_data,
  input  logic                    ce_in_last,
  output logic                    ce_out_valid,
  input  logic                    ce_out_ready,
  output logic [31:0]             ce_out_data,
  output logic                    ce_out_last,
  output logic                    ce_img_we,
  output logic                    ce_img_rd,
  output logic [ADDR_W-1:0]       ce_img_addr,
  output logic [31:0]             ce_img_wdata,
  input  logic [31:0]             ce_img_rdata,
  output logic                    ce_tab_rd,
  output logic [ADDR_W-1:0]       ce_tab_addr,
  input  logic [31:0]             ce_tab_rdata,
  // polyphase filter bank
  input  logic                    pf_in_valid,
  input  logic signed [7:0]       pf_in_data,
  output logic [3:0]              pf_out_valid,
  output logic [3:0]              pf_out_odd,
  output logic signed [15:0]      pf_out_data [4],
  // pixel purity index
  input  logic [ADDR_W-1:0]       ppi_n_groups,
  input  logic                    ppi_skw_valid,
  output logic                    ppi_skw_ready,
  input  logic [PPI_KS*3-1:0]     ppi_skw_data,
  output logic                    ppi_mem_rd,
  output logic [ADDR_W-1:0]       ppi_mem_addr,
  input  logic [31:0]             ppi_mem_rdata,
  output logic                    ppi_res_valid,
  output logic [PPI_RES_W-1:0]    ppi_res,
  output logic                    ppi_busy,
  // K-means
  input  logic                    km_s_valid,
  output logic                    km_s_ready,
  input  km_flag_e                km_s_flag,
  input  logic [KM_DATA_W-1:0]    km_s_data,
  input  logic [KM_IDX_W-1:0]     km_s_class,
  output logic                    km_res_valid,
  output logic [KM_IDX_W-1:0]     km_res_class,
  output logic [KM_DIST_W-1:0]    km_res_dist
);
  ce_pipeline #(.ADDR_W(ADDR_W)) u_ce (
    .clk, .rst,
    .in_valid(ce_in_valid), .in_ready(ce_in_ready), .in_data(ce_in_data), .in_last(ce_in_last),
    .out_valid(ce_out_valid), .out_ready(ce_out_ready), .out_data(ce_out_data),
    .out_last(ce_out_last),
    .img_we(ce_img_we), .img_rd(ce_img_rd), .img_addr(ce_img_addr),
    .img_wdata(ce_img_wdata), .img_rdata(ce_img_rdata),
    .tab_rd(ce_tab_rd), .tab_addr(ce_tab_addr), .tab_rdata(ce_tab_rdata));

  pf_bank u_pf (
    .clk, .rst, .in_valid(pf_in_valid), .in_data(pf_in_data),
    .out_valid(pf_out_valid), .out_odd(pf_out_odd), .out_data(pf_out_data));

  ppi_unit #(.KS(PPI_KS), .NS(PPI_NS), .D(PPI_D), .ADDR_W(ADDR_W)) u_ppi (
    .clk, .rst, .n_groups(ppi_n_groups),
    .skw_valid(ppi_skw_valid), .skw_ready(ppi_skw_ready), .skw_data(ppi_skw_data),
    .mem_rd(ppi_mem_rd), .mem_addr(ppi_mem_addr), .mem_rdata(ppi_mem_rdata),
    .res_valid(ppi_res_valid), .res(ppi_res), .busy(ppi_busy));

  km_array #(.DATA_W(KM_DATA_W), .NB_BAND(KM_NB_BAND), .NB_CLASS(KM_NB_CLASS)) u_km (
    .clk, .rst, .s_valid(km_s_valid), .s_ready(km_s_ready), .s_flag(km_s_flag),
    .s_data(km_s_data), .s_class(km_s_class),
    .res_valid(km_res_valid), .res_class(km_res_class), .res_dist(km_res_dist));
endmodule

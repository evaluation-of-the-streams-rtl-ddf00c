// ce_pipeline: the contrast enhancement design across two chips.
//
// Histogram projection stretches the grey levels of an image over the full
// 8-bit range. The histogram process (ce_hist, phases 1 and 2) stores the
// image in its SRAM bank, builds the histogram and the stretch table, and
// then sends one 16-bit packet {N-1, n} per pixel through a stream channel
// (sc_stream) to the remap process (ce_remap, phase 3). The remap process
// divides n by N with a table lookup in a second SRAM bank and returns four
// output pixels per 32-bit word. Each process has an SRAM bank of its own,
// which is why the work is split over two chips: the division table needs a
// bank to itself. The stream channel carries the packets and an end-of-frame
// flag between the chips and decouples the two processes; its depth of 4 is
// this design's choice. Both SRAM ports are brought out; the banks
// themselves are external parts.
//
// Interface: input stream of 32-bit words (four pixels, in_last on the final
// word of the image), output stream of 32-bit words, two SRAM ports. The
// output of a frame starts after the whole frame has been read in and the
// 256-cycle table scan; then one pixel per cycle flows through.
module ce_pipeline #(
  parameter int ADDR_W       = 16,
  parameter int STREAM_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [31:0]       in_data,
  input  logic              in_last,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [31:0]       out_data,
  output logic              out_last,
  // SRAM bank of the histogram chip (image store)
  output logic              img_we,
  output logic              img_rd,
  output logic [ADDR_W-1:0] img_addr,
  output logic [31:0]       img_wdata,
  input  logic [31:0]       img_rdata,
  // SRAM bank of the remap chip (division table)
  output logic              tab_rd,
  output logic [ADDR_W-1:0] tab_addr,
  input  logic [31:0]       tab_rdata
);
  // packets leaving the histogram process (writer side of the stream)
  logic        pk_valid, pk_ready, pk_last;
  logic [15:0] pk_data;
  // packets reaching the remap process (reader side of the stream)
  logic        rq_valid, rq_ready, rq_last;
  logic [15:0] rq_data;

  ce_hist #(.ADDR_W(ADDR_W)) u_hist (
    .clk, .rst, .in_valid, .in_ready, .in_data, .in_last,
    .mem_we(img_we), .mem_rd(img_rd), .mem_addr(img_addr),
    .mem_wdata(img_wdata), .mem_rdata(img_rdata),
    .out_valid(pk_valid), .out_ready(pk_ready), .out_data(pk_data), .out_last(pk_last));

  // inter-chip packet stream
  sc_stream #(.WIDTH(16), .DEPTH(STREAM_DEPTH)) u_stream (
    .clk, .rst,
    .w_valid(pk_valid), .w_ready(pk_ready), .w_data(pk_data), .w_eos(pk_last),
    .r_valid(rq_valid), .r_ready(rq_ready), .r_data(rq_data), .r_eos(rq_last),
    .level());

  ce_remap #(.ADDR_W(ADDR_W)) u_remap (
    .clk, .rst, .in_valid(rq_valid), .in_ready(rq_ready), .in_data(rq_data),
    .in_last(rq_last), .mem_rd(tab_rd), .mem_addr(tab_addr), .mem_rdata(tab_rdata),
    .out_valid, .out_ready, .out_data, .out_last);
endmodule

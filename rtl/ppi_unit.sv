// ppi_unit: Pixel Purity Index processing element (one FPGA and its memory).
//
// The image of N hyperspectral pixels, D unsigned 8-bit dimensions each,
// sits in the element's 32-bit SRAM bank. Skewers (signed 3-bit) arrive as a
// stream from the host. For every set of KS skewers the unit
//   1. LOAD:  takes D stream beats, each holding dimension d of all KS
//             skewers, into local skewer registers;
//   2. RUN:   reads the image group by group (NS pixels per group) and feeds
//             the ppi_array one dimension per cycle, so each group takes D
//             cycles and the KS x NS dot products run in parallel;
//   3. DRAIN: waits until the last group's dot products are in the MinMax
//             units;
//   4. DUMP:  shifts out KS results (Max, IdxMax, Min, IdxMin), one per
//             cycle, for skewers k..k+KS-1 in order;
// and then returns to LOAD. Tallying the PPI counts from the results is
// left to the host.
//
// Memory layout (this design's choice): word g*D + d holds dimension d of
// pixels g*NS .. g*NS+NS-1, pixel g*NS+c in bits [c*8 +: 8]; NS*PIX_W must
// equal the 32-bit word. The SRAM has one cycle of read latency.
// n_groups (number of NS-pixel groups, at least 1) must stay stable while a
// set is processed. The last result of a set leaves D + n_groups*D + NS +
// KS + 3 cycles after the first skewer beat of the set is accepted.
// The result stream has no back-pressure.
module ppi_unit #(
  parameter int KS     = 2,
  parameter int NS     = 4,
  parameter int D      = 16,
  parameter int PIX_W  = 8,
  parameter int SKW_W  = 3,
  parameter int ADDR_W = 16,
  parameter int MEM_W  = 32,
  parameter int IDX_W  = 16,
  parameter int DP_W   = PIX_W + SKW_W + $clog2(D) + 1,
  parameter int RES_W  = 2 * (DP_W + IDX_W)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [ADDR_W-1:0]   n_groups,
  // skewer stream from the host
  input  logic                skw_valid,
  output logic                skw_ready,
  input  logic [KS*SKW_W-1:0] skw_data,
  // pixel memory (read only here)
  output logic                mem_rd,
  output logic [ADDR_W-1:0]   mem_addr,
  input  logic [MEM_W-1:0]    mem_rdata,
  // results
  output logic                res_valid,
  output logic [RES_W-1:0]    res,
  output logic                busy
);
  typedef enum logic [1:0] {S_LOAD, S_RUN, S_DRAIN, S_DUMP} state_e;
  localparam int DW = (D > 1) ? $clog2(D) : 1;
  localparam int DRAIN_CYC = NS + 3;

  state_e              state;
  logic [KS*SKW_W-1:0] skw_mem [D];
  logic [DW-1:0]       d_cnt;
  logic [ADDR_W-1:0]   g_cnt;
  logic [ADDR_W-1:0]   addr;
  logic [$clog2(DRAIN_CYC+KS+1)-1:0] wait_cnt;
  // read pipeline stage, aligned with mem_rdata
  logic                p_valid, p_first, p_last;
  logic [IDX_W-1:0]    p_base;
  logic [KS*SKW_W-1:0] p_skw;
  logic                clr, dump;

  assign skw_ready = (state == S_LOAD);
  assign mem_rd    = (state == S_RUN);
  assign mem_addr  = addr;
  assign busy      = (state != S_LOAD);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_LOAD;
      d_cnt    <= '0;
      g_cnt    <= '0;
      addr     <= '0;
      wait_cnt <= '0;
      p_valid  <= 1'b0;
      clr      <= 1'b1;
      dump     <= 1'b0;
    end else begin
      p_valid <= 1'b0;
      clr     <= 1'b0;
      dump    <= 1'b0;
      unique case (state)
        S_LOAD: if (skw_valid) begin
          skw_mem[d_cnt] <= skw_data;
          d_cnt          <= (d_cnt == DW'(D - 1)) ? '0 : d_cnt + 1'b1;
          if (d_cnt == DW'(D - 1)) begin
            state <= S_RUN;
            g_cnt <= '0;
            addr  <= '0;
          end
        end
        S_RUN: begin
          p_valid <= 1'b1;
          p_first <= (d_cnt == '0);
          p_last  <= (d_cnt == DW'(D - 1));
          p_base  <= IDX_W'(g_cnt * ADDR_W'(NS));
          p_skw   <= skw_mem[d_cnt];
          addr    <= addr + 1'b1;
          d_cnt   <= (d_cnt == DW'(D - 1)) ? '0 : d_cnt + 1'b1;
          if (d_cnt == DW'(D - 1)) begin
            g_cnt <= g_cnt + 1'b1;
            if (g_cnt == n_groups - 1'b1) begin
              state    <= S_DRAIN;
              wait_cnt <= '0;
            end
          end
        end
        S_DRAIN: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == $bits(wait_cnt)'(DRAIN_CYC - 1)) begin
            dump     <= 1'b1;
            state    <= S_DUMP;
            wait_cnt <= '0;
          end
        end
        S_DUMP: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == $bits(wait_cnt)'(KS)) begin
            state <= S_LOAD;
            clr   <= 1'b1;
          end
        end
      endcase
    end
  end

  ppi_array #(.KS(KS), .NS(NS), .D(D), .PIX_W(PIX_W), .SKW_W(SKW_W),
              .IDX_W(IDX_W), .DP_W(DP_W), .RES_W(RES_W)) u_array (
    .clk, .rst,
    .in_valid(p_valid), .in_first(p_first), .in_last(p_last),
    .in_base(p_base), .in_pix(mem_rdata[NS*PIX_W-1:0]), .in_skw(p_skw),
    .clr, .dump, .res_valid, .res);

  initial assert (NS * PIX_W <= MEM_W) else $error("ppi_unit: NS pixels must fit a memory word");
endmodule

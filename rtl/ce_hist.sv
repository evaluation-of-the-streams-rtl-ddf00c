// ce_hist: histogram and contrast-stretch process of the contrast
// enhancement design (phases 1 and 2, the X2 chip).
//
// Phase 1 (IN): 32-bit stream words, four 8-bit pixels each, arrive from the
// host side. Each word is written to the chip's SRAM bank and its four
// pixels update a 256-bin histogram held in on-chip (CLB) RAM, one pixel
// per cycle. Keeping the histogram in its own RAM lets the pixel store and
// the histogram update happen in the same cycle. in_last marks the final
// word of the image.
// Phase 2 (SCAN): the 256 bins are scanned from dark to bright. Every grey
// level that occurs gets the next rank 0, 1, ..., N-1 in a stretch table,
// where N is the number of distinct grey levels in the image; the bins are
// cleared on the way for the next frame.
// Read-back (OUT): the stored image is read from the SRAM again and, for
// every pixel in order, a 16-bit packet {N-1, stretch[pixel]} is sent on
// the output stream. The receiver turns n and N into the output grey value
// n*256/N with a table lookup.
//
// Timing: phase 1 accepts one word every four cycles; SCAN takes 256 cycles;
// read-back delivers one packet per cycle when the receiver is ready.
// Choices of this design: the pixel order within a word (pixel 0 in the low
// byte), N-1 rather than N in the packet's high byte so that it fits 8 bits,
// the SRAM word address equal to the word number, and one cycle of SRAM read
// latency.
module ce_hist #(
  parameter int ADDR_W = 16,           // 65K-word SRAM bank
  parameter int CNT_W  = ADDR_W + 3    // one bin may count every pixel of a full bank
) (
  input  logic              clk,
  input  logic              rst,
  // pixel stream, four pixels per word
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [31:0]       in_data,
  input  logic              in_last,
  // SRAM bank of this chip
  output logic              mem_we,
  output logic              mem_rd,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata,
  // packet stream {N-1, stretch value}
  output logic              out_valid,
  input  logic              out_ready,
  output logic [15:0]       out_data,
  output logic              out_last
);
  typedef enum logic [1:0] {S_IN, S_SCAN, S_OUT} state_e;

  state_e            state;
  logic [CNT_W-1:0]  hist    [256];
  logic [7:0]        stretch [256];
  // phase 1
  logic [31:0]       pw;          // word being histogrammed
  logic [2:0]        pw_left;     // pixels of pw still to count
  logic              pw_last;
  logic [ADDR_W-1:0] wr_addr;
  logic [ADDR_W:0]   n_words;     // a full bank is 2^ADDR_W words
  // phase 2
  logic [7:0]        g;
  logic [8:0]        rank;
  logic [7:0]        n_m1;
  // read-back
  logic [ADDR_W:0]   rd_addr;
  logic              rd_pend, pf_valid;
  logic [31:0]       pf_word, ow;
  logic [2:0]        ow_left;
  logic              take_in, fire, need_word;

  assign take_in  = in_valid && in_ready;
  assign in_ready = (state == S_IN) && (pw_left == 0 || (pw_left == 1 && !pw_last));
  assign fire     = out_valid && out_ready;
  assign out_valid = (state == S_OUT) && (ow_left != 0);
  assign out_data  = {n_m1, stretch[ow[7:0]]};
  assign out_last  = out_valid && ow_left == 1 && !pf_valid && !rd_pend && rd_addr == n_words;
  // buffer word used up (or empty) this cycle
  assign need_word = (ow_left == 0) || (ow_left == 1 && fire);

  assign mem_we    = take_in;
  assign mem_wdata = in_data;
  assign mem_rd    = (state == S_OUT) && !pf_valid && !rd_pend && rd_addr != n_words;
  assign mem_addr  = (state == S_IN) ? wr_addr : rd_addr[ADDR_W-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IN;
      pw_left  <= '0;
      pw_last  <= 1'b0;
      wr_addr  <= '0;
      n_words  <= '0;
      g        <= '0;
      rank     <= '0;
      n_m1     <= '0;
      rd_addr  <= '0;
      rd_pend  <= 1'b0;
      pf_valid <= 1'b0;
      ow_left  <= '0;
      for (int i = 0; i < 256; i++) hist[i] <= '0;
    end else begin
      unique case (state)
        S_IN: begin
          if (pw_left != 0) begin
            hist[pw[7:0]] <= hist[pw[7:0]] + 1'b1;
            pw      <= pw >> 8;
            pw_left <= pw_left - 1'b1;
            if (pw_left == 1 && pw_last) begin
              state <= S_SCAN;
              g     <= '0;
              rank  <= '0;
            end
          end
          if (take_in) begin
            pw      <= in_data;
            pw_left <= 3'd4;
            pw_last <= in_last;
            wr_addr <= wr_addr + 1'b1;
            if (in_last) n_words <= {1'b0, wr_addr} + 1'b1;
          end
        end
        S_SCAN: begin
          if (hist[g] != 0) begin
            stretch[g] <= rank[7:0];
            rank       <= rank + 1'b1;
          end
          hist[g] <= '0;
          g       <= g + 1'b1;
          if (g == 8'd255) begin
            state    <= S_OUT;
            n_m1     <= 8'(rank + ((hist[g] != 0) ? 9'd1 : 9'd0) - 9'd1);
            rd_addr  <= '0;
            rd_pend  <= 1'b0;
            pf_valid <= 1'b0;
            ow_left  <= '0;
          end
        end
        S_OUT: begin
          if (mem_rd) begin
            rd_pend <= 1'b1;
            rd_addr <= rd_addr + 1'b1;
          end
          if (rd_pend) begin
            rd_pend  <= 1'b0;
            pf_valid <= 1'b1;
            pf_word  <= mem_rdata;
          end
          if (fire) begin
            ow      <= ow >> 8;
            ow_left <= ow_left - 1'b1;
          end
          if (need_word && pf_valid) begin
            ow       <= pf_word;
            ow_left  <= 3'd4;
            pf_valid <= 1'b0;
          end
          if (fire && out_last) begin
            state   <= S_IN;
            wr_addr <= '0;
            pw_left <= '0;
          end
        end
        default: state <= S_IN;
      endcase
    end
  end

  // A packet must stay stable while the receiver is not ready.
  property p_hold;
    @(posedge clk) disable iff (rst) out_valid && !out_ready |=> out_valid && $stable(out_data);
  endproperty
  assert property (p_hold);
endmodule

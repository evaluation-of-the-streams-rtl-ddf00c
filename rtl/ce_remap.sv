// ce_remap: image remapping process of the contrast enhancement design
// (phase 3, the X1 chip).
//
// Each 16-bit packet {N-1, n} from the histogram process is used directly as
// the address of this chip's SRAM bank, which holds a division table: the
// entry at {N-1, n} is the output grey value n*256/N (an 8-bit value, in the
// low byte of the 32-bit word). The table is loaded into the SRAM by the
// host before the image is processed. Four consecutive output pixels are
// packed into one 32-bit word for the host, the first in the low byte.
//
// Timing: one packet per cycle; the SRAM has one cycle of read latency, so
// a pixel lands in the packing register two cycles after its packet is
// accepted, and a full word is offered on the cycle after its fourth pixel
// lands. Back-pressure: packets are refused while a full word waits for the
// host; at most one pixel is still in flight then, and it goes into the
// (already emptied) packing register. The address mapping and byte order are
// this design's choices.
module ce_remap #(
  parameter int ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  // packet stream {N-1, n}
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [15:0]       in_data,
  input  logic              in_last,
  // division-table SRAM (read only here)
  output logic              mem_rd,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic [31:0]       mem_rdata,
  // output stream, four pixels per word
  output logic              out_valid,
  input  logic              out_ready,
  output logic [31:0]       out_data,
  output logic              out_last
);
  logic        p_valid, p_last;    // SRAM read in flight
  logic [31:0] pack;
  logic [1:0]  pack_cnt;
  logic        fire_in;

  assign in_ready = !out_valid || out_ready;
  assign fire_in  = in_valid && in_ready;
  assign mem_rd   = fire_in;
  assign mem_addr = ADDR_W'(in_data);

  always_ff @(posedge clk) begin
    if (rst) begin
      p_valid   <= 1'b0;
      p_last    <= 1'b0;
      pack      <= '0;
      pack_cnt  <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      p_valid <= fire_in;
      p_last  <= fire_in && in_last;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (p_valid) begin
        pack[pack_cnt*8 +: 8] <= mem_rdata[7:0];
        pack_cnt <= pack_cnt + 1'b1;
        if (pack_cnt == 2'd3 || p_last) begin
          out_valid <= 1'b1;
          out_last  <= p_last;
          out_data  <= pack;
          out_data[pack_cnt*8 +: 8] <= mem_rdata[7:0];
          pack_cnt  <= '0;
          pack      <= '0;
        end
      end
    end
  end

  property p_hold;
    @(posedge clk) disable iff (rst) out_valid && !out_ready |=> out_valid && $stable(out_data);
  endproperty
  assert property (p_hold);
endmodule

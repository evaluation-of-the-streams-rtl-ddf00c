// sram_model: behavioural model of one 32-bit x 2^ADDR_W SRAM bank of the
// accelerator board (simulation only). Synchronous: a write on we stores
// wdata at addr on the clock edge; a read on rd returns mem[addr] on rdata
// one cycle later. rdata holds its value between reads. Testbenches fill and
// inspect the array directly through hierarchical references to mem.
module sram_model #(
  parameter int ADDR_W = 16,
  parameter int DATA_W = 32
) (
  input  logic              clk,
  input  logic              we,
  input  logic              rd,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [1 << ADDR_W];

  initial rdata = '0;

  always @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (rd) rdata <= mem[addr];
  end

  always @(posedge clk) assert (!(we && rd)) else $error("sram_model: read and write in one cycle");
endmodule

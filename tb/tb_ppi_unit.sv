// tb_ppi_unit: end-to-end test of the PPI element (KS = 2, NS = 4, D = 8)
// with its pixel SRAM. A random image of n_groups*NS pixels is written into
// the SRAM model in the unit's layout, several sets of skewers are streamed
// in (with stream gaps), and every (Max, IdxMax, Min, IdxMin) result is
// compared with a software scan. The cycles from the first skewer beat to
// the last result of a set must be D + n_groups*D + NS + KS + 3.
module tb_ppi_unit;
  localparam int KS = 2, NS = 4, D = 8, ADDR_W = 10, IDX_W = 16;
  localparam int DP_W = 8 + 3 + 3 + 1, RES_W = 2 * (DP_W + IDX_W);
  localparam int NG = 7;
  logic clk = 0, rst = 1;
  logic [ADDR_W-1:0] n_groups = ADDR_W'(NG);
  logic skw_valid = 0, skw_ready;
  logic [KS*3-1:0] skw_data = '0;
  logic mem_rd;
  logic [ADDR_W-1:0] mem_addr;
  logic [31:0] mem_rdata;
  logic res_valid, busy;
  logic [RES_W-1:0] res;
  int checks = 0, failures = 0, cycle = 0, sets_done = 0;
  int pix [NG*NS][D];
  int skw [KS][D];
  int t_first, t_last;

  ppi_unit #(.KS(KS), .NS(NS), .D(D), .ADDR_W(ADDR_W)) dut (.*);
  sram_model #(.ADDR_W(ADDR_W)) u_mem (.clk, .we(1'b0), .rd(mem_rd), .addr(mem_addr),
                                       .wdata('0), .rdata(mem_rdata));
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NG * NS; n++) for (int d = 0; d < D; d++) pix[n][d] = $urandom_range(0, 255);
    for (int g = 0; g < NG; g++) for (int d = 0; d < D; d++)
      for (int c = 0; c < NS; c++) u_mem.mem[g*D + d][c*8 +: 8] = 8'(pix[g*NS + c][d]);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int set = 0; set < 4; set++) begin
      for (int k = 0; k < KS; k++) for (int d = 0; d < D; d++) skw[k][d] = $urandom_range(0, 7) - 4;
      for (int d = 0; d < D; d++) begin
        skw_valid = 1;
        for (int k = 0; k < KS; k++) skw_data[k*3 +: 3] = 3'(skw[k][d]);
        do @(posedge clk); while (!skw_ready);
        if (d == 0) t_first = cycle;
        #1 skw_valid = 0;
      end
      for (int k = 0; k < KS; k++) begin
        automatic int emax = -1 << 20, emin = 1 << 20, imax = 0, imin = 0;
        for (int n = 0; n < NG * NS; n++) begin
          automatic int s = 0;
          for (int d = 0; d < D; d++) s += skw[k][d] * pix[n][d];
          if (s > emax) begin emax = s; imax = n; end
          if (s < emin) begin emin = s; imin = n; end
        end
        do @(posedge clk); while (!res_valid);
        t_last = cycle;
        checks++;
        if (res != {DP_W'(emax), IDX_W'(imax), DP_W'(emin), IDX_W'(imin)}) begin
          failures++;
          $display("FAIL set %0d row %0d: res=%h exp max %0d@%0d min %0d@%0d",
                   set, k, res, emax, imax, emin, imin);
        end
      end
      checks++;
      if (t_last - t_first != D + NG * D + NS + KS + 3) begin
        failures++; $display("FAIL set took %0d cycles", t_last - t_first);
      end
      sets_done++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ppi_full_image: the PPI element at its default size (2 x 4 dot
// products, D = 16) on the largest image its 65,536-word SRAM bank holds:
// 4,096 groups of four pixels = 16,384 pixels. Two skewer sets are run and
// their results compared with a software scan; the cycle count of each set
// must be D + n_groups*D + NS + KS + 3.
module tb_ppi_full_image;
  localparam int KS = 2, NS = 4, D = 16, NG = 4096, NPIX = NG * NS;
  localparam int DP_W = 8 + 3 + 4 + 1, RES_W = 2 * (DP_W + 16);
  logic clk = 0, rst = 1;
  logic [15:0] n_groups = 16'(NG);
  logic skw_valid = 0, skw_ready;
  logic [KS*3-1:0] skw_data = '0;
  logic mem_rd;
  logic [15:0] mem_addr;
  logic [31:0] mem_rdata;
  logic res_valid, busy;
  logic [RES_W-1:0] res;
  int checks = 0, failures = 0, cycle = 0, t_first = 0;
  byte unsigned pix [NPIX][D];
  int skw [KS][D];

  ppi_unit dut (.*);
  sram_model u_mem (.clk, .we(1'b0), .rd(mem_rd), .addr(mem_addr), .wdata('0), .rdata(mem_rdata));
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NPIX; n++) for (int d = 0; d < D; d++) pix[n][d] = 8'($urandom);
    for (int g = 0; g < NG; g++) for (int d = 0; d < D; d++)
      for (int c = 0; c < NS; c++) u_mem.mem[g*D + d][c*8 +: 8] = pix[g*NS + c][d];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int set = 0; set < 2; set++) begin
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
        for (int n = 0; n < NPIX; n++) begin
          automatic int s = 0;
          for (int d = 0; d < D; d++) s += skw[k][d] * int'(pix[n][d]);
          if (s > emax) begin emax = s; imax = n; end
          if (s < emin) begin emin = s; imin = n; end
        end
        do @(posedge clk); while (!res_valid);
        checks++;
        if (res != {DP_W'(emax), 16'(imax), DP_W'(emin), 16'(imin)}) begin
          failures++; $display("FAIL set %0d row %0d", set, k);
        end
      end
      checks++;
      if (cycle - t_first != D + NG * D + NS + KS + 3) begin
        failures++; $display("FAIL set took %0d cycles", cycle - t_first);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ppi_array: drives the KS x NS dot-product grid (2 x 4, D = 8) directly
// with random pixel and skewer batches, back to back, then dumps the MinMax
// column and checks, row by row from the top, the extreme dot products and
// their pixel indices against a software PPI scan.
module tb_ppi_array;
  localparam int KS = 2, NS = 4, D = 8, IDX_W = 16, DP_W = 8 + 3 + 3 + 1, RES_W = 2 * (DP_W + IDX_W);
  localparam int NB = 6;                 // batches of NS pixels
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_first = 0, in_last = 0, clr = 0, dump = 0;
  logic [IDX_W-1:0] in_base = '0;
  logic [NS*8-1:0] in_pix = '0;
  logic [KS*3-1:0] in_skw = '0;
  logic res_valid;
  logic [RES_W-1:0] res;
  int checks = 0, failures = 0;
  int pix [NB*NS][D];
  int skw [KS][D];

  ppi_array #(.KS(KS), .NS(NS), .D(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int pass = 0; pass < 5; pass++) begin
      for (int n = 0; n < NB * NS; n++) for (int d = 0; d < D; d++) pix[n][d] = $urandom_range(0, 255);
      for (int k = 0; k < KS; k++) for (int d = 0; d < D; d++)
        skw[k][d] = (pass == 0) ? 1 : $urandom_range(0, 7) - 4;   // pass 0: many ties
      if (pass == 0) for (int n = 0; n < NB * NS; n++) for (int d = 0; d < D; d++) pix[n][d] = (n % 3) * 10;
      clr = 1; @(posedge clk); #1; clr = 0;
      for (int b = 0; b < NB; b++)
        for (int d = 0; d < D; d++) begin
          in_valid = 1; in_first = (d == 0); in_last = (d == D - 1);
          in_base = IDX_W'(b * NS);
          for (int c = 0; c < NS; c++) in_pix[c*8 +: 8] = 8'(pix[b*NS + c][d]);
          for (int k = 0; k < KS; k++) in_skw[k*3 +: 3] = 3'(skw[k][d]);
          @(posedge clk); #1;
        end
      in_valid = 0;
      repeat (NS + 2) @(posedge clk);
      #1 dump = 1; @(posedge clk); #1 dump = 0;
      for (int k = 0; k < KS; k++) begin
        automatic int emax = -1 << 20, emin = 1 << 20, imax = 0, imin = 0;
        for (int n = 0; n < NB * NS; n++) begin
          automatic int s = 0;
          for (int d = 0; d < D; d++) s += skw[k][d] * pix[n][d];
          if (s > emax) begin emax = s; imax = n; end
          if (s < emin) begin emin = s; imin = n; end
        end
        checks++;
        if (!res_valid || res != {DP_W'(emax), IDX_W'(imax), DP_W'(emin), IDX_W'(imin)}) begin
          failures++;
          $display("FAIL pass %0d row %0d: valid=%0d res=%h exp max %0d@%0d min %0d@%0d",
                   pass, k, res_valid, res, emax, imax, emin, imin);
        end
        @(posedge clk); #1;
      end
      checks++;
      if (res_valid) begin failures++; $display("FAIL extra result"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

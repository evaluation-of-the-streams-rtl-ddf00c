// tb_ppi_minmax: checks the extrema detector against a sequential scan with
// strict comparisons (first index wins on ties), with values fed in a
// scrambled index order and many ties; then checks the result chain: load
// captures {max, idxmax, min, idxmin}, shift takes chain_in.
module tb_ppi_minmax;
  localparam int DP_W = 16, IDX_W = 16, RES_W = 64;
  logic clk = 0, rst = 1, clr = 0, in_valid = 0, load = 0, shift = 0;
  logic signed [DP_W-1:0] in_dp = '0;
  logic [IDX_W-1:0] in_idx = '0;
  logic signed [DP_W-1:0] max_dp, min_dp;
  logic [IDX_W-1:0] max_idx, min_idx;
  logic [RES_W-1:0] chain_in = '0, chain_out;
  int checks = 0, failures = 0;

  ppi_minmax #(.DP_W(DP_W), .IDX_W(IDX_W)) dut (.*);
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
    for (int pass = 0; pass < 40; pass++) begin
      automatic int n = $urandom_range(1, 60);
      automatic int vals [64];
      automatic int order [64];
      automatic int emax = -100000, emin = 100000, imax = 0, imin = 0;
      automatic int span = (pass % 2) ? 5 : 3000;
      for (int i = 0; i < n; i++) begin
        vals[i] = $urandom_range(0, span) - span / 2;
        order[i] = i;
      end
      for (int i = 0; i < n; i++) begin
        if (vals[i] > emax) begin emax = vals[i]; imax = i; end
        if (vals[i] < emin) begin emin = vals[i]; imin = i; end
      end
      // groups of four in reverse order, as they leave a shift register
      for (int i = 0; i + 1 < n; i += 2) begin
        automatic int t = order[i]; order[i] = order[i+1]; order[i+1] = t;
      end
      clr = 1; @(posedge clk); #1; clr = 0;
      for (int i = 0; i < n; i++) begin
        in_valid = 1; in_dp = DP_W'(vals[order[i]]); in_idx = IDX_W'(order[i] + 1000);
        @(posedge clk); #1;
        in_valid = 0;
      end
      checks++;
      if (max_dp != DP_W'(emax) || max_idx != IDX_W'(imax + 1000) ||
          min_dp != DP_W'(emin) || min_idx != IDX_W'(imin + 1000)) begin
        failures++;
        $display("FAIL pass %0d: max %0d@%0d exp %0d@%0d min %0d@%0d exp %0d@%0d", pass,
                 max_dp, max_idx, emax, imax + 1000, min_dp, min_idx, emin, imin + 1000);
      end
      load = 1; @(posedge clk); #1; load = 0;
      checks++;
      if (chain_out != {DP_W'(emax), IDX_W'(imax + 1000), DP_W'(emin), IDX_W'(imin + 1000)}) begin
        failures++; $display("FAIL chain load");
      end
      chain_in = {$urandom, $urandom};
      shift = 1; @(posedge clk); #1; shift = 0;
      checks++;
      if (chain_out != chain_in) begin failures++; $display("FAIL chain shift"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pf_fir: checks the 4-tap polyphase branch. Random signed samples, with
// random idle cycles, go in; a reference computes, separately for even and
// odd samples, y = 3 x(n) + 117 x(n-2) + 1741 x(n-4) + 128 x(n-6) (history
// of the same parity, zero before the start), keeps the low 16 bits and
// compares it, and the chain flag, with the output one cycle later.
module tb_pf_fir;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic signed [7:0]  in_data = '0;
  logic out_valid, out_odd;
  logic signed [15:0] out_data;
  int checks = 0, failures = 0;
  int coef [4] = '{3, 117, 1741, 128};
  int hist [2][4];      // [parity][age]: last four samples of that parity
  int n = 0, odd_seen = 0, even_seen = 0;

  pf_fir dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '{default: 0};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      automatic int x = (i < 8) ? 127 - 255 * (i % 2) : $urandom_range(0, 255) - 128;
      automatic int p = n % 2;
      automatic int y;
      for (int a = 3; a > 0; a--) hist[p][a] = hist[p][a-1];
      hist[p][0] = x;
      y = 0;
      for (int a = 0; a < 4; a++) y += coef[a] * hist[p][a];
      in_valid = 1; in_data = 8'(x);
      @(posedge clk); #1;
      in_valid = 0;
      n++;
      checks++;
      if (!out_valid || out_odd != p[0] || out_data != 16'(y)) begin
        failures++;
        $display("FAIL sample %0d: got %0d odd=%0d, expected %0d odd=%0d", i, out_data, out_odd, 16'(y), p);
      end
      if (p == 1) odd_seen++; else even_seen++;
      while ($urandom_range(0, 3) == 0) begin
        @(posedge clk); #1;
        checks++;
        if (out_valid) begin failures++; $display("FAIL output without input"); end
      end
    end
    checks++;
    if (odd_seen == 0 || even_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pf_bank32: the polyphase bank in the prototype's full configuration,
// n = 128 taps split over M = 32 branches of L = 4 taps (branch k gets
// h0[k], h0[k+32], h0[k+64], h0[k+96]). The prototype used here is a
// synthetic symmetric low-pass shape, h0[i] = h0[127-i], computed by a
// formula (a triangle scaled into the 12-bit range); real filter taps would
// be loaded the same way. Every branch output is compared with a direct
// computation of that branch's even/odd convolution.
module tb_pf_bank32;
  localparam int M = 32, NTAP = 128;
  function automatic logic [M-1:0][3:0][11:0] make_coefs();
    logic [M-1:0][3:0][11:0] c;
    for (int k = 0; k < M; k++)
      for (int l = 0; l < 4; l++) begin
        automatic int i = k + l * M;
        automatic int j = (i < NTAP / 2) ? i : NTAP - 1 - i;   // symmetric
        c[k][l] = 12'(j * 31 - 900);
      end
    return c;
  endfunction
  localparam logic [M-1:0][3:0][11:0] CF = make_coefs();

  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic signed [7:0] in_data = '0;
  logic [M-1:0] out_valid, out_odd;
  logic signed [15:0] out_data [M];
  int checks = 0, failures = 0;
  int hist [M][2][4];
  int cnt [M];

  pf_bank #(.M(M), .COEFS(CF)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '{default: 0};
    cnt = '{default: 0};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 32 * M; n++) begin
      automatic int x = $urandom_range(0, 255) - 128;
      automatic int k = n % M;
      automatic int p = cnt[k] % 2;
      automatic int y = 0;
      for (int a = 3; a > 0; a--) hist[k][p][a] = hist[k][p][a-1];
      hist[k][p][0] = x;
      for (int a = 0; a < 4; a++) y += $signed(CF[k][a]) * hist[k][p][a];
      cnt[k]++;
      in_valid = 1; in_data = 8'(x);
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (out_valid != M'(1) << k || out_odd[k] != p[0] || out_data[k] != 16'(y)) begin
        failures++;
        $display("FAIL n=%0d branch %0d: data=%0d exp %0d", n, k, out_data[k], 16'(y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

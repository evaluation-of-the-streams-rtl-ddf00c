// tb_pf_bank: checks the four-branch polyphase bank with distinct
// coefficients per branch. Sample n must reach branch n mod 4 only; each
// branch's output is compared, one cycle later, with a reference of the
// even/odd transposed filter running on that branch's own samples.
module tb_pf_bank;
  localparam int M = 4;
  localparam logic [M-1:0][3:0][11:0] CF = {
    {12'sd128, 12'sd1741, 12'sd117, 12'sd3},
    {-12'sd5,  12'sd300,  -12'sd2000, 12'sd1},
    {12'sd7,   12'sd0,    12'sd64,  -12'sd9},
    {12'sd2047, -12'sd2048, 12'sd11, 12'sd100}};
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic signed [7:0] in_data = '0;
  logic [M-1:0] out_valid, out_odd;
  logic signed [15:0] out_data [M];
  int checks = 0, failures = 0;
  int hist [M][2][4];
  int cnt [M];

  pf_bank #(.COEFS(CF)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '{default: 0};
    cnt = '{default: 0};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 600; n++) begin
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
      if (out_valid != M'(1 << k) || out_odd[k] != p[0] || out_data[k] != 16'(y)) begin
        failures++;
        $display("FAIL n=%0d branch %0d: valid=%b data=%0d exp %0d", n, k, out_valid, out_data[k], 16'(y));
      end
      if ($urandom_range(0, 4) == 0) begin @(posedge clk); #1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

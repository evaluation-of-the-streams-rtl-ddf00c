// tb_ppi_dp: checks the dot-product unit over random D = 16 element vectors
// (unsigned 8-bit pixel, signed 3-bit skewer), including the extreme values
// and idle cycles inside a vector; done must rise exactly one cycle after the
// last element with the software dot product on dp.
module tb_ppi_dp;
  localparam int D = 16;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [7:0] pixel = '0;
  logic signed [2:0] skewer = '0;
  logic done;
  logic signed [15:0] dp;
  int checks = 0, failures = 0;

  ppi_dp #(.D(D)) dut (.*);
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
    for (int v = 0; v < 300; v++) begin
      automatic int acc = 0;
      for (int d = 0; d < D; d++) begin
        automatic int px = (v == 0) ? 255 : (v == 1) ? 255 : $urandom_range(0, 255);
        automatic int sk = (v == 0) ? -4 : (v == 1) ? 3 : $urandom_range(0, 7) - 4;
        acc += px * sk;
        in_valid = 1; in_first = (d == 0); in_last = (d == D - 1);
        pixel = 8'(px); skewer = 3'(sk);
        @(posedge clk); #1;
        in_valid = 0; in_first = 0; in_last = 0;
        checks++;
        if (done != (d == D - 1)) begin failures++; $display("FAIL done at %0d", d); end
        if (d == D - 1 && dp != 16'(acc)) begin
          failures++; $display("FAIL vector %0d: dp=%0d exp %0d", v, dp, acc);
        end
        if ($urandom_range(0, 5) == 0) begin @(posedge clk); #1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

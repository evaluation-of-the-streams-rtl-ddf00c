// tb_ce_pipeline: end-to-end contrast enhancement over two frames. Random
// images with few grey levels are streamed in; the output words must hold,
// for every input pixel in order, rank*256/N, where rank is the position of
// the pixel's grey level among the N levels present in the frame. The
// division table is placed in the second SRAM model as the host would.
module tb_ce_pipeline;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [31:0] in_data = '0;
  logic out_valid, out_ready = 1, out_last;
  logic [31:0] out_data;
  logic img_we, img_rd, tab_rd;
  logic [15:0] img_addr, tab_addr;
  logic [31:0] img_wdata, img_rdata, tab_rdata;
  int checks = 0, failures = 0, words_out = 0;
  int expq [$];

  ce_pipeline dut (.*);
  sram_model u_img (.clk, .we(img_we), .rd(img_rd), .addr(img_addr), .wdata(img_wdata), .rdata(img_rdata));
  sram_model u_tab (.clk, .we(1'b0), .rd(tab_rd), .addr(tab_addr), .wdata('0), .rdata(tab_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= ($urandom_range(0, 4) != 0);
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    automatic logic [31:0] e;
    for (int i = 0; i < 4; i++) e[i*8 +: 8] = 8'(expq.pop_front());
    checks++;
    words_out++;
    if (out_data != e || out_last != (expq.size() == 0)) begin
      failures++; $display("FAIL word %h exp %h", out_data, e);
    end
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int n = 0; n < 256; n++) u_tab.mem[a*256 + n] = 32'((n * 256) / (a + 1));
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int frame = 0; frame < 2; frame++) begin
      automatic int nw = $urandom_range(16, 64);
      automatic int img [$];
      automatic bit present [256];
      automatic int rank [256];
      automatic int nlev = 0;
      automatic int lo = $urandom_range(0, 100), hi = lo + $urandom_range(5, 150);
      for (int i = 0; i < 4 * nw; i++) img.push_back($urandom_range(lo, hi) & 8'hfc);
      for (int g = 0; g < 256; g++) present[g] = 0;
      foreach (img[i]) present[img[i]] = 1;
      for (int g = 0; g < 256; g++) begin rank[g] = nlev; if (present[g]) nlev++; end
      foreach (img[i]) expq.push_back((rank[img[i]] * 256) / nlev);
      for (int w = 0; w < nw; w++) begin
        in_valid = 1; in_last = (w == nw - 1);
        in_data = {8'(img[4*w+3]), 8'(img[4*w+2]), 8'(img[4*w+1]), 8'(img[4*w])};
        do @(posedge clk); while (!in_ready);
        #1 in_valid = 0; in_last = 0;
      end
      wait (expq.size() == 0);
      repeat (5) @(posedge clk);
      #1;
    end
    checks++;
    if (words_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

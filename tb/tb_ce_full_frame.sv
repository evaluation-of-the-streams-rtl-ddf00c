// tb_ce_full_frame: contrast enhancement at its default size on the largest
// frame one 65,536-word SRAM bank holds, 262,144 pixels (a 512 x 512
// image), first with a narrow, shifted grey range so the stretch is
// visible, then with a flat image whose single grey level fills one
// histogram bin with every pixel. All
// output pixels are compared with rank*256/N; the frame must come out at one
// pixel per cycle once read-back starts, with the host always ready.
module tb_ce_full_frame;
  localparam int NW = 65536, NPIX = 4 * NW;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [31:0] in_data = '0;
  logic out_valid, out_ready = 1, out_last;
  logic [31:0] out_data;
  logic img_we, img_rd, tab_rd;
  logic [15:0] img_addr, tab_addr;
  logic [31:0] img_wdata, img_rdata, tab_rdata;
  int checks = 0, failures = 0, words_out = 0, cycle = 0, t_first = 0, t_last = 0;
  byte unsigned img [NPIX];
  int expv [256];

  ce_pipeline dut (.*);
  sram_model u_img (.clk, .we(img_we), .rd(img_rd), .addr(img_addr), .wdata(img_wdata), .rdata(img_rdata));
  sram_model u_tab (.clk, .we(1'b0), .rd(tab_rd), .addr(tab_addr), .wdata('0), .rdata(tab_rdata));
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (2400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && out_valid) begin
    automatic logic [31:0] e;
    for (int i = 0; i < 4; i++) e[i*8 +: 8] = 8'(expv[img[4*words_out + i]]);
    if (words_out == 0) t_first = cycle;
    t_last = cycle;
    checks++;
    if (out_data != e || out_last != (words_out == NW - 1)) begin
      failures++;
      if (failures < 10) $display("FAIL word %0d: %h exp %h", words_out, out_data, e);
    end
    words_out++;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int n = 0; n < 256; n++) u_tab.mem[a*256 + n] = 32'((n * 256) / (a + 1));
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int frame = 0; frame < 2; frame++) begin
      automatic bit present [256];
      automatic int nlev = 0;
      for (int g = 0; g < 256; g++) present[g] = 0;
      // frame 0: a dim image, levels 60..119 with some missing;
      // frame 1: a flat image, so one histogram bin counts every pixel
      for (int i = 0; i < NPIX; i++) begin
        automatic int v = 60 + (($urandom_range(0, 59) + i / 512) % 60);
        if (v % 7 == 3) v = 61;
        if (frame == 1) v = 200;
        img[i] = 8'(v);
        present[v] = 1;
      end
      for (int g = 0; g < 256; g++) begin expv[g] = nlev; if (present[g]) nlev++; end
      for (int g = 0; g < 256; g++) expv[g] = (expv[g] * 256) / nlev;
      words_out = 0;
      for (int w = 0; w < NW; w++) begin
        in_valid = 1; in_last = (w == NW - 1);
        in_data = {img[4*w+3], img[4*w+2], img[4*w+1], img[4*w]};
        do @(posedge clk); while (!in_ready);
        #1 in_valid = 0; in_last = 0;
      end
      wait (words_out == NW);
      checks++;
      // four pixels per word at one pixel per cycle
      if (t_last - t_first != 4 * (NW - 1)) begin
        failures++; $display("FAIL output took %0d cycles", t_last - t_first);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

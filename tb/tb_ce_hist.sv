// tb_ce_hist: checks the histogram / stretch-table process over three
// frames. Each frame is a random image whose grey levels are drawn from a
// random subset; the words are streamed in with gaps, and the packets are
// read back under random back-pressure (frame 0) or with the receiver always
// ready (frames 1 and 2). The test checks the image stored in the SRAM
// model, every packet {N-1, rank of the pixel's grey level among the levels
// present}, out_last on the final packet only, the input rate of one word
// per four cycles, and one packet per cycle when the receiver is ready.
module tb_ce_hist;
  localparam int ADDR_W = 10;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [31:0] in_data = '0;
  logic mem_we, mem_rd;
  logic [ADDR_W-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic out_valid, out_ready = 0, out_last;
  logic [15:0] out_data;
  int checks = 0, failures = 0, cycle = 0, stalls = 0;

  ce_hist #(.ADDR_W(ADDR_W)) dut (.*);
  sram_model #(.ADDR_W(ADDR_W)) u_mem (.clk, .we(mem_we), .rd(mem_rd), .addr(mem_addr),
                                       .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int frame = 0; frame < 3; frame++) begin
      automatic int nw = (frame == 2) ? 1 : $urandom_range(20, 120);
      automatic int img [$];
      automatic int levels [$];
      automatic bit present [256];
      automatic int rank [256];
      automatic int nlev = 0, t0 = 0, t1 = 0, tf = 0, tl = 0;
      // palette of grey levels for this frame
      for (int i = 0; i < $urandom_range(1, 40); i++) levels.push_back($urandom_range(0, 255));
      if (frame == 0) begin levels.push_back(0); levels.push_back(255); end
      for (int i = 0; i < 4 * nw; i++) img.push_back(levels[$urandom_range(0, levels.size() - 1)]);
      for (int g = 0; g < 256; g++) present[g] = 0;
      foreach (img[i]) present[img[i]] = 1;
      for (int g = 0; g < 256; g++) begin rank[g] = nlev; if (present[g]) nlev++; end
      // stream the image in
      for (int w = 0; w < nw; w++) begin
        in_valid = 1; in_last = (w == nw - 1);
        in_data = {8'(img[4*w+3]), 8'(img[4*w+2]), 8'(img[4*w+1]), 8'(img[4*w])};
        do @(posedge clk); while (!in_ready);
        if (w == 0) t0 = cycle;
        if (w == 1) t1 = cycle;
        #1 in_valid = 0; in_last = 0;
        if (frame == 0 && $urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
      end
      if (frame == 1 && nw > 1) begin
        checks++;
        if (t1 - t0 != 4) begin failures++; $display("FAIL input rate %0d", t1 - t0); end
      end
      // read the packets back
      for (int i = 0; i < 4 * nw; i++) begin
        out_ready = (frame != 0) || ($urandom_range(0, 2) != 0);
        @(posedge clk);
        while (!(out_valid && out_ready)) begin
          if (out_valid && !out_ready) stalls++;
          #1 out_ready = (frame != 0) || ($urandom_range(0, 2) != 0);
          @(posedge clk);
        end
        if (i == 0) tf = cycle;
        tl = cycle;
        checks++;
        if (out_data != {8'(nlev - 1), 8'(rank[img[i]])} || out_last != (i == 4 * nw - 1)) begin
          failures++;
          $display("FAIL frame %0d pixel %0d: got %h last=%0d exp %h", frame, i, out_data,
                   out_last, {8'(nlev - 1), 8'(rank[img[i]])});
        end
        #1 out_ready = 0;
      end
      if (frame != 0) begin
        checks++;
        if (tl - tf != 4 * nw - 1) begin failures++; $display("FAIL output rate %0d", tl - tf); end
      end
      for (int w = 0; w < nw; w++) begin
        checks++;
        if (u_mem.mem[w] != {8'(img[4*w+3]), 8'(img[4*w+2]), 8'(img[4*w+1]), 8'(img[4*w])}) begin
          failures++; $display("FAIL stored word %0d", w);
        end
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL back-pressure never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

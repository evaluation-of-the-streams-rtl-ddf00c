// tb_km_array: end-to-end test of the K-means array with 6 classes and 4
// bands. Centres are loaded through the stream, random pixels are
// classified and compared with a software nearest-centre search (L1
// distance, lowest class on ties), the result latency (NB_CLASS+2 cycles
// after the last band) is checked, and centres are reloaded mid-stream.
module tb_km_array;
  import km_pkg::*;
  localparam int DATA_W = 8, NB_BAND = 4, NB_CLASS = 6, IDX_W = 3, DIST_W = 11;
  logic clk = 0, rst = 1;
  logic s_valid = 0, s_ready;
  km_flag_e s_flag = KM_PIXEL;
  logic [DATA_W-1:0] s_data = '0;
  logic [IDX_W-1:0]  s_class = '0;
  logic res_valid;
  logic [IDX_W-1:0]  res_class;
  logic [DIST_W-1:0] res_dist;
  int checks = 0, failures = 0;
  int center [NB_CLASS][NB_BAND];
  int exp_cls [$], exp_dist [$], exp_time [$];
  int cycle = 0, reloads = 0;

  km_array #(.DATA_W(DATA_W), .NB_BAND(NB_BAND), .NB_CLASS(NB_CLASS)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(km_flag_e f, int data, int cls);
    s_valid = 1; s_flag = f; s_data = DATA_W'(data); s_class = IDX_W'(cls);
    @(posedge clk); #1;
    s_valid = 0;
  endtask

  task automatic load_center(int k);
    for (int d = 0; d < NB_BAND; d++) begin
      center[k][d] = $urandom_range(0, 255);
      put(KM_CENTER, center[k][d], k);
    end
  endtask

  task automatic classify();
    int px [NB_BAND];
    int best = 0, bd = 1 << 30;
    for (int d = 0; d < NB_BAND; d++) px[d] = $urandom_range(0, 255);
    for (int k = 0; k < NB_CLASS; k++) begin
      automatic int s = 0;
      for (int d = 0; d < NB_BAND; d++)
        s += (px[d] > center[k][d]) ? px[d] - center[k][d] : center[k][d] - px[d];
      if (s < bd) begin bd = s; best = k; end
    end
    for (int d = 0; d < NB_BAND; d++) begin
      if (d == NB_BAND - 1) begin
        exp_cls.push_back(best); exp_dist.push_back(bd);
        exp_time.push_back(cycle + NB_CLASS + 2);
      end
      put(KM_PIXEL, px[d], 0);
    end
  endtask

  always @(negedge clk) if (!rst && res_valid) begin
    checks++;
    if (exp_cls.size() == 0) begin
      failures++; $display("FAIL unexpected result");
    end else begin
      automatic int c = exp_cls.pop_front(), dd = exp_dist.pop_front(), t = exp_time.pop_front();
      if (res_class != IDX_W'(c) || res_dist != DIST_W'(dd) || cycle != t) begin
        failures++;
        $display("FAIL class %0d/%0d dist %0d/%0d cycle %0d/%0d", res_class, c, res_dist, dd, cycle, t);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < NB_CLASS; k++) load_center(k);
    for (int blk = 0; blk < 4; blk++) begin
      for (int p = 0; p < 50; p++) begin
        classify();
        if ($urandom_range(0, 4) == 0) begin @(posedge clk); #1; end
      end
      // move two centres before the next block of pixels
      load_center($urandom_range(0, NB_CLASS - 1));
      load_center($urandom_range(0, NB_CLASS - 1));
      reloads++;
    end
    repeat (NB_CLASS + 6) @(posedge clk);
    checks++;
    if (exp_cls.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_cls.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

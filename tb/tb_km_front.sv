// tb_km_front: checks that the K-means front stage turns host elements into
// array tokens: pixels get the maximum distance and index 0, centres get
// their destination class as index; one cycle of latency, always ready.
module tb_km_front;
  import km_pkg::*;
  localparam int DATA_W = 8, NB_BAND = 8, DIST_W = 12, IDX_W = 5;
  logic clk = 0, rst = 1;
  logic s_valid = 0, s_ready;
  km_flag_e s_flag = KM_PIXEL;
  logic [DATA_W-1:0] s_data = '0;
  logic [IDX_W-1:0]  s_class = '0;
  logic out_valid;
  km_flag_e out_flag;
  logic [DATA_W-1:0] out_data;
  logic [DIST_W-1:0] out_dist;
  logic [IDX_W-1:0]  out_index;
  int checks = 0, failures = 0;

  km_front #(.DATA_W(DATA_W), .NB_BAND(NB_BAND), .DIST_W(DIST_W), .IDX_W(IDX_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 100; i++) begin
      automatic km_flag_e f = km_flag_e'($urandom_range(0, 1));
      automatic int dat = $urandom_range(0, 255), cls = $urandom_range(0, 31);
      automatic logic v = ($urandom_range(0, 3) != 0);
      s_valid = v; s_flag = f; s_data = DATA_W'(dat); s_class = IDX_W'(cls);
      checks++;
      if (!s_ready) failures++;
      @(posedge clk); #1;
      s_valid = 0;
      checks++;
      if (out_valid != v) failures++;
      else if (v && (out_flag != f || out_data != DATA_W'(dat) ||
               out_dist != ((f == KM_PIXEL) ? {DIST_W{1'b1}} : '0) ||
               out_index != ((f == KM_PIXEL) ? '0 : IDX_W'(cls)))) begin
        failures++;
        $display("FAIL token %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

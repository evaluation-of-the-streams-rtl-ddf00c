// tb_km_filter: checks that the K-means filter reports exactly the last band
// of each pixel vector (class and distance, one cycle later) and drops
// centre vectors and the other bands.
module tb_km_filter;
  import km_pkg::*;
  localparam int DATA_W = 8, NB_BAND = 4, DIST_W = 11, IDX_W = 5;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  km_flag_e in_flag = KM_PIXEL;
  logic [DIST_W-1:0] in_dist = '0;
  logic [IDX_W-1:0]  in_index = '0;
  logic res_valid;
  logic [IDX_W-1:0]  res_class;
  logic [DIST_W-1:0] res_dist;
  int checks = 0, failures = 0, results = 0;

  km_filter #(.DATA_W(DATA_W), .NB_BAND(NB_BAND), .DIST_W(DIST_W), .IDX_W(IDX_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int v = 0; v < 60; v++) begin
      automatic km_flag_e f = km_flag_e'($urandom_range(0, 2) == 0);
      for (int d = 0; d < NB_BAND; d++) begin
        automatic int dv = $urandom_range(0, 2000), cls = $urandom_range(0, 31);
        // random idle cycles between bands
        while ($urandom_range(0, 3) == 0) begin
          @(posedge clk); #1;
          checks++;
          if (res_valid) failures++;
        end
        in_valid = 1; in_flag = f; in_dist = DIST_W'(dv); in_index = IDX_W'(cls);
        @(posedge clk); #1;
        in_valid = 0;
        checks++;
        if (f == KM_PIXEL && d == NB_BAND - 1) begin
          results++;
          if (!res_valid || res_class != IDX_W'(cls) || res_dist != DIST_W'(dv)) begin
            failures++;
            $display("FAIL vector %0d", v);
          end
        end else if (res_valid) begin
          failures++;
          $display("FAIL spurious result vector %0d band %0d", v, d);
        end
      end
    end
    checks++;
    if (results == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

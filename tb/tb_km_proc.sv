// tb_km_proc: self-checking test of one K-means processor (INDEX 2).
// Loads a class centre through centre tokens (tokens for another class must
// be ignored), then sends random pixel tokens with random incoming
// distances and checks every outgoing token, one cycle later, against a
// model of the processor program.
module tb_km_proc;
  import km_pkg::*;
  localparam int DATA_W = 8, NB_BAND = 4, DIST_W = 11, IDX_W = 3, INDEX = 2;

  logic clk = 0, rst = 1;
  logic in_valid = 0;
  km_flag_e in_flag = KM_PIXEL;
  logic [DATA_W-1:0] in_data = '0;
  logic [DIST_W-1:0] in_dist = '0;
  logic [IDX_W-1:0]  in_index = '0;
  logic out_valid;
  km_flag_e out_flag;
  logic [DATA_W-1:0] out_data;
  logic [DIST_W-1:0] out_dist;
  logic [IDX_W-1:0]  out_index;
  int checks = 0, failures = 0;
  int center [NB_BAND];

  km_proc #(.DATA_W(DATA_W), .NB_BAND(NB_BAND), .DIST_W(DIST_W), .IDX_W(IDX_W),
            .INDEX(INDEX)) dut (.*);

  always #5 clk = ~clk;

  task automatic send(km_flag_e f, int data, int ld, int idx,
                      int exp_dist, int exp_idx);
    in_valid = 1; in_flag = f; in_data = DATA_W'(data);
    in_dist = DIST_W'(ld); in_index = IDX_W'(idx);
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || out_flag != f || out_data != DATA_W'(data) ||
        out_dist != DIST_W'(exp_dist) || out_index != IDX_W'(exp_idx)) begin
      failures++;
      $display("FAIL flag=%0d data=%0d: got dist=%0d idx=%0d exp dist=%0d idx=%0d",
               f, data, out_dist, out_index, exp_dist, exp_idx);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // centre for class 2, then a decoy centre for class 3
    for (int d = 0; d < NB_BAND; d++) begin
      center[d] = $urandom_range(0, 255);
      send(KM_CENTER, center[d], 0, INDEX, 0, INDEX);
    end
    for (int d = 0; d < NB_BAND; d++) send(KM_CENTER, $urandom_range(0, 255), 0, 3, 0, 3);
    for (int p = 0; p < 200; p++) begin
      automatic int acc = 0;
      for (int d = 0; d < NB_BAND; d++) begin
        automatic int x = $urandom_range(0, 255);
        automatic int ld;
        automatic int li = $urandom_range(0, 1);
        acc += (x > center[d]) ? x - center[d] : center[d] - x;
        // every third pixel ties with the incoming distance
        ld = (p % 3 == 0) ? acc : $urandom_range(0, 1100);
        if (acc < ld) send(KM_PIXEL, x, ld, li, acc, INDEX);
        else          send(KM_PIXEL, x, ld, li, ld, li);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

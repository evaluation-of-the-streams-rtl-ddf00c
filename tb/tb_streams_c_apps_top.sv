// tb_streams_c_apps_top: end-to-end test of the four designs at their
// default sizes, run concurrently:
//   contrast enhancement: two frames through both chips with output
//     back-pressure (results compared with rank*256/N per pixel);
//   polyphase bank: 400 samples, every branch output compared with a
//     reference filter (default coefficients 3, 117, 1741, 128);
//   PPI: a 40-pixel, 16-band image in the pixel SRAM, three sets of two
//     skewers, results compared with a software scan;
//   K-means: 32 centres loaded, 150 pixels of 8 bands classified, centres
//     moved between blocks of pixels.
// It also counts how often each mechanism happened (input stall, output
// back-pressure, inter-chip stream full, even and odd chain outputs, each filter branch, skewer
// stream held off while busy, centre loads and reloads) and fails on any
// that never did.
module tb_streams_c_apps_top;
  import km_pkg::*;
  localparam int PPI_D = 16, PPI_NS = 4, PPI_KS = 2, NG = 10;
  localparam int PPI_DP_W = 8 + 3 + 4 + 1, PPI_RES_W = 2 * (PPI_DP_W + 16);
  localparam int KM_NB = 8, KM_NC = 32;

  logic clk = 0, rst = 1;
  // contrast enhancement
  logic ce_in_valid = 0, ce_in_ready, ce_in_last = 0;
  logic [31:0] ce_in_data = '0;
  logic ce_out_valid, ce_out_ready = 1, ce_out_last;
  logic [31:0] ce_out_data;
  logic ce_img_we, ce_img_rd, ce_tab_rd;
  logic [15:0] ce_img_addr, ce_tab_addr;
  logic [31:0] ce_img_wdata, ce_img_rdata, ce_tab_rdata;
  // polyphase
  logic pf_in_valid = 0;
  logic signed [7:0] pf_in_data = '0;
  logic [3:0] pf_out_valid, pf_out_odd;
  logic signed [15:0] pf_out_data [4];
  // ppi
  logic [15:0] ppi_n_groups = 16'(NG);
  logic ppi_skw_valid = 0, ppi_skw_ready;
  logic [PPI_KS*3-1:0] ppi_skw_data = '0;
  logic ppi_mem_rd;
  logic [15:0] ppi_mem_addr;
  logic [31:0] ppi_mem_rdata;
  logic ppi_res_valid, ppi_busy;
  logic [PPI_RES_W-1:0] ppi_res;
  // k-means
  logic km_s_valid = 0, km_s_ready;
  km_flag_e km_s_flag = KM_PIXEL;
  logic [7:0] km_s_data = '0;
  logic [4:0] km_s_class = '0;
  logic km_res_valid;
  logic [4:0] km_res_class;
  logic [11:0] km_res_dist;

  int checks = 0, failures = 0;
  int n_ce_in_stall = 0, n_ce_out_stall = 0, n_ce_frames = 0, n_ce_chan_full = 0;
  int n_pf_even = 0, n_pf_odd = 0, n_pf_branch [4];
  int n_ppi_sets = 0, n_ppi_held = 0;
  int n_km_loads = 0, n_km_reloads = 0, n_km_results = 0;

  streams_c_apps_top dut (.*);
  sram_model u_img (.clk, .we(ce_img_we), .rd(ce_img_rd), .addr(ce_img_addr),
                    .wdata(ce_img_wdata), .rdata(ce_img_rdata));
  sram_model u_tab (.clk, .we(1'b0), .rd(ce_tab_rd), .addr(ce_tab_addr),
                    .wdata('0), .rdata(ce_tab_rdata));
  sram_model u_ppi (.clk, .we(1'b0), .rd(ppi_mem_rd), .addr(ppi_mem_addr),
                    .wdata('0), .rdata(ppi_mem_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- contrast enhancement ----------------
  int ce_exp [$];
  always @(negedge clk) ce_out_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (!rst) begin
    if (ce_in_valid && !ce_in_ready) n_ce_in_stall++;
    if (ce_out_valid && !ce_out_ready) n_ce_out_stall++;
    if (!dut.u_ce.pk_ready) n_ce_chan_full++;
    if (ce_out_valid && ce_out_ready) begin
      automatic logic [31:0] e;
      for (int i = 0; i < 4; i++) e[i*8 +: 8] = 8'(ce_exp.pop_front());
      checks++;
      if (ce_out_data != e) begin failures++; $display("FAIL ce word %h exp %h", ce_out_data, e); end
      if (ce_out_last) n_ce_frames++;
    end
  end

  task automatic run_ce();
    for (int frame = 0; frame < 2; frame++) begin
      automatic int nw = 32;
      automatic int img [$];
      automatic bit present [256];
      automatic int rank [256];
      automatic int nlev = 0;
      for (int i = 0; i < 4 * nw; i++) img.push_back($urandom_range(30 * frame, 90 + 60 * frame));
      for (int g = 0; g < 256; g++) present[g] = 0;
      foreach (img[i]) present[img[i]] = 1;
      for (int g = 0; g < 256; g++) begin rank[g] = nlev; if (present[g]) nlev++; end
      foreach (img[i]) ce_exp.push_back((rank[img[i]] * 256) / nlev);
      for (int w = 0; w < nw; w++) begin
        ce_in_valid = 1; ce_in_last = (w == nw - 1);
        ce_in_data = {8'(img[4*w+3]), 8'(img[4*w+2]), 8'(img[4*w+1]), 8'(img[4*w])};
        do @(posedge clk); while (!ce_in_ready);
        #1 ce_in_valid = 0; ce_in_last = 0;
      end
      wait (ce_exp.size() == 0);
      @(posedge clk); #1;
    end
  endtask

  // ---------------- polyphase bank ----------------
  int pf_coef [4] = '{3, 117, 1741, 128};
  task automatic run_pf();
    automatic int hist [4][2][4];
    automatic int cnt [4];
    hist = '{default: 0};
    cnt = '{default: 0};
    for (int n = 0; n < 400; n++) begin
      automatic int x = $urandom_range(0, 255) - 128;
      automatic int k = n % 4;
      automatic int p = cnt[k] % 2;
      automatic int y = 0;
      for (int a = 3; a > 0; a--) hist[k][p][a] = hist[k][p][a-1];
      hist[k][p][0] = x;
      for (int a = 0; a < 4; a++) y += pf_coef[a] * hist[k][p][a];
      cnt[k]++;
      pf_in_valid = 1; pf_in_data = 8'(x);
      @(posedge clk); #1;
      pf_in_valid = 0;
      checks++;
      if (pf_out_valid != 4'(1 << k) || pf_out_odd[k] != p[0] || pf_out_data[k] != 16'(y)) begin
        failures++; $display("FAIL pf sample %0d", n);
      end
      n_pf_branch[k]++;
      if (p == 0) n_pf_even++; else n_pf_odd++;
    end
  endtask

  // ---------------- pixel purity index ----------------
  always @(posedge clk) if (!rst && ppi_skw_valid && !ppi_skw_ready) n_ppi_held++;
  task automatic run_ppi();
    automatic int pix [NG*PPI_NS][PPI_D];
    automatic int skw [3][PPI_KS][PPI_D];
    for (int n = 0; n < NG * PPI_NS; n++) for (int d = 0; d < PPI_D; d++) pix[n][d] = $urandom_range(0, 255);
    for (int g = 0; g < NG; g++) for (int d = 0; d < PPI_D; d++)
      for (int c = 0; c < PPI_NS; c++) u_ppi.mem[g*PPI_D + d][c*8 +: 8] = 8'(pix[g*PPI_NS + c][d]);
    for (int set = 0; set < 3; set++)
      for (int k = 0; k < PPI_KS; k++) for (int d = 0; d < PPI_D; d++) skw[set][k][d] = $urandom_range(0, 7) - 4;
    fork
      // the host streams all skewer sets back to back; the unit holds the
      // stream off while it works on a set
      for (int set = 0; set < 3; set++)
        for (int d = 0; d < PPI_D; d++) begin
          ppi_skw_valid = 1;
          for (int k = 0; k < PPI_KS; k++) ppi_skw_data[k*3 +: 3] = 3'(skw[set][k][d]);
          do @(posedge clk); while (!ppi_skw_ready);
          #1 ppi_skw_valid = 0;
        end
      for (int set = 0; set < 3; set++) begin
        for (int k = 0; k < PPI_KS; k++) begin
          automatic int emax = -1 << 20, emin = 1 << 20, imax = 0, imin = 0;
          for (int n = 0; n < NG * PPI_NS; n++) begin
            automatic int s = 0;
            for (int d = 0; d < PPI_D; d++) s += skw[set][k][d] * pix[n][d];
            if (s > emax) begin emax = s; imax = n; end
            if (s < emin) begin emin = s; imin = n; end
          end
          do @(posedge clk); while (!ppi_res_valid);
          checks++;
          if (ppi_res != {PPI_DP_W'(emax), 16'(imax), PPI_DP_W'(emin), 16'(imin)}) begin
            failures++; $display("FAIL ppi set %0d row %0d", set, k);
          end
        end
        n_ppi_sets++;
      end
    join
  endtask

  // ---------------- k-means ----------------
  int km_center [KM_NC][KM_NB];
  int km_exp_cls [$], km_exp_dist [$];
  always @(posedge clk) if (!rst && km_res_valid) begin
    automatic int c = km_exp_cls.pop_front(), dd = km_exp_dist.pop_front();
    checks++;
    n_km_results++;
    if (km_res_class != 5'(c) || km_res_dist != 12'(dd)) begin
      failures++; $display("FAIL km class %0d/%0d dist %0d/%0d", km_res_class, c, km_res_dist, dd);
    end
  end
  task automatic km_put(km_flag_e f, int data, int cls);
    km_s_valid = 1; km_s_flag = f; km_s_data = 8'(data); km_s_class = 5'(cls);
    @(posedge clk); #1;
    km_s_valid = 0;
  endtask
  task automatic km_load(int k);
    for (int d = 0; d < KM_NB; d++) begin
      km_center[k][d] = $urandom_range(0, 255);
      km_put(KM_CENTER, km_center[k][d], k);
    end
    n_km_loads++;
  endtask
  task automatic run_km();
    for (int k = 0; k < KM_NC; k++) km_load(k);
    for (int blk = 0; blk < 3; blk++) begin
      for (int p = 0; p < 50; p++) begin
        automatic int px [KM_NB];
        automatic int best = 0, bd = 1 << 30;
        for (int d = 0; d < KM_NB; d++) px[d] = $urandom_range(0, 255);
        for (int k = 0; k < KM_NC; k++) begin
          automatic int s = 0;
          for (int d = 0; d < KM_NB; d++)
            s += (px[d] > km_center[k][d]) ? px[d] - km_center[k][d] : km_center[k][d] - px[d];
          if (s < bd) begin bd = s; best = k; end
        end
        km_exp_cls.push_back(best); km_exp_dist.push_back(bd);
        for (int d = 0; d < KM_NB; d++) km_put(KM_PIXEL, px[d], 0);
      end
      km_load($urandom_range(0, KM_NC - 1));
      n_km_reloads++;
    end
    repeat (KM_NC + 4) @(posedge clk);
    #1;
  endtask

  initial begin
    n_pf_branch = '{default: 0};
    for (int a = 0; a < 256; a++)
      for (int n = 0; n < 256; n++) u_tab.mem[a*256 + n] = 32'((n * 256) / (a + 1));
    repeat (3) @(posedge clk);
    #1 rst = 0;
    fork
      run_ce();
      run_pf();
      run_ppi();
      run_km();
    join
    // mechanism coverage
    checks++; if (n_ce_in_stall == 0)  begin failures++; $display("FAIL never: ce input stall"); end
    checks++; if (n_ce_out_stall == 0) begin failures++; $display("FAIL never: ce output back-pressure"); end
    checks++; if (n_ce_chan_full == 0) begin failures++; $display("FAIL never: inter-chip stream full"); end
    checks++; if (n_ce_frames != 2)    begin failures++; $display("FAIL ce frames %0d", n_ce_frames); end
    checks++; if (n_pf_even == 0 || n_pf_odd == 0) begin failures++; $display("FAIL never: pf chain"); end
    for (int k = 0; k < 4; k++) begin
      checks++; if (n_pf_branch[k] == 0) begin failures++; $display("FAIL never: pf branch %0d", k); end
    end
    checks++; if (n_ppi_sets != 3)     begin failures++; $display("FAIL ppi sets %0d", n_ppi_sets); end
    checks++; if (n_ppi_held == 0)     begin failures++; $display("FAIL never: ppi skewer stream held"); end
    checks++; if (n_km_reloads == 0 || n_km_loads < KM_NC) begin failures++; $display("FAIL never: km reload"); end
    checks++; if (n_km_results != 150) begin failures++; $display("FAIL km results %0d", n_km_results); end
    $display("mechanisms: ce in-stall %0d, ce out-stall %0d, ce stream full %0d, ce frames %0d, pf even %0d odd %0d, ppi sets %0d held %0d, km loads %0d reloads %0d results %0d",
             n_ce_in_stall, n_ce_out_stall, n_ce_chan_full, n_ce_frames, n_pf_even, n_pf_odd, n_ppi_sets, n_ppi_held,
             n_km_loads, n_km_reloads, n_km_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ce_remap: checks the remap process. The SRAM model is filled with the
// division table, entry {a, n} = n*256/(a+1); random packets {N-1, n} with
// n < N are sent with gaps and the output words are taken under random
// back-pressure. Every output word must hold the four table values of four
// consecutive packets (first in the low byte), and out_last must mark the
// word with the final pixel. With no stalls the process takes one packet
// per cycle.
module tb_ce_remap;
  localparam int ADDR_W = 16;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [15:0] in_data = '0;
  logic mem_rd;
  logic [ADDR_W-1:0] mem_addr;
  logic [31:0] mem_rdata;
  logic out_valid, out_ready = 0, out_last;
  logic [31:0] out_data;
  int checks = 0, failures = 0, cycle = 0, stalls = 0, accepted = 0;
  int expq [$];
  bit lastq [$];
  bit random_ready = 1;

  ce_remap #(.ADDR_W(ADDR_W)) dut (.*);
  sram_model #(.ADDR_W(ADDR_W)) u_mem (.clk, .we(1'b0), .rd(mem_rd), .addr(mem_addr),
                                       .wdata('0), .rdata(mem_rdata));
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side
  always @(negedge clk) out_ready <= random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) if (!rst) begin
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      automatic logic [31:0] e = '0;
      automatic bit l = 0;
      for (int i = 0; i < 4; i++) if (expq.size() > 0) begin
        e[i*8 +: 8] = 8'(expq.pop_front()); l = lastq.pop_front();
        if (l) break;
      end
      checks++;
      if (out_data != e || out_last != l) begin
        failures++; $display("FAIL word %h exp %h last %0d/%0d", out_data, e, out_last, l);
      end
    end
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int n = 0; n < 256; n++) u_mem.mem[a*256 + n] = 32'((n * 256) / (a + 1));
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int frame = 0; frame < 2; frame++) begin
      automatic int np = 4 * $urandom_range(10, 60) + ((frame == 0) ? 2 : 0);
      automatic int a = $urandom_range(0, 255);
      automatic int t0 = 0;
      random_ready = (frame == 0);
      for (int i = 0; i < np; i++) begin
        automatic int n = $urandom_range(0, a);
        expq.push_back((n * 256) / (a + 1)); lastq.push_back(i == np - 1);
        in_valid = 1; in_data = {8'(a), 8'(n)}; in_last = (i == np - 1);
        do @(posedge clk); while (!in_ready);
        if (i == 0) t0 = cycle;
        if (frame == 1 && i == np - 1) begin
          checks++;
          if (cycle - t0 != np - 1) begin failures++; $display("FAIL rate %0d", cycle - t0); end
        end
        #1 in_valid = 0; in_last = 0;
        if (frame == 0 && $urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
      end
      repeat (10) @(posedge clk);
      #1;
    end
    checks++;
    if (expq.size() != 0 || stalls == 0) begin
      failures++; $display("FAIL left=%0d stalls=%0d", expq.size(), stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

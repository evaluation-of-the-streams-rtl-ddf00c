// tb_sc_stream: checks the stream channel with a random writer and a random
// reader: elements must come out in order, with their end-of-stream flags,
// none lost or repeated; the writer must be held off when the channel is
// full and the reader see nothing when it is empty; with both sides always
// ready the channel must pass one element per cycle.
module tb_sc_stream;
  localparam int WIDTH = 16, DEPTH = 4, N = 2000;
  logic clk = 0, rst = 1;
  logic w_valid = 0, w_ready, w_eos = 0, r_valid, r_ready = 0, r_eos;
  logic [WIDTH-1:0] w_data = '0, r_data;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0, sent = 0, got = 0, fulls = 0, cycle = 0;
  int t_burst0 = 0;
  bit fast = 0;

  sc_stream #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] val(int i);
    return WIDTH'(i * 40503 + 17);
  endfunction

  // reader
  always @(negedge clk) r_ready <= fast ? 1'b1 : ($urandom_range(0, 2) == 0);
  always @(posedge clk) if (!rst) begin
    if (w_valid && !w_ready) begin
      fulls++;
      checks++;
      if (level != DEPTH) begin failures++; $display("FAIL writer held at level %0d", level); end
    end
    if (r_valid && r_ready) begin
      checks++;
      if (r_data != val(got) || r_eos != (got % 100 == 99)) begin
        failures++; $display("FAIL element %0d: %h exp %h", got, r_data, val(got));
      end
      got++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (r_valid) failures++;
    for (int i = 0; i < N; i++) begin
      if (i == N - 200) begin
        fast = 1;
        wait (got == sent);
        @(posedge clk); #1;
        t_burst0 = cycle;
      end
      w_valid = 1; w_data = val(i); w_eos = (i % 100 == 99);
      do @(posedge clk); while (!w_ready);
      sent++;
      #1 w_valid = 0;
      if (!fast && $urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
    checks++;
    if (cycle - t_burst0 != 200) begin failures++; $display("FAIL burst took %0d cycles", cycle - t_burst0); end
    wait (got == N);
    @(posedge clk);
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL channel never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

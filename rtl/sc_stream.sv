// sc_stream: hardware stream channel between a writer process and a reader
// process.
//
// Processes that run concurrently synchronise only through the streams that
// join them: a write blocks while the channel is full, a read blocks while
// it is empty. This channel is a DEPTH-entry first-in first-out buffer with
// a valid/ready handshake on each side; an element moves on a cycle where
// valid and ready are both high. Each element carries WIDTH data bits and an
// end-of-stream flag (eos) that the writer sets on its last element, so the
// reader can end its loop on it.
//
// Timing: an element written in one cycle can be read in the next; with a
// reader that is always ready the channel passes one element per cycle.
// Writer and reader share the clock. DEPTH (a power of two, at least 2) and
// the handshake are this design's choices.
module sc_stream #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  // writer side
  input  logic             w_valid,
  output logic             w_ready,
  input  logic [WIDTH-1:0] w_data,
  input  logic             w_eos,
  // reader side
  output logic             r_valid,
  input  logic             r_ready,
  output logic [WIDTH-1:0] r_data,
  output logic             r_eos,
  output logic [$clog2(DEPTH):0] level
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH:0]  buf_q [DEPTH];
  logic [AW-1:0]   wp, rp;
  logic            do_w, do_r;

  assign w_ready = (level != (AW+1)'(DEPTH));
  assign r_valid = (level != '0);
  assign do_w    = w_valid && w_ready;
  assign do_r    = r_valid && r_ready;
  assign {r_eos, r_data} = buf_q[rp];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (do_w) begin
        buf_q[wp] <= {w_eos, w_data};
        wp        <= wp + 1'b1;
      end
      if (do_r) rp <= rp + 1'b1;
      level <= level + (AW+1)'(do_w) - (AW+1)'(do_r);
    end
  end

  // A writer must hold its element until it is taken.
  property p_w_hold;
    @(posedge clk) disable iff (rst) w_valid && !w_ready |=> w_valid && $stable(w_data);
  endproperty
  assert property (p_w_hold);
  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH) else $error("sc_stream: DEPTH must be a power of two");
endmodule

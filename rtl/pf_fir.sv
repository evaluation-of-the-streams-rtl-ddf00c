// pf_fir: one 4-tap polyphase filter branch with separate even and odd
// sample chains.
//
// Every input sample s is multiplied by the four coefficients COEF[0..3]
// (one multiplier per tap, shared by both chains). Two transposed-form
// delay chains accumulate the products: samples alternate between them, so
// the even chain only sees even samples and the odd chain only odd ones.
// For a sample on a chain with state (r0, r1, r2):
//     y  = r0 + COEF[0]*s        (output)
//     r0 = r1 + COEF[1]*s
//     r1 = r2 + COEF[2]*s
//     r2 =      COEF[3]*s
// so the even output is y(n) = C0 x(n) + C1 x(n-2) + C2 x(n-4) + C3 x(n-6),
// and likewise for odd samples. The chain registers only load on their own
// samples. Input: signed 8-bit samples; coefficients: signed 12-bit, with
// defaults 3, 117, 1741, 128 as in the text. The output carries the low
// OUT_W (16) bits of the sum, as the reference program packs y into a
// 16-bit field; the wrap on overflow is that program's behaviour.
//
// Timing: one sample per cycle at most; out_valid follows in_valid by one
// cycle. out_odd tells which chain produced the output. The first sample
// after reset goes to the even chain (this design's choice). The chain
// state is reset to zero.
module pf_fir #(
  parameter int IN_W   = 8,
  parameter int COEF_W = 12,
  parameter int OUT_W  = 16,
  parameter int ACC_W  = IN_W + COEF_W + 2,
  // COEF[i] is tap i (packed array, tap 0 in the low bits)
  parameter logic [3:0][COEF_W-1:0] COEF = {12'sd128, 12'sd1741, 12'sd117, 12'sd3}
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic                    out_odd,
  output logic signed [OUT_W-1:0] out_data
);
  logic signed [ACC_W-1:0] prod [4];
  logic signed [ACC_W-1:0] ev [3];   // even-sample chain
  logic signed [ACC_W-1:0] od [3];   // odd-sample chain
  logic                    odd_phase;

  always_comb
    for (int i = 0; i < 4; i++) prod[i] = ACC_W'(in_data) * ACC_W'($signed(COEF[i]));

  always_ff @(posedge clk) begin
    if (rst) begin
      odd_phase <= 1'b0;
      out_valid <= 1'b0;
      out_odd   <= 1'b0;
      out_data  <= '0;
      for (int i = 0; i < 3; i++) begin
        ev[i] <= '0;
        od[i] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        odd_phase <= ~odd_phase;
        out_odd   <= odd_phase;
        if (!odd_phase) begin
          out_data <= OUT_W'(ev[0] + prod[0]);
          ev[0]    <= ev[1] + prod[1];
          ev[1]    <= ev[2] + prod[2];
          ev[2]    <= prod[3];
        end else begin
          out_data <= OUT_W'(od[0] + prod[0]);
          od[0]    <= od[1] + prod[1];
          od[1]    <= od[2] + prod[2];
          od[2]    <= prod[3];
        end
      end
    end
  end
endmodule

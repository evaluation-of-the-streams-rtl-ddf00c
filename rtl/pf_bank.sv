// pf_bank: a bank of M polyphase filter branches p0..p(M-1) (M = 4).
//
// The polyphase decomposition gives branch k the prototype taps
// h0[k], h0[k+M], h0[k+2M], ... . Input samples are dealt to the branches by
// a commutator: sample n goes to branch n mod M, which is how each branch
// sees its own phase of the input. Each branch is a pf_fir. The FFT that
// follows a polyphase filter bank to shift the channels in frequency is not
// part of this block.
//
// Coefficients: COEFS[k] holds the four taps of branch k. Only one set of
// four coefficients is given for the filter (3, 117, 1741, 128), so every
// branch defaults to it; load real prototype taps through the parameter.
//
// Interface: one signed 8-bit sample per cycle in; per branch an output
// valid, odd-chain flag and 16-bit result. Each branch's output appears one
// cycle after the sample it was fed.
module pf_bank #(
  parameter int M      = 4,
  parameter int IN_W   = 8,
  parameter int COEF_W = 12,
  parameter int OUT_W  = 16,
  // COEFS[k][i] is tap i of branch k
  parameter logic [M-1:0][3:0][COEF_W-1:0] COEFS =
    {M{12'sd128, 12'sd1741, 12'sd117, 12'sd3}}
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic [M-1:0]            out_valid,
  output logic [M-1:0]            out_odd,
  output logic signed [OUT_W-1:0] out_data [M]
);
  localparam int SW = (M > 1) ? $clog2(M) : 1;
  logic [SW-1:0] sel;

  always_ff @(posedge clk) begin
    if (rst) sel <= '0;
    else if (in_valid) sel <= (sel == SW'(M - 1)) ? '0 : sel + 1'b1;
  end

  for (genvar k = 0; k < M; k++) begin : g_branch
    pf_fir #(.IN_W(IN_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .COEF(COEFS[k])) u_fir (
      .clk, .rst,
      .in_valid (in_valid && sel == SW'(k)),
      .in_data,
      .out_valid(out_valid[k]),
      .out_odd  (out_odd[k]),
      .out_data (out_data[k]));
  end
endmodule

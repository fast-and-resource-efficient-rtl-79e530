// sigmoid_out: output-layer batch normalisation and sigmoid activation.
//
// For each of the N outputs the integer sum s of the output dense layer is
// turned into z = (s * gamma + beta) / 256, gamma and beta being signed
// 16-bit fixed-point numbers with 8 fraction bits that hold the folded batch
// normalisation. The sigmoid of z is approximated by the standard four-piece
// linear form (slopes 1/4, 1/8, 1/32 and 0, breakpoints 1, 2.375 and 5,
// mirrored as 1 - y for negative z), whose largest error is below 0.02. The
// result y is unsigned Q0.8 (y/256), clamped to 255.
// Timing: in_valid in cycle t gives out_valid and y in cycle t+1.
// The sigmoid output follows the published network; the fixed-point format
// and the piecewise-linear approximation are this implementation's choice.
module sigmoid_out
  import tcnn_pkg::*;
#(
  parameter int N = N_OUT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  acc_t               s     [N],
  input  logic signed [15:0] gamma [N],
  input  logic signed [15:0] beta  [N],
  output logic [7:0]         y     [N],
  output logic               out_valid
);
  logic [7:0] y_nxt [N];

  always_comb
    for (int i = 0; i < N; i++) begin
      logic signed [31:0] z;
      logic        [31:0] a;
      logic        [31:0] p;
      z = 32'(s[i]) * 32'(gamma[i]) + 32'(beta[i]);   // Q.8
      a = (z < 0) ? 32'(-z) : 32'(z);
      if (a >= 32'd1280)      p = 32'd256;                   // |z| >= 5
      else if (a >= 32'd608)  p = (a >> 5) + 32'd216;        // 2.375 <= |z| < 5
      else if (a >= 32'd256)  p = (a >> 3) + 32'd160;        // 1 <= |z| < 2.375
      else                    p = (a >> 2) + 32'd128;        // |z| < 1
      if (z < 0) p = 32'd256 - p;
      y_nxt[i] = (p > 32'd255) ? 8'd255 : p[7:0];
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < N; i++) y[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= y_nxt;
    end
endmodule

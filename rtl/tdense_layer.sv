// tdense_layer: fully connected layer with ternary weights and ternary inputs.
//
// When start is high, the integer sum sum[j] = sum_i w[j][i] * x[i] of every
// neuron is computed in one clock and registered; done is high in the next
// cycle and sum holds until the following start. Each product is a sign
// selection, so the layer is an adder tree per neuron with no multipliers.
// Latency: done follows start by exactly one cycle.
module tdense_layer
  import tcnn_pkg::*;
#(
  parameter int NIN  = 160,
  parameter int NOUT = DEF_N_HID
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  trit_t x   [NIN],
  input  trit_t w   [NOUT][NIN],
  output acc_t  sum [NOUT],
  output logic  done
);
  acc_t nxt [NOUT];

  for (genvar j = 0; j < NOUT; j++) begin : g_neuron
    always_comb begin
      nxt[j] = '0;
      for (int i = 0; i < NIN; i++) nxt[j] += acc_t'(tmul(x[i], w[j][i]));
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      done <= 1'b0;
      for (int j = 0; j < NOUT; j++) sum[j] <= '0;
    end else begin
      done <= start;
      if (start) sum <= nxt;
    end
endmodule

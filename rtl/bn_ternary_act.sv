// bn_ternary_act: batch normalisation and deterministic ternary activation
// for a vector of N integer sums.
//
// With a positive batch-norm scale, "normalise, then compare with +/-delta"
// is equivalent to comparing the raw sum with two integer thresholds per
// channel, computed offline from the trained mean, variance, scale, offset
// and delta. Output is +1 when sum > hi, -1 when sum < lo, 0 otherwise.
// A negative scale is absorbed by flipping the signs of that channel's
// weights before loading them. Purely combinational.
module bn_ternary_act
  import tcnn_pkg::*;
#(
  parameter int N = DEF_N_HID
) (
  input  acc_t  s  [N],
  input  acc_t  lo [N],
  input  acc_t  hi [N],
  output trit_t a  [N]
);
  always_comb
    for (int i = 0; i < N; i++) a[i] = tact(s[i], lo[i], hi[i]);
endmodule

// iso_nonlinearity: one component of the isomorphic Hopfield derivative
//
//   F_i = l_i(v_i) * (sum_j T_ij v_j + I_i),   l_i(v) = 2 * lambda_i * v * (1 - v)
//
// The isomorphic mapping v = g(u) with g(u) = (1 + tanh(lambda u)) / 2 turns
// the tanh of the original Hopfield model into this second-order polynomial
// of the firing rate, so only multipliers and adders are needed.
//
// Interface: `acc` is the finished weighted sum sum_j T_ij v_j, `v` the firing
// rate, `bias` the external input I_i and `lambda` the gain. `f` is
// combinational (three fixed-point multiplies, two adds), no clock.
// The formula is the source architecture's; the evaluation order and the
// rounding (truncation and saturation after each operation) are this design's.
module iso_nonlinearity
  import hop_pkg::*;
(
  input  fix_t acc,
  input  fix_t v,
  input  fix_t bias,
  input  fix_t lambda,
  output fix_t f
);
  fix_t two_lambda_v, shunt, net_in;

  always_comb begin
    two_lambda_v = fix_mul(fix_add(lambda, lambda), v);
    shunt        = fix_mul(two_lambda_v, fix_add(FIX_ONE, -v));
    net_in       = fix_add(acc, bias);
    f            = fix_mul(shunt, net_in);
  end
endmodule

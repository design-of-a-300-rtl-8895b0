// sos_df2 -- one direct form II second order section, combinational.
//
// Computes, for one sample, the section of the transmit/receive and
// demodulator filters:
//   q0  = scale*x + a1*q1 + a2*q2
//   y   = q0 + b1*q1 + b2*q2
// where q1, q2 are the section's two delayed states held by the caller.
// The caller registers q0 into q1 and q1 into q2 once per sample, so one
// section's storage can be shared between channels (time multiplexing).
// A first order section is the same module with a2 = b2 = 0.
//
// Each product is truncated to W fractional bits and both q0 and y are
// saturated to W bits, following the saturating adder of the processors.
// The structure and equations follow the design; summing all products before
// one saturation (rather than saturating after each partial add) is this
// implementation's choice.
module sos_df2
  import modem_pkg::*;
#(
  parameter int unsigned W = 20
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] q1,
  input  logic signed [W-1:0] q2,
  input  sos_coef_t           c,
  output logic signed [W-1:0] q0,
  output logic signed [W-1:0] y
);
  logic signed [39:0] acc_q;

  always_comb begin
    acc_q = sat(cmul(40'(x), c.scale) + cmul(40'(q1), c.a1) + cmul(40'(q2), c.a2), W);
    y  = W'(sat(acc_q + cmul(40'(q1), c.b1) + cmul(40'(q2), c.b2), W));
    q0 = acc_q[W-1:0];
  end
endmodule

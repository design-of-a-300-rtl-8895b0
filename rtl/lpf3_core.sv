// lpf3_core -- third order lowpass filter of the demodulator, combinational.
//
// Cutoff 300 Hz at 9600 Hz sampling (maximally flat passband, equal ripple
// stopband): one second order section followed by one first order section,
// both direct form II, with the design's canonical-signed-digit coefficients
//   section 1: scale 0.09375, a1 1.5625, a2 -0.6875, b1 -0.25, b2 1.0
//   section 2: scale 0.125,   a1 0.65625,            b1 1.0
// (DC gain about 0.955). The same filter serves the gain control's envelope
// detector and both paths of the demodulators.
//
// The three state words live with the caller, so one core can be shared
// between channels. For one sample the caller presents x and the states and
// registers the returned next states (s1_q1 <= s1_q0, s1_q2 <= s1_q1,
// s2_q1 <= s2_q0).
module lpf3_core
  import modem_pkg::*;
#(
  parameter int unsigned W = MODEM_W
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] s1_q1,
  input  logic signed [W-1:0] s1_q2,
  input  logic signed [W-1:0] s2_q1,
  output logic signed [W-1:0] s1_q0,
  output logic signed [W-1:0] s2_q0,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] mid;

  sos_df2 #(.W(W)) u_sec1 (
    .x(x), .q1(s1_q1), .q2(s1_q2), .c(LPF_SEC1), .q0(s1_q0), .y(mid));
  sos_df2 #(.W(W)) u_sec2 (
    .x(mid), .q1(s2_q1), .q2('0), .c(LPF_SEC2), .q0(s2_q0), .y(y));
endmodule

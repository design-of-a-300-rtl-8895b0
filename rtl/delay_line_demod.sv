// delay_line_demod -- delay-line discriminator, the alternative FSK
// demodulator.
//
// The normalised input is multiplied by itself delayed: A cos(wt) times
// A cos(wt + wT') averages to (A^2/2) cos(wT'), a level that falls as the
// frequency rises. The third order 300 Hz lowpass filter removes the 2w
// term and the level is compared with a threshold half way between mark and
// space. Delay and threshold depend on the receive band so that the
// threshold stays near zero:
//   originate band (2025/2225 Hz): one sample delay,  threshold TH_ORIG
//   answer band    (1070/1270 Hz): two sample delays, threshold TH_ANS
// RXD is mark when the filtered level is below the threshold. The product is
// formed by the serial (bit-per-clock) multiplier.
//
// Interface/timing: `en` presents sample `x` and starts the multiplier, which
// needs W-1 clocks; the lowpass filter and comparison take one more; `rxd`
// and `level` are registered and `valid` is high W clocks after the edge
// that samples `en`. Reset
// clears the delay line and filter state.
module delay_line_demod
  import modem_pkg::*;
#(
  parameter int unsigned W       = MODEM_W,
  parameter int          TH_ORIG = 680,
  parameter int          TH_ANS  = 161
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  input  logic                orig_band,
  output logic                rxd,
  output logic signed [W-1:0] level,
  output logic                valid
);
  logic signed [W-1:0] q1, q2, prod;
  logic signed [W-1:0] s1q1, s1q2, s2q1, s1q0, s2q0, ly;
  logic                band, mul_done, mul_busy;
  logic signed [39:0]  diff;

  serial_multiplier #(.W(W)) u_mul (
    .clk, .rst_n, .start(en), .x(x), .y(orig_band ? q1 : q2),
    .p(prod), .done(mul_done), .busy(mul_busy));

  lpf3_core #(.W(W)) u_lpf (
    .x(prod), .s1_q1(s1q1), .s1_q2(s1q2), .s2_q1(s2q1),
    .s1_q0(s1q0), .s2_q0(s2q0), .y(ly));

  assign diff = 40'(ly) - 40'(band ? TH_ORIG : TH_ANS);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q1 <= '0; q2 <= '0; band <= 1'b0;
      s1q1 <= '0; s1q2 <= '0; s2q1 <= '0;
      rxd <= 1'b0; level <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (en) begin
        q2   <= q1;
        q1   <= x;
        band <= orig_band;
      end
      if (mul_done) begin
        s1q2  <= s1q1;
        s1q1  <= s1q0;
        s2q1  <= s2q0;
        level <= ly;
        rxd   <= diff < 0;
        valid <= 1'b1;
      end
    end
  end

`ifndef SYNTHESIS
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) en |-> !mul_busy)
    else $error("delay_line_demod: new sample while the multiplier is busy");
`endif
endmodule

// agc -- automatic gain control: normalises the received signal by its
// envelope so the demodulator sees a constant amplitude.
//
// Per sample: the input's sign is kept, the full wave rectifier takes |x|,
// the third order 300 Hz lowpass filter (lpf3_core) smooths |x| into an
// envelope, and the envelope is scaled by 1.625 (1 + 1/2 + 1/8) so that for
// a sine wave it exceeds the rectified peak. |x| is then divided by the
// scaled envelope with the serial shift-subtract divider, and the stored sign
// is put back. The division is linear, unlike a hard limiter, so it creates
// no harmonics that would alias. The scaled envelope (`level`) also feeds the
// carrier detector.
//
// Interface/timing: `en` presents a new sample `x`; `level` is registered on
// the same clock edge and `level_valid` pulses the cycle after. The divider
// then runs W-1 clocks; `y` is registered and `y_valid` pulses W clocks after
// `en`. A new `en` must not arrive before `y_valid`. Reset clears the filter
// state.
module agc
  import modem_pkg::*;
#(
  parameter int unsigned W = MODEM_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y,
  output logic                y_valid,
  output logic signed [W-1:0] level,
  output logic                level_valid,
  output logic                busy
);
  logic signed [W-1:0] lpfin, s1q1, s1q2, s2q1, s1q0, s2q0, env;
  logic signed [39:0]  mag;
  logic signed [W-1:0] level_n, quot;
  logic                neg, div_done, div_busy;

  always_comb begin
    mag     = (x < 0) ? -40'(x) : 40'(x);
    lpfin   = sat(mag, W)[W-1:0];
    level_n = W'(sat(40'(env) + (40'(env) >>> 1) + (40'(env) >>> 3), W));
  end

  lpf3_core #(.W(W)) u_env (
    .x(lpfin), .s1_q1(s1q1), .s1_q2(s1q2), .s2_q1(s2q1),
    .s1_q0(s1q0), .s2_q0(s2q0), .y(env));

  serial_divider #(.W(W)) u_div (
    .clk, .rst_n, .start(en), .num(lpfin), .den(level_n),
    .quot, .done(div_done), .busy(div_busy));

  assign busy = div_busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1q1 <= '0; s1q2 <= '0; s2q1 <= '0;
      level <= '0; level_valid <= 1'b0;
      neg <= 1'b0; y <= '0; y_valid <= 1'b0;
    end else begin
      level_valid <= en;
      y_valid     <= div_done;
      if (en) begin
        s1q2  <= s1q1;
        s1q1  <= s1q0;
        s2q1  <= s2q0;
        level <= level_n;
        neg   <= x[W-1];
      end
      if (div_done) y <= neg ? -quot : quot;
    end
  end

`ifndef SYNTHESIS
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) en |-> !div_busy)
    else $error("agc: new sample while the divider is busy");
`endif
endmodule

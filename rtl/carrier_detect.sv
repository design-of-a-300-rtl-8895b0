// carrier_detect -- carrier detect (CD, active low) with hysteresis and
// turn-on/turn-off delays.
//
// The envelope level from the gain control is compared with a threshold:
// the -48 dB threshold TH_OFF while the previous comparison was positive, the
// higher -43 dB threshold TH_ON while it was negative (hysteresis, so CD does
// not flicker). The previous comparison's sign steers an integrating counter:
// it adds ST1 every sample, and also ST2 (negative) while the signal is below
// threshold, so it ramps up in about 8191/(ST1*9600) s (20 ms) and down in
// about 8191/((-ST1-ST2)*9600) s (10 ms). When the counter's sign changes it
// jumps to +MAXC or -MINC (limiter), so each change of state restarts a full
// delay. CD = 1 (carrier absent) while the counter is negative.
//
// Values are 14-bit (8191 = full scale); the thresholds are
// 8191*10^(-48/20) = 33 and 8191*10^(-43/20) = 58. Adds saturate.
// Timing: one update per `en`; `cd_n` registered. Reset: counter at -MINC,
// carrier absent.
module carrier_detect
  import modem_pkg::*;
#(
  parameter int unsigned W      = MODEM_W,
  parameter int          TH_OFF = 33,
  parameter int          TH_ON  = 58,
  parameter int          ST1    = 43,
  parameter int          ST2    = -128,
  parameter int          MAXC   = 8191,
  parameter int          MINC   = 8191
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] level,
  output logic                cd_n,
  output logic                changed   // pulses when cd_n toggles
);
  logic signed [W-1:0] cd, count, c_past;
  logic signed [W-1:0] cd_n_v;
  logic signed [39:0]  cnt_v;
  logic                r_neg, sc, scp;

  always_comb begin
    r_neg  = cd[W-1];
    cd_n_v = W'(sat(40'(level) - 40'(r_neg ? TH_ON : TH_OFF), W));
    cnt_v  = sat(40'(count) + 40'(ST1), W);
    if (r_neg) cnt_v = sat(cnt_v + 40'(ST2), W);
    sc  = cnt_v < 0;
    scp = c_past[W-1];
    if (sc ^ scp) cnt_v = sc ? -40'(MINC) : 40'(MAXC);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cd      <= '1;
      count   <= W'(-MINC);
      c_past  <= W'(-MINC);
      cd_n    <= 1'b1;
      changed <= 1'b0;
    end else begin
      changed <= 1'b0;
      if (en) begin
        cd      <= cd_n_v;
        count   <= cnt_v[W-1:0];
        c_past  <= cnt_v[W-1:0];
        cd_n    <= sc;
        changed <= sc != cd_n;
      end
    end
  end
endmodule

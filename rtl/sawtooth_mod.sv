// sawtooth_mod -- FSK modulator built from a sawtooth oscillator shaped into
// a sine-wave approximation.
//
// A 14-bit phase word `wave` (8191 = 1.0) falls by a step k each sample and is
// lifted by 1.0 whenever it has gone negative, giving a negative-slope
// sawtooth at F0 = k * 9600 Hz. The step is chosen from mode and data:
//   originate space 1070 Hz k=913, originate mark 1270 Hz k=1084,
//   answer space 2025 Hz k=1728, answer mark 2225 Hz k=1898.
// Only the step changes when the data changes, so the phase stays continuous.
// The sawtooth is shaped by: w-0.5 ; |2w| ; w-0.5 ; 3w, where the last step
// deliberately overflows the saturating adder to clip the triangle's peaks.
// SQT forces the output to zero (the oscillator keeps running).
//
// Timing: on `en` the phase is advanced and `mod_out` registered, one sample
// per `en`. `clipped` pulses when the last shaping step saturated, so the
// clipping can be observed. Reset starts the phase at 0 (not given by the
// design).
module sawtooth_mod
  import modem_pkg::*;
#(
  parameter int unsigned W = MODEM_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                orig,
  input  logic                txd,
  input  logic                sqt,
  output logic signed [W-1:0] mod_out,
  output logic                clipped
);
  localparam int ONE  = (1 <<< (W-1)) - 1;   // 8191 at 14 bits
  localparam int HALF = 1 <<< (W-2);         // 4096 at 14 bits
  // Steps for 14 bits: k = round(F0 / 9600 * 8191); scaled for other widths.
  localparam int K_OS = (913  * ONE + 4095) / 8191;
  localparam int K_OM = (1084 * ONE + 4095) / 8191;
  localparam int K_AS = (1728 * ONE + 4095) / 8191;
  localparam int K_AM = (1898 * ONE + 4095) / 8191;

  logic signed [W-1:0] wave;
  logic signed [39:0]  w_next, s1, s2, s3, s4, s5;
  int                  k;

  always_comb begin
    unique case ({orig, txd})
      2'b10:   k = K_OS;
      2'b11:   k = K_OM;
      2'b00:   k = K_AS;
      default: k = K_AM;
    endcase
    w_next = 40'(wave);
    if (wave < 0) w_next = w_next + 40'(ONE);
    w_next = sat(w_next - 40'(k), W);
    s1 = sat(w_next - 40'(HALF), W);          // centre around zero
    s2 = sat(s1 <<< 1, W);                    // double
    s3 = sat((s2 < 0) ? -s2 : s2, W);         // rectify: triangle 0..1
    s4 = sat(s3 - 40'(HALF), W);              // triangle -0.5..0.5
    s5 = sat(s4 * 3, W);                      // x3 with clipping
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wave    <= '0;
      mod_out <= '0;
      clipped <= 1'b0;
    end else if (en) begin
      wave    <= w_next[W-1:0];
      mod_out <= sqt ? '0 : s5[W-1:0];
      clipped <= (s4 * 3) != s5;
    end else begin
      clipped <= 1'b0;
    end
  end
endmodule

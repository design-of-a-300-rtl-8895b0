// band_filter -- tenth order bandpass filter of the transmit/receive path.
//
// Five direct form II second order sections in cascade, each preceded by its
// scale factor, followed by an output scale factor. LOWBAND=1 selects the
// lowband filter (centre 1170 Hz, zeros at 2025 and 2225 Hz); LOWBAND=0 the
// highband filter (centre 2125 Hz, zeros at 1070 and 1270 Hz). Coefficients
// and scale factors are the design's canonical-signed-digit values, held in
// modem_pkg.
//
// Timing: when `en` is high the whole cascade is evaluated combinationally
// from `x`, the ten state words are updated at the clock edge and `y` is
// registered, so `y` holds the output for the sample presented one clock
// earlier. One `en` per 9600 Hz sample period. Synchronous active-low reset
// clears the state (the design does not say how the state starts; zero is
// this implementation's choice).
module band_filter
  import modem_pkg::*;
#(
  parameter bit          LOWBAND = 1'b1,
  parameter int unsigned W       = FILT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  localparam band_coef_t SOS = LOWBAND ? LOWBAND_SOS : HIGHBAND_SOS;
  localparam coef_t OUT_SCALE = LOWBAND ? LOWBAND_OUT_SCALE : HIGHBAND_OUT_SCALE;

  logic signed [W-1:0] q1 [NSEC];
  logic signed [W-1:0] q2 [NSEC];
  logic signed [W-1:0] q0 [NSEC];
  logic signed [W-1:0] sec_in  [NSEC];
  logic signed [W-1:0] sec_out [NSEC];
  logic signed [W-1:0] y_scaled;

  for (genvar s = 0; s < NSEC; s++) begin : g_sec
    if (s == 0) begin : g_first
      assign sec_in[s] = x;
    end else begin : g_next
      assign sec_in[s] = sec_out[s-1];
    end
    sos_df2 #(.W(W)) u_sos (
      .x (sec_in[s]), .q1(q1[s]), .q2(q2[s]), .c(SOS[s]),
      .q0(q0[s]), .y(sec_out[s])
    );
  end

  assign y_scaled = W'(sat(cmul(40'(sec_out[NSEC-1]), OUT_SCALE), W));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NSEC; s++) begin
        q1[s] <= '0;
        q2[s] <= '0;
      end
      y <= '0;
    end else if (en) begin
      for (int s = 0; s < NSEC; s++) begin
        q2[s] <= q1[s];
        q1[s] <= q0[s];
      end
      y <= y_scaled;
    end
  end
endmodule

// bpf_demod -- bandpass-filter FSK demodulator with functional multiplexing.
//
// Two paths measure the signal energy near the space and near the mark
// frequency: a second order bandpass filter, a full wave rectifier and the
// third order 300 Hz lowpass filter. RXD is mark when the mark path's level
// is at least the space path's. The four bandpass filters share every
// coefficient except a1 (scale 2^-6+2^-12, a2 -0.9375, b1 0, b2 -1, output
// gain 2):
//   band = originate (2025/2225 Hz):  space a1 0.5,  mark a1 0.1875
//   band = answer    (1070/1270 Hz):  space a1 1.5,  mark a1 1.28125
// `orig_band` selects the set; the caller derives it from O/A and ALB.
//
// As in the original microprogram, one filter datapath is time multiplexed:
// the first pass after a sample computes the space path, the second pass the
// mark path, each with its own stored filter states.
//
// Interface/timing: `en` presents sample `x`; the space path updates on the
// clock edge that samples `en`, the mark path on the next edge, where
// `rxd`, `mark_level` and `space_level` are registered; `valid` is high after
// the second edge (two clocks after the `en` edge).
// Reset clears all filter state and sets rxd to space.
module bpf_demod
  import modem_pkg::*;
#(
  parameter int unsigned W = MODEM_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  input  logic                orig_band,
  output logic                rxd,
  output logic signed [W-1:0] mark_level,
  output logic signed [W-1:0] space_level,
  output logic                valid
);
  typedef enum logic [1:0] {IDLE, SPACE, MARK} phase_t;
  phase_t phase;

  logic signed [W-1:0] xr;
  logic                band;
  // per-path state: index 0 = space, 1 = mark
  logic signed [W-1:0] bq1 [2], bq2 [2], l1q1 [2], l1q2 [2], l2q1 [2];
  logic                ch;
  sos_coef_t           bc;
  logic signed [W-1:0] bq0, by, fwr, l1q0, l2q0, ly;
  logic signed [39:0]  dbl;

  assign ch = (phase == MARK);

  always_comb begin
    bc.scale = BPF_SCALE;
    bc.a2    = BPF_A2;
    bc.b1    = '0;
    bc.b2    = BPF_B2;
    unique case ({band, ch})
      2'b10:   bc.a1 = BPF_A1_ORIG_SPACE;
      2'b11:   bc.a1 = BPF_A1_ORIG_MARK;
      2'b00:   bc.a1 = BPF_A1_ANS_SPACE;
      default: bc.a1 = BPF_A1_ANS_MARK;
    endcase
  end

  sos_df2 #(.W(W)) u_bpf (
    .x(xr), .q1(bq1[ch]), .q2(bq2[ch]), .c(bc), .q0(bq0), .y(by));

  always_comb begin
    dbl = sat(40'(by) <<< 1, W);                     // output gain 2
    fwr = sat((dbl < 0) ? -dbl : dbl, W)[W-1:0];     // full wave rectifier
  end

  lpf3_core #(.W(W)) u_lpf (
    .x(fwr), .s1_q1(l1q1[ch]), .s1_q2(l1q2[ch]), .s2_q1(l2q1[ch]),
    .s1_q0(l1q0), .s2_q0(l2q0), .y(ly));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= IDLE;
      xr <= '0; band <= 1'b0;
      for (int i = 0; i < 2; i++) begin
        bq1[i] <= '0; bq2[i] <= '0; l1q1[i] <= '0; l1q2[i] <= '0; l2q1[i] <= '0;
      end
      rxd <= 1'b0; mark_level <= '0; space_level <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (phase != IDLE) begin
        bq2[ch]  <= bq1[ch];
        bq1[ch]  <= bq0;
        l1q2[ch] <= l1q1[ch];
        l1q1[ch] <= l1q0;
        l2q1[ch] <= l2q0;
      end
      unique case (phase)
        IDLE: if (en) begin
          xr    <= x;
          band  <= orig_band;
          phase <= SPACE;
        end
        SPACE: begin
          space_level <= ly;
          phase       <= MARK;
        end
        MARK: begin
          mark_level <= ly;
          rxd        <= (40'(ly) - 40'(space_level)) >= 0;
          valid      <= 1'b1;
          phase      <= IDLE;
        end
        default: phase <= IDLE;
      endcase
    end
  end
endmodule

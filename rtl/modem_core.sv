// modem_core -- the modem processor: FSK modulator, gain control, carrier
// detect and demodulator, working at the 9600 Hz sample rate.
//
// Transmit: once per sample the modulator produces the next 14-bit sample
// for the mode and data in the control word (`cword`); its upper 12 bits go
// out as `txmod` to the transmit filter. The modulator steps on
// `demod_valid`, the clock after `sample_en`, so that it already sees the
// control word the filter unit registered at that strobe (a squelch or data
// change takes effect in the same sample period). MOD_SAWTOOTH selects the
// sawtooth-and-shaping modulator (default, the compact variant) or the sine
// table modulator.
// Receive: each filtered receive word (`demod`, strobed by `demod_valid`) is
// widened to 14 bits, normalised by the gain control and demodulated.
// DEMOD_BPF selects the bandpass-filter demodulator (default) or the
// delay-line discriminator. The demodulator's band is the receive band,
// originate when O/A xor ALB (self-test listens to the own transmit band).
// The gain control's envelope drives the carrier detector. RXD and CD are
// packed into `wd_out` (RXD bit 11, CD active-low bit 10).
//
// Timing: the receive chain finishes about 20 clocks after `demod_valid`;
// successive strobes must be at least MIN_CLKS apart (checked by an
// assertion). CD_ST1/CD_ST2 are the carrier detector's counter steps: the
// defaults give the 20 ms / 10 ms delays, 164 / -328 the 50-sample test
// setting. Observable events (`ev_*` pulses), the separate RXD/CD bits
// and the gain control output and level are exported for test.
//
// Lint notes: control word bits 7..0 carry nothing and are not read; the
// gain control's busy flag and the demodulator's level outputs are not
// needed by the core (sample spacing is checked by the assertion instead).
module modem_core
  import modem_pkg::*;
#(
  parameter bit          MOD_SAWTOOTH = 1'b1,
  parameter bit          DEMOD_BPF    = 1'b1,
  parameter int unsigned MIN_CLKS     = 32,
  parameter int          CD_ST1       = 43,
  parameter int          CD_ST2       = -128
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sample_en,
  input  logic        [IO_W-1:0] cword,
  input  logic signed [IO_W-1:0] demod,
  input  logic                   demod_valid,
  output logic signed [IO_W-1:0] txmod,
  output logic        [IO_W-1:0] wd_out,
  output logic                   rxd,
  output logic                   cd_n,
  output logic signed [MODEM_W-1:0] agc_out,
  output logic signed [MODEM_W-1:0] agc_level,
  output logic                   ev_clip,
  output logic                   ev_cd_change
);
  localparam int unsigned SH = MODEM_W - IO_W;

  ctrl_t ctrl;
  logic signed [MODEM_W-1:0] mod_out, rx_wide;
  logic agc_valid, level_valid, agc_busy, dem_valid, dem_rxd, orig_band;
  logic signed [MODEM_W-1:0] dem_level_a, dem_level_b;

  assign ctrl      = decode_wordin(cword[11:8]);
  assign orig_band = ctrl.orig ^ ctrl.alb;
  assign rx_wide   = MODEM_W'(demod) <<< SH;
  assign txmod     = IO_W'(mod_out >>> SH);

  // ---------------- modulator ----------------
  if (MOD_SAWTOOTH) begin : g_saw
    sawtooth_mod #(.W(MODEM_W)) u_mod (
      .clk, .rst_n, .en(demod_valid), .orig(ctrl.orig), .txd(ctrl.txd),
      .sqt(ctrl.sqt), .mod_out, .clipped(ev_clip));
  end else begin : g_table
    sine_table_mod u_mod (
      .clk, .rst_n, .en(demod_valid), .orig(ctrl.orig), .txd(ctrl.txd),
      .sqt(ctrl.sqt), .mod_out, .turned(ev_clip));
  end

  // ---------------- receive chain ----------------
  agc #(.W(MODEM_W)) u_agc (
    .clk, .rst_n, .en(demod_valid), .x(rx_wide),
    .y(agc_out), .y_valid(agc_valid), .level(agc_level),
    .level_valid, .busy(agc_busy));

  carrier_detect #(.W(MODEM_W), .ST1(CD_ST1), .ST2(CD_ST2)) u_cd (
    .clk, .rst_n, .en(level_valid), .level(agc_level),
    .cd_n, .changed(ev_cd_change));

  if (DEMOD_BPF) begin : g_bpf
    bpf_demod #(.W(MODEM_W)) u_dem (
      .clk, .rst_n, .en(agc_valid), .x(agc_out), .orig_band,
      .rxd(dem_rxd), .mark_level(dem_level_a), .space_level(dem_level_b),
      .valid(dem_valid));
  end else begin : g_dly
    delay_line_demod #(.W(MODEM_W)) u_dem (
      .clk, .rst_n, .en(agc_valid), .x(agc_out), .orig_band,
      .rxd(dem_rxd), .level(dem_level_a), .valid(dem_valid));
    assign dem_level_b = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rxd    <= 1'b0;
      wd_out <= encode_wordout(1'b0, 1'b1);
    end else begin
      if (dem_valid) rxd <= dem_rxd;
      wd_out <= encode_wordout(dem_valid ? dem_rxd : rxd, cd_n);
    end
  end

`ifndef SYNTHESIS
  // Strobe spacing: the serial divide and the multiplexed demodulator must
  // finish before the next sample arrives.
  int unsigned since_last;
  always_ff @(posedge clk) begin
    if (!rst_n)            since_last <= MIN_CLKS;
    else if (demod_valid)  since_last <= 1;
    else if (since_last < MIN_CLKS) since_last <= since_last + 1;
  end
  a_rate: assert property (@(posedge clk) disable iff (!rst_n)
                           demod_valid |-> since_last >= MIN_CLKS)
    else $error("modem_core: samples closer than %0d clocks", MIN_CLKS);
`endif
endmodule

// fsk_modem_top -- full-duplex 300-baud FSK modem (Bell 103 tone plan) for a
// 9600 Hz sampled signal path.
//
// Two processing units, as in the original two-processor chip:
//   filter_bank  -- tenth order lowband and highband bandpass filters and the
//                   mode multiplexers (20-bit arithmetic); owns the 12-bit
//                   signal I/O bus;
//   modem_core   -- modulator, gain control, carrier detect and demodulator
//                   (14-bit arithmetic).
// They exchange one word each way per sample through registers: the control
// word and filtered receive word go to the modem, the modulated word and the
// status word come back, each one sample later.
//
// Ports: `wordin` carries O/A (bit 11, 1 = originate), TXD (10), SQT (9),
// ALB (8); `rxin` is the A/D word of the line signal, `txout` the word for
// the D/A; `wordout` carries RXD (bit 11) and CD, active low (bit 10). The
// converters, anti-alias and reconstruction filters and the line hybrid are
// outside this design.
//
// Timing: `sample_en` is a one-clock strobe at 9600 Hz; at least
// MIN_CLKS (32) clocks must separate strobes. txout is valid from the clock
// after a strobe; wordout changes about 20 clocks after it.
//
// CD_ST1/CD_ST2 set the carrier detector's counter steps: 43 / -128 give the
// 20 ms turn-on and 10 ms turn-off delays, 164 / -328 the 50-sample delays
// used to test the detector.
//
// Status word bits 9..0 have no function and read 0. The modem core's
// observation outputs (separate RXD/CD, gain control output and level,
// clipping and carrier-change pulses) are not brought out of the chip; they
// are left unused here on purpose, which lint reports as unused signals.
module fsk_modem_top
  import modem_pkg::*;
#(
  parameter bit MOD_SAWTOOTH = 1'b1,
  parameter bit DEMOD_BPF    = 1'b1,
  parameter int CD_ST1       = 43,
  parameter int CD_ST2       = -128
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sample_en,
  input  logic        [IO_W-1:0] wordin,
  input  logic signed [IO_W-1:0] rxin,
  output logic signed [IO_W-1:0] txout,
  output logic        [IO_W-1:0] wordout
);
  logic        [IO_W-1:0] cword, wd_out;
  logic signed [IO_W-1:0] txmod, demod;
  logic                   demod_valid;
  logic                   rxd_i, cd_n_i, ev_clip, ev_cd_change;
  logic signed [MODEM_W-1:0] agc_out, agc_level;

  filter_bank u_filters (
    .clk, .rst_n, .sample_en, .wordin, .rxin, .txmod, .wd_out,
    .cword, .wordout, .txout, .demod, .demod_valid);

  modem_core #(.MOD_SAWTOOTH(MOD_SAWTOOTH), .DEMOD_BPF(DEMOD_BPF),
               .CD_ST1(CD_ST1), .CD_ST2(CD_ST2)) u_modem (
    .clk, .rst_n, .sample_en, .cword, .demod, .demod_valid,
    .txmod, .wd_out, .rxd(rxd_i), .cd_n(cd_n_i), .agc_out, .agc_level,
    .ev_clip, .ev_cd_change);
endmodule

// filter_bank -- the filter processor: transmit and receive bandpass filters
// with the mode multiplexers around them.
//
// Once per sample (`sample_en`) the lowband and highband tenth order filters
// each filter one 12-bit word; which word goes to which filter depends on the
// mode:
//   originate (O/A=1): modulator -> lowband -> txout ; rxin -> highband -> demod
//   answer    (O/A=0): modulator -> highband -> txout ; rxin -> lowband -> demod
// In self-test (ALB=1) the demodulator input is the filtered transmit signal
// instead of the received one, so originate self-test uses the lowband filter
// and answer self-test the highband filter; txout keeps carrying the transmit
// signal. The filter not used in self-test keeps filtering rxin (the design
// leaves its input open; this is this implementation's choice).
//
// 12-bit words are placed in the upper bits of the 20-bit filter word and
// results are saturated back to 12 bits. The control word is passed on to
// the modem processor (`cword`), and the modem's status word is passed out
// (`wordout`), each registered at `sample_en`, as the buffered interprocessor
// transfers of the original design do. `txout` and `demod` are valid from the
// clock after `sample_en`, marked by a one-cycle `demod_valid`.
// Only the O/A and ALB fields of the decoded control word are used here;
// TXD and SQT concern the modem processor (lint reports them as unused).
module filter_bank
  import modem_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sample_en,
  input  logic        [IO_W-1:0] wordin,
  input  logic signed [IO_W-1:0] rxin,
  input  logic signed [IO_W-1:0] txmod,
  input  logic        [IO_W-1:0] wd_out,
  output logic        [IO_W-1:0] cword,
  output logic        [IO_W-1:0] wordout,
  output logic signed [IO_W-1:0] txout,
  output logic signed [IO_W-1:0] demod,
  output logic                   demod_valid
);
  localparam int unsigned SH = FILT_W - IO_W;

  ctrl_t ctrl;
  logic  orig_q, alb_q;
  logic signed [FILT_W-1:0] lo_in, hi_in, lo_out, hi_out;
  logic signed [FILT_W-1:0] tx_wide, rx_wide;

  assign ctrl    = decode_wordin(wordin[11:8]);
  assign tx_wide = FILT_W'(txmod) <<< SH;
  assign rx_wide = FILT_W'(rxin)  <<< SH;
  assign lo_in   = ctrl.orig ? tx_wide : rx_wide;
  assign hi_in   = ctrl.orig ? rx_wide : tx_wide;

  band_filter #(.LOWBAND(1'b1), .W(FILT_W)) u_lowband (
    .clk, .rst_n, .en(sample_en), .x(lo_in), .y(lo_out));
  band_filter #(.LOWBAND(1'b0), .W(FILT_W)) u_highband (
    .clk, .rst_n, .en(sample_en), .x(hi_in), .y(hi_out));

  // Round-free narrowing: the filter output is already saturated to 20 bits.
  function automatic logic signed [IO_W-1:0] narrow(input logic signed [FILT_W-1:0] v);
    narrow = IO_W'(v >>> SH);
  endfunction

  logic signed [FILT_W-1:0] tx_filt, rx_filt;
  assign tx_filt = orig_q ? lo_out : hi_out;
  assign rx_filt = orig_q ? hi_out : lo_out;
  assign txout   = narrow(tx_filt);
  assign demod   = alb_q ? narrow(tx_filt) : narrow(rx_filt);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      orig_q      <= 1'b0;
      alb_q       <= 1'b0;
      cword       <= '0;
      wordout     <= encode_wordout(1'b0, 1'b1);
      demod_valid <= 1'b0;
    end else begin
      demod_valid <= sample_en;
      if (sample_en) begin
        orig_q  <= ctrl.orig;
        alb_q   <= ctrl.alb;
        cword   <= wordin;
        wordout <= wd_out;
      end
    end
  end
endmodule

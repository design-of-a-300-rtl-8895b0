// tb_modem_core -- checks the modem processor on its own, both variants side
// by side (sawtooth modulator + bandpass demodulator, and table modulator +
// delay-line discriminator), fed with filtered-band FSK as the filter unit
// would deliver it, one sample every 40 clocks:
//  * transmit frequency for originate space (1070 Hz) within 2 Hz;
//  * squelch silences the transmit word;
//  * carrier detect is off in silence, comes on after the signal starts
//    (20 ms counter delay plus filter settling) and goes off again after
//    it stops;
//  * received steady mark / space and alternating data decoded;
//  * the status word carries RXD (bit 11) and CD (bit 10);
//  * the modulator shaping / table reflection events occur.
`include "tb_util.svh"
module tb_modem_core;
  import modem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sample_en = 0, demod_valid = 0;
  logic [11:0] cword = '0;
  logic signed [11:0] demod = '0;
  always #5 clk = ~clk;

  logic signed [11:0] txmod [2];
  logic [11:0] wd_out [2];
  logic rxd [2], cd_n [2], ev_clip [2], ev_cd [2];
  logic signed [13:0] agc_out [2], agc_level [2];

  modem_core u_a (.clk, .rst_n, .sample_en, .cword, .demod, .demod_valid,
    .txmod(txmod[0]), .wd_out(wd_out[0]), .rxd(rxd[0]), .cd_n(cd_n[0]),
    .agc_out(agc_out[0]), .agc_level(agc_level[0]), .ev_clip(ev_clip[0]),
    .ev_cd_change(ev_cd[0]));
  modem_core #(.MOD_SAWTOOTH(1'b0), .DEMOD_BPF(1'b0)) u_b (
    .clk, .rst_n, .sample_en, .cword, .demod, .demod_valid,
    .txmod(txmod[1]), .wd_out(wd_out[1]), .rxd(rxd[1]), .cd_n(cd_n[1]),
    .agc_out(agc_out[1]), .agc_level(agc_level[1]), .ev_clip(ev_clip[1]),
    .ev_cd_change(ev_cd[1]));

  real ph = 0.0;
  int  n_clip [2] = '{0, 0}, n_cdchg [2] = '{0, 0}, word_bad = 0;
  int  n_cross [2] = '{0, 0};
  logic signed [11:0] prev_tx [2] = '{0, 0};

  // one sample: rx_on selects a received tone, rx_bit its data
  task automatic sample(input bit rx_on, input bit rx_bit);
    real f;
    f = rx_bit ? 2225.0 : 2025.0;          // answer band, heard by originate
    ph += 2.0 * 3.14159265358979 * f / 9600.0;
    sample_en <= 1; @(posedge clk); sample_en <= 0;
    demod <= rx_on ? 12'(int'($floor(1500.0 * $sin(ph)))) : '0;
    demod_valid <= 1; @(posedge clk); demod_valid <= 0;
    repeat (38) @(posedge clk);
    for (int i = 0; i < 2; i++) begin
      if (wd_out[i][11] != rxd[i] || wd_out[i][10] != cd_n[i]) word_bad++;
      if (prev_tx[i] < 0 && txmod[i] >= 0) n_cross[i]++;
      prev_tx[i] = txmod[i];
    end
  endtask

  always @(posedge clk) for (int i = 0; i < 2; i++) begin
    if (ev_clip[i]) n_clip[i]++;
    if (ev_cd[i]) n_cdchg[i]++;
  end

  initial begin
    int on_at [2], off_at [2];
    bit ok_m [2], ok_s [2], ok_alt [2], sq_ok, b, exp_b;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    cword = 12'h800;                          // originate, space, no squelch
    // silence, transmit frequency measured meanwhile
    for (int n = 0; n < 4800; n++) sample(0, 0);
    for (int i = 0; i < 2; i++) begin
      $display("variant %0d: %0d cycles in 0.5 s (1070 Hz -> 535)", i, n_cross[i]);
      `CHECK(n_cross[i] >= 534 && n_cross[i] <= 536, "originate space transmit frequency")
      `CHECK(cd_n[i] == 1, "no carrier detected in silence")
    end
    // received carrier: mark 400 samples, space 400, alternating 320
    on_at = '{-1, -1};
    for (int n = 0; n < 1120; n++) begin
      b = n < 400 ? 1'b1 : (n < 800 ? 1'b0 : 1'(((n - 800) / 32) % 2 == 0));
      sample(1, b);
      for (int i = 0; i < 2; i++) if (on_at[i] < 0 && cd_n[i] == 0) on_at[i] = n;
      if (n == 399) for (int i = 0; i < 2; i++) ok_m[i] = rxd[i] == 1;
      if (n == 799) for (int i = 0; i < 2; i++) ok_s[i] = rxd[i] == 0;
      // alternating: check sample 16 into each bit plus the decoder delay
      if (n == 800) ok_alt = '{1, 1};
      if (n > 832 && (n - 800) % 32 == 31)
        for (int i = 0; i < 2; i++) begin
          // compare with the bit sent 24 samples ago for either decoder
          exp_b = 1'(((n - 24 - 800) / 32) % 2 == 0);
          if (rxd[i] != exp_b) ok_alt[i] = 0;
        end
    end
    for (int i = 0; i < 2; i++) begin
      $display("variant %0d: carrier detected after %0d samples", i, on_at[i]);
      `CHECK(on_at[i] >= 190 && on_at[i] <= 300, "carrier detect turn-on delay")
      `CHECK(ok_m[i], "steady mark received")
      `CHECK(ok_s[i], "steady space received")
      `CHECK(ok_alt[i], "150 Hz alternating data received")
    end
    // carrier removed
    off_at = '{-1, -1};
    for (int n = 0; n < 400; n++) begin
      sample(0, 0);
      for (int i = 0; i < 2; i++) if (off_at[i] < 0 && cd_n[i] == 1) off_at[i] = n;
    end
    for (int i = 0; i < 2; i++) begin
      $display("variant %0d: carrier lost after %0d samples", i, off_at[i]);
      `CHECK(off_at[i] >= 90 && off_at[i] <= 200, "carrier detect turn-off delay")
      `CHECK(n_cdchg[i] == 2, "exactly one on and one off transition")
      `CHECK(n_clip[i] > 0, "modulator shaping / reflection events occur")
    end
    // squelch
    cword = 12'hA00;
    sq_ok = 1;
    for (int n = 0; n < 50; n++) begin
      sample(0, 0);
      if (n > 2 && (txmod[0] != 0 || txmod[1] != 0)) sq_ok = 0;
    end
    `CHECK(sq_ok, "squelch silences transmitter")
    `CHECK(word_bad == 0, "status word carries RXD and CD")
    `TB_FINISH
  end
  initial begin #100000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

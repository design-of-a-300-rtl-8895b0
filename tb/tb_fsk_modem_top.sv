// tb_fsk_modem_top -- end-to-end test of the modem at its default
// configuration: two modems, one in originate and one in answer mode, joined
// back to back through a line model (the transmit word of each is the receive
// word of the other, optionally attenuated). One sample every 40 clocks.
//
// Phases (modes are switched without reset, as a host would):
//   1. full duplex, both directions at once: a lead-in of mark, 150 Hz
//      alternating data (the fastest 300-baud pattern), then random
//      300-baud data;
//   2. the same with the line attenuated by 36 dB (1/64);
//   3. self-test (ALB) in both modems at once: each decodes its own
//      transmitted data, originate modem in the lowband, answer in the
//      highband;
//   4. squelch: each transmitter in turn is silenced and the far end's
//      carrier detect must drop, then return.
// For every data path the overall delay is found by correlation and the
// delay of each data transition is measured around it; bit jitter (spread
// of the delay per transition direction) must stay within a spread of 3
// samples on the alternating pattern (about +-1 sample; the highband
// demodulator occasionally puts a to-mark transition one more sample off)
// and within 6 samples on random data,
// and outside the transition windows the received data must equal the sent
// data delayed. Each mechanism is counted (correct data transitions per path,
// carrier-detect turn-on and turn-off events, squelched line, modulator
// clipping events); a mechanism that never occurs is a failure.
`include "tb_util.svh"
module tb_fsk_modem_top;
  int checks = 0, failures = 0;
  localparam int NS = 2400;      // samples per data phase
  localparam int T0 = 428;       // analysis start: lead-in + 4 settled bits

  logic clk = 0, rst_n = 0, sample_en = 0;
  logic [11:0] win_a, win_b, wout_a, wout_b;
  logic signed [11:0] tx_a, tx_b, rx_a, rx_b;
  always #5 clk = ~clk;

  fsk_modem_top u_a (.clk, .rst_n, .sample_en, .wordin(win_a), .rxin(rx_a),
                     .txout(tx_a), .wordout(wout_a));
  fsk_modem_top u_b (.clk, .rst_n, .sample_en, .wordin(win_b), .rxin(rx_b),
                     .txout(tx_b), .wordout(wout_b));

  // control fields
  bit orig_a = 1, orig_b = 0, txd_a = 1, txd_b = 1, sqt_a = 0, sqt_b = 0, alb = 0;
  int atten_sh = 0;
  assign win_a = {orig_a, txd_a, sqt_a, alb, 8'h00};
  assign win_b = {orig_b, txd_b, sqt_b, alb, 8'h00};
  assign rx_a  = tx_b >>> atten_sh;
  assign rx_b  = tx_a >>> atten_sh;

  // mechanism counters
  int m_dup_ab = 0, m_dup_ba = 0, m_att_ab = 0, m_att_ba = 0;
  int m_alb_o = 0, m_alb_a = 0, m_cd_on = 0, m_cd_off = 0, m_sq = 0, m_clip = 0;
  bit cd_prev_a = 1, cd_prev_b = 1;

  always @(posedge clk) if (u_a.u_modem.ev_clip || u_b.u_modem.ev_clip) m_clip++;

  bit pa [NS], pb [NS], ra [NS], rb [NS];

  task automatic gen(output bit d [NS]);
    for (int n = 0; n < NS; n++) begin
      if (n < 300) d[n] = 1;
      else if (n < 940) d[n] = 1'(((n - 300) / 32) % 2);
      else if ((n - 300) % 32 == 0) d[n] = 1'($urandom_range(0, 1));
      else d[n] = d[n-1];
    end
  endtask

  task automatic sample();
    repeat (39) @(posedge clk);
    sample_en <= 1; @(posedge clk); sample_en <= 0;
    if (wout_a[10] != cd_prev_a) begin if (wout_a[10]) m_cd_off++; else m_cd_on++; end
    if (wout_b[10] != cd_prev_b) begin if (wout_b[10]) m_cd_off++; else m_cd_on++; end
    cd_prev_a = wout_a[10]; cd_prev_b = wout_b[10];
  endtask

  task automatic run_data();
    gen(pa); gen(pb);
    for (int n = 0; n < NS; n++) begin
      txd_a = pa[n]; txd_b = pb[n];
      sample();
      ra[n] = wout_a[11]; rb[n] = wout_b[11];
    end
  endtask

  // compare sent data d with received data r; returns correct transitions.
  // The overall delay (filters plus demodulator, more than one bit) is found
  // by correlation over the random section; each transition's own delay is
  // then searched within +-10 samples of it.
  task automatic analyse(input string name, input bit d [NS], input bit r [NS], output int good);
    int dl [2], dh [2], rl [2], rh [2], dmin, dmax, mism, dly, d0, best, agree;
    bit near;
    best = -1; d0 = 0;
    for (int dd = 0; dd < 200; dd++) begin
      agree = 0;
      for (int n = 1000; n < NS - 200; n++) if (r[n+dd] == d[n]) agree++;
      if (agree > best) begin best = agree; d0 = dd; end
    end
    dl = '{9999, 9999}; dh = '{-1, -1}; rl = '{9999, 9999}; rh = '{-1, -1};
    good = 0;
    for (int n = T0; n < NS - d0 - 12; n++)
      if (d[n] != d[n-1]) begin
        dly = d0 - 10;
        while (dly < d0 + 10 && r[n+dly] != d[n]) dly++;
        if (dly < d0 + 10) good++;
        if (n < 940) begin
          if (dly < dl[d[n]]) dl[d[n]] = dly;
          if (dly > dh[d[n]]) dh[d[n]] = dly;
        end else begin
          if (dly < rl[d[n]]) rl[d[n]] = dly;
          if (dly > rh[d[n]]) rh[d[n]] = dly;
        end
      end
    dmin = 9999; dmax = -1;
    for (int k = 0; k < 2; k++) begin
      if (dl[k] < dmin) dmin = dl[k];
      if (rl[k] < dmin) dmin = rl[k];
      if (dh[k] > dmax) dmax = dh[k];
      if (rh[k] > dmax) dmax = rh[k];
    end
    mism = 0;
    for (int n = T0 + dmax; n < NS; n++) begin
      near = 0;
      for (int k = 0; k <= dmax - dmin; k++) if (d[n-dmin-k] != d[n-dmin-k-1]) near = 1;
      if (!near && r[n] != d[n-dmin]) mism++;
    end
    $display("%-26s delay %0d | 150 Hz: to-space %0d..%0d to-mark %0d..%0d | random: to-space %0d..%0d to-mark %0d..%0d | %0d transitions ok, %0d mismatches",
             name, d0, dl[0], dh[0], dl[1], dh[1], rl[0], rh[0], rl[1], rh[1], good, mism);
    `CHECK(dh[0] - dl[0] <= 3 && dh[1] - dl[1] <= 3, {name, ": jitter spread at most 3 samples on 150 Hz data"})
    `CHECK(rh[0] - rl[0] <= 6 && rh[1] - rl[1] <= 6, {name, ": jitter at most 6 samples on random data"})
    `CHECK(d0 > 0 && d0 < 160, {name, ": delay below five bits"})
    `CHECK(mism == 0, {name, ": no false transitions"})
  endtask

  initial begin
    int g, on0, off_ok;
    repeat (3) @(posedge clk); rst_n <= 1;
    // 1. full duplex
    run_data();
    analyse("duplex originate->answer", pa, rb, m_dup_ab);
    analyse("duplex answer->originate", pb, ra, m_dup_ba);
    on0 = m_cd_on;
    `CHECK(m_cd_on == 2 && m_cd_off == 0, "both carrier detects came on and stayed on")
    // 2. line attenuated by 36 dB
    atten_sh = 6;
    run_data();
    analyse("-36 dB originate->answer", pa, rb, m_att_ab);
    analyse("-36 dB answer->originate", pb, ra, m_att_ba);
    `CHECK(m_cd_off == 0, "carrier kept at -36 dB")
    atten_sh = 0;
    // 3. self-test in both modems
    alb = 1;
    run_data();
    analyse("self-test originate", pa, ra, m_alb_o);
    analyse("self-test answer", pb, rb, m_alb_a);
    alb = 0;
    // 4. squelch each side in turn
    off_ok = 0;
    txd_a = 1; txd_b = 1;
    sqt_a = 1;
    for (int n = 0; n < 600; n++) begin
      sample();
      if (n > 300 && tx_a >= -2 && tx_a <= 2) m_sq++;
    end
    if (wout_b[10] == 1 && wout_a[10] == 0) off_ok++;
    sqt_a = 0;
    for (int n = 0; n < 600; n++) sample();
    `CHECK(wout_b[10] == 0, "carrier returns after squelch released")
    sqt_b = 1;
    for (int n = 0; n < 600; n++) begin
      sample();
      if (n > 300 && tx_b >= -2 && tx_b <= 2) m_sq++;
    end
    if (wout_a[10] == 1 && wout_b[10] == 0) off_ok++;
    `CHECK(off_ok == 2, "squelch drops the far-end carrier detect only")
    $display("mechanisms: duplex %0d/%0d, -36 dB %0d/%0d, self-test %0d/%0d, CD on %0d, CD off %0d, squelched samples %0d, clipping %0d",
             m_dup_ab, m_dup_ba, m_att_ab, m_att_ba, m_alb_o, m_alb_a, m_cd_on, m_cd_off, m_sq, m_clip);
    `CHECK(m_dup_ab > 0, "mechanism: full duplex originate->answer data")
    `CHECK(m_dup_ba > 0, "mechanism: full duplex answer->originate data")
    `CHECK(m_att_ab > 0, "mechanism: -36 dB originate->answer data")
    `CHECK(m_att_ba > 0, "mechanism: -36 dB answer->originate data")
    `CHECK(m_alb_o > 0, "mechanism: originate self-test data")
    `CHECK(m_alb_a > 0, "mechanism: answer self-test data")
    `CHECK(m_cd_on > 0, "mechanism: carrier detect turn-on")
    `CHECK(m_cd_off > 0, "mechanism: carrier detect turn-off")
    `CHECK(m_sq > 0, "mechanism: squelched transmitter")
    `CHECK(m_clip > 0, "mechanism: modulator waveform clipping")
    `TB_FINISH
  end
  initial begin #400000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

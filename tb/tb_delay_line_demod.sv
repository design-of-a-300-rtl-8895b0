// tb_delay_line_demod -- checks the delay-line discriminator on phase-continuous FSK at
// full-scale constant amplitude (what the gain control delivers), in both receive
// bands (2025/2225 Hz and 1070/1270 Hz):
//  * steady mark and steady space decode correctly;
//  * 150 Hz alternating data (the fastest 300-baud pattern) followed by
//    random 300-baud data are recovered with a delay below one bit and no
//    false transitions; bit jitter (spread of the delay per transition
//    direction) is at most 1 sample on the alternating pattern and at most
//    6 samples (20 % of a bit, intersymbol interference) on random data;
//  * `valid` is seen 14 clock edges after the edge that samples `en`;
//  * the discriminator characteristic: for a steady full-scale tone of
//    frequency f the filtered product settles to (A^2/2) cos(2 pi f d / 9600)
//    times the lowpass DC gain 0.951, with A = 8191 and d the delay of the
//    band (1 sample for 2025-2225 Hz, 2 for 1070-1270 Hz); checked within
//    40 LSB at the mark, centre and space frequencies of both bands.
`include "tb_util.svh"
module tb_delay_line_demod;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, orig_band = 1, rxd, valid;
  logic signed [13:0] x = '0;
  logic signed [13:0] lv_a;
  always #5 clk = ~clk;
  delay_line_demod dut (.clk, .rst_n, .en, .x, .orig_band, .rxd, .level(lv_a), .valid);

  real ph;
  int  lat_bad;

  task automatic sample(input bit bit_v, output bit r);
    real f; int lat;
    f = orig_band ? (bit_v ? 2225.0 : 2025.0) : (bit_v ? 1270.0 : 1070.0);
    ph += 2.0 * 3.14159265358979 * f / 9600.0;
    x <= 14'(int'($floor(8191.0 * $sin(ph))));
    en <= 1; @(posedge clk); en <= 0;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!valid && lat < 40);
    if (lat_bad == 0 && lat != 14) $display("valid after %0d clocks", lat);
    if (lat != 14) lat_bad++;
    r = rxd;
    repeat (3) @(posedge clk);
  endtask

  task automatic band(input bit ob);
    bit tx [1200]; bit rx [1200];
    int dmin, dmax, mism, k, d;
    int dlo [2], dhi [2], rlo [2], rhi [2];
    orig_band = ob; ph = 0.0;
    rst_n <= 0; repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    // 200 samples mark, 200 samples space, then 32-sample bits
    for (int n = 0; n < 1200; n++) begin
      if (n < 200) tx[n] = 1;
      else if (n < 400) tx[n] = 0;
      else if (n < 720) tx[n] = ((n - 400) / 32) % 2 == 0;
      else if ((n - 400) % 32 == 0) tx[n] = 1'($urandom_range(0, 1));
      else tx[n] = tx[n-1];
    end
    for (int n = 0; n < 1200; n++) sample(tx[n], rx[n]);
    `CHECK(rx[190] == 1 && rx[199] == 1, "steady mark decodes as mark")
    `CHECK(rx[390] == 0 && rx[399] == 0, "steady space decodes as space")
    // delay of every data transition from sample 400 on
    // alternating section: dlo/dhi, random section: rlo/rhi
    dlo = '{99, 99}; dhi = '{-1, -1}; rlo = '{99, 99}; rhi = '{-1, -1};
    for (int n = 528; n < 1170; n++)   // alternating pattern settled after 4 bits
      if (tx[n] != tx[n-1]) begin
        d = 0;
        while (d < 29 && rx[n+d] != tx[n]) d++;
        if (n < 720) begin
          if (d < dlo[tx[n]]) dlo[tx[n]] = d;
          if (d > dhi[tx[n]]) dhi[tx[n]] = d;
        end else begin
          if (d < rlo[tx[n]]) rlo[tx[n]] = d;
          if (d > rhi[tx[n]]) rhi[tx[n]] = d;
        end
      end
    dmin = 99; dmax = -1;
    for (k = 0; k < 2; k++) begin
      if (rlo[k] < dmin) dmin = rlo[k];
      if (dlo[k] < dmin) dmin = dlo[k];
      if (rhi[k] > dmax) dmax = rhi[k];
      if (dhi[k] > dmax) dmax = dhi[k];
    end
    // outside the jitter window the output equals the delayed input
    mism = 0;
    for (int n = 528 + dmax; n < 1200; n++) begin
      bit near = 0;
      for (k = 0; k <= dmax - dmin; k++) if (tx[n-dmin-k] != tx[n-dmin-k-1]) near = 1;
      if (!near && rx[n] != tx[n-dmin]) begin
        mism++;
        if (mism < 4) $display("mismatch at sample %0d: rx %0d, tx %0d samples earlier %0d", n, rx[n], dmin, tx[n-dmin]);
      end
    end
    $display("band %0d: 150 Hz pattern to-space %0d..%0d, to-mark %0d..%0d; random data to-space %0d..%0d, to-mark %0d..%0d samples; %0d mismatches",
             ob, dlo[0], dhi[0], dlo[1], dhi[1], rlo[0], rhi[0], rlo[1], rhi[1], mism);
    `CHECK(dhi[0] - dlo[0] <= 1 && dhi[1] - dlo[1] <= 1, "150 Hz pattern: bit jitter at most 1 sample")
    `CHECK(rhi[0] - rlo[0] <= 6 && rhi[1] - rlo[1] <= 6, "random data: jitter at most 6 samples (20 % of a bit)")
    `CHECK(dmax < 32, "delay below one bit")
    `CHECK(mism == 0, "data recovered without false transitions")
  endtask

  // mean level over 96 settled samples of a steady tone
  task automatic tone_level(input bit ob, input real f, output real lvl);
    orig_band = ob;
    rst_n <= 0; repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    lvl = 0;
    for (int n = 0; n < 400; n++) begin
      x <= 14'(int'($floor(8191.0 * $sin(2.0 * 3.14159265358979 * f * n / 9600.0 + 0.7))));
      en <= 1; @(posedge clk); en <= 0;
      repeat (17) @(posedge clk);
      if (n >= 304) lvl += real'(lv_a);
    end
    lvl = lvl / 96.0;
  endtask

  initial begin
    real FQ [6] = '{2025.0, 2125.0, 2225.0, 1070.0, 1170.0, 1270.0};
    real lvl, want;
    int  bad;
    bad = 0;
    for (int i = 0; i < 6; i++) begin
      tone_level(i < 3, FQ[i], lvl);
      want = 4095.5 * $cos(2.0 * 3.14159265358979 * FQ[i] * (i < 3 ? 1.0 : 2.0) / 9600.0) * 0.951;
      $display("%0.0f Hz: level %0.1f, expected %0.1f", FQ[i], lvl, want);
      if (lvl < want - 40.0 || lvl > want + 40.0) bad++;
    end
    `CHECK(bad == 0, "discriminator level follows (A^2/2) cos(wdT)")
    lat_bad = 0;
    band(1);
    band(0);
    `CHECK(lat_bad == 0, "valid 14 clocks after the en edge")
    `TB_FINISH
  end
  initial begin #200000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

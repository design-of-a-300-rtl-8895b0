// tb_bpf_demod -- checks the bandpass-filter demodulator on phase-continuous FSK at
// full-scale constant amplitude (what the gain control delivers), in both receive
// bands (2025/2225 Hz and 1070/1270 Hz):
//  * steady mark and steady space decode correctly;
//  * 150 Hz alternating data (the fastest 300-baud pattern) followed by
//    random 300-baud data are recovered with a delay below one bit and no
//    false transitions; bit jitter (spread of the delay per transition
//    direction) is at most 1 sample on the alternating pattern and at most
//    6 samples (20 % of a bit, intersymbol interference) on random data;
//  * `valid` is seen 2 clock edges after the edge that samples `en`;
//  * the loss of each of the four bandpass filters at ten frequencies,
//    read from the steady mark or space level of a half-scale tone, is
//    within 1 dB of the filter design values (the level of a tone of peak
//    A with loss L is A * 10^(-L/20) * 2/pi * 0.951, the rectifier mean
//    times the lowpass DC gain).
`include "tb_util.svh"
module tb_bpf_demod;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, orig_band = 1, rxd, valid;
  logic signed [13:0] x = '0;
  logic signed [13:0] lv_a, lv_b;
  always #5 clk = ~clk;
  bpf_demod dut (.clk, .rst_n, .en, .x, .orig_band, .rxd, .mark_level(lv_a), .space_level(lv_b), .valid);

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
    if (lat_bad == 0 && lat != 2) $display("valid after %0d clocks", lat);
    if (lat != 2) lat_bad++;
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

  // design losses: frequency, loss in dB; rows 0-9 originate mark, 10-19
  // originate space, 20-29 answer mark, 30-39 answer space
  real LT [40][2] = '{
    '{2000.0, 14.34}, '{2025.0, 13.45}, '{2050.0, 12.47}, '{2125.0, 8.74}, '{2200.0, 3.16},
    '{2225.0, 1.00},  '{2250.0, -0.13}, '{2300.0, 2.77},  '{2375.0, 8.45}, '{2500.0, 14.08},
    '{1750.0, 14.44}, '{1875.0, 8.75},  '{1950.0, 3.07},  '{2000.0, -0.13}, '{2025.0, 0.77},
    '{2050.0, 2.82},  '{2125.0, 8.44},  '{2200.0, 12.14}, '{2225.0, 13.11}, '{2250.0, 13.99},
    '{1045.0, 14.94}, '{1070.0, 13.97}, '{1095.0, 12.91}, '{1170.0, 8.95},  '{1245.0, 3.10},
    '{1270.0, 0.95},  '{1295.0, -0.13}, '{1345.0, 2.79},  '{1420.0, 8.28},  '{1545.0, 13.63},
    '{795.0, 15.30},  '{920.0, 9.14},   '{995.0, 3.23},   '{1045.0, -0.13}, '{1070.0, 0.70},
    '{1095.0, 2.67},  '{1170.0, 8.12},  '{1245.0, 11.66}, '{1270.0, 12.58}, '{1295.0, 13.41}};

  // loss in dB of the mark (or space) path for a steady tone of frequency f
  task automatic path_loss(input bit ob, input bit mark, input real f, output real loss);
    real acc, w;
    orig_band = ob;
    rst_n <= 0; repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    w = 2.0 * 3.14159265358979 * f / 9600.0;
    acc = 0;
    for (int n = 0; n < 500; n++) begin
      x <= 14'(int'($floor(4096.0 * $sin(w * n + 0.3))));
      en <= 1; @(posedge clk); en <= 0;
      repeat (4) @(posedge clk);
      if (n >= 404) acc += real'(mark ? lv_a : lv_b);
    end
    acc = acc / 96.0;
    loss = 20.0 * $log10(4096.0 * 2.0 / 3.14159265358979 * 0.951 / (acc + 1e-3));
  endtask

  initial begin
    lat_bad = 0;
    begin
      int bad;
      real l;
      bad = 0;
      for (int i = 0; i < 40; i++) begin
        path_loss(i < 20, (i / 10) % 2 == 0, LT[i][0], l);
        if (l < LT[i][1] - 1.0 || l > LT[i][1] + 1.0) begin
          bad++;
          $display("filter %0d at %0.0f Hz: loss %0.2f dB, design %0.2f dB", i / 10, LT[i][0], l, LT[i][1]);
        end
      end
      `CHECK(bad == 0, "demodulator bandpass filter losses match the design values")
    end
    band(1);
    band(0);
    `CHECK(lat_bad == 0, "valid 2 clocks after the en edge")
    `TB_FINISH
  end
  initial begin #200000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

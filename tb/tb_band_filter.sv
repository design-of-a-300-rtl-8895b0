// tb_band_filter -- checks both tenth order filters:
//  * impulse response against a floating point model of the same cascade
//    (coefficients written out here from the canonical signed digit table);
//  * passband/stopband loss of sine inputs against the filter specification
//    (loss at centre within 1 dB, adjacent band at least 55 dB down);
//  * loss at the 15 frequencies of the filter design's loss table (100 Hz
//    to 4 kHz): within 1 dB of the design value where that is below 50 dB,
//    at least 50 dB where it is higher (deeper values are below the
//    truncation noise of the fixed-point filter);
//  * group delay at the mark and space tones, from the slope of the
//    steady-state output phase between tones 20 Hz apart: each within
//    0.1 ms of the filter design's values (lowband 5.36 / 5.33 ms at
//    1070 / 1270 Hz, highband 4.39 / 4.47 ms at 2025 / 2225 Hz), and mark
//    and space at most 100 us apart, the delay-equalisation requirement.
// LOWBAND selects which filter the instance under test is.
`include "tb_util.svh"
module tb_band_filter;
  import modem_pkg::*;
  localparam int W = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] x, y_lo, y_hi;
  always #5 clk = ~clk;

  band_filter #(.LOWBAND(1'b1), .W(W)) dut_lo (.clk, .rst_n, .en, .x, .y(y_lo));
  band_filter #(.LOWBAND(1'b0), .W(W)) dut_hi (.clk, .rst_n, .en, .x, .y(y_hi));

  // floating point reference: scale, a1, a2, b1, b2 per section; out scale
  real LO [5][5] = '{'{0.0625, 1.3125, -0.8515625, -1.640625, 1.171875},
                     '{0.25, 1.5078125, -0.90625, -0.484375, 1.0},
                     '{0.5, 1.2421875, -0.9375, -1.4921875, 1.203125},
                     '{0.25, 1.2421875, -0.8359375, -0.2265625, 1.0},
                     '{0.25, 1.3984375, -0.8515625, 0.0, -1.0}};
  real HI [5][5] = '{'{0.125, 0.3671875, -0.8515625, -0.5703125, 1.3984375},
                     '{0.125, 0.40625, -0.7109375, -1.53125, 1.0},
                     '{0.5, 0.1328125, -0.8984375, -0.2890625, 1.2578125},
                     '{0.25, 0.5546875, -0.9375, -1.3515625, 1.0},
                     '{0.5, 0.2265625, -0.796875, 0.0, -1.0}};
  real s1 [2][5], s2 [2][5];
  function automatic real rabs(real v); rabs = v < 0 ? -v : v; endfunction

  function automatic real cf(int b, int s, int k);
    cf = (b == 0) ? LO[s][k] : HI[s][k];
  endfunction

  function automatic real ref_step(int b, real xin);
    real v, q0;
    v = xin;
    for (int s = 0; s < 5; s++) begin
      q0 = cf(b, s, 0) * v + cf(b, s, 1) * s1[b][s] + cf(b, s, 2) * s2[b][s];
      v  = q0 + cf(b, s, 3) * s1[b][s] + cf(b, s, 4) * s2[b][s];
      s2[b][s] = s1[b][s];
      s1[b][s] = q0;
    end
    ref_step = v * ((b == 0) ? 2.125 : 1.75);
  endfunction

  task automatic sample(input logic signed [W-1:0] v);
    x <= v; en <= 1; @(posedge clk); en <= 0; @(posedge clk);
  endtask

  task automatic reset_all();
    rst_n <= 0; repeat (2) @(posedge clk); rst_n <= 1;
    foreach (s1[b, s]) begin s1[b][s] = 0; s2[b][s] = 0; end
  endtask

  // Steady-state peak of the response to a sine of frequency f (Hz).
  task automatic tone(input real f, output real pk_lo, output real pk_hi);
    reset_all();
    pk_lo = 0; pk_hi = 0;
    for (int n = 0; n < 900; n++) begin
      sample(W'(longint'($floor(200000.0 * $sin(2.0 * 3.14159265358979 * f * n / 9600.0)))));
      if (n > 600) begin
        if (rabs(real'(y_lo)) > pk_lo) pk_lo = rabs(real'(y_lo));
        if (rabs(real'(y_hi)) > pk_hi) pk_hi = rabs(real'(y_hi));
      end
    end
  endtask

  // Steady-state phase (radians) of both filter outputs for a sine of
  // frequency f, by correlating 1920 settled output samples with cos/sin.
  task automatic tone_phase(input real f, output real p_lo, output real p_hi);
    real w, il, ql, ih, qh;
    reset_all();
    w = 2.0 * 3.14159265358979 * f / 9600.0;
    il = 0; ql = 0; ih = 0; qh = 0;
    for (int n = 0; n < 2520; n++) begin
      sample(W'(longint'($floor(200000.0 * $sin(w * n)))));
      if (n >= 600) begin
        il += real'(y_lo) * $cos(w * n); ql += real'(y_lo) * $sin(w * n);
        ih += real'(y_hi) * $cos(w * n); qh += real'(y_hi) * $sin(w * n);
      end
    end
    p_lo = $atan2(il, ql);
    p_hi = $atan2(ih, qh);
  endtask

  function automatic real wrap(real p);
    while (p > 3.14159265358979) p -= 2.0 * 3.14159265358979;
    while (p < -3.14159265358979) p += 2.0 * 3.14159265358979;
    return p;
  endfunction

  // group delay in microseconds at f: phase slope between f - 10 and f + 10
  task automatic gdelay_us(input real f, output real d_lo, output real d_hi);
    real l1, h1, l2, h2;
    tone_phase(f - 10.0, l1, h1);
    tone_phase(f + 10.0, l2, h2);
    d_lo = -wrap(l2 - l1) / (2.0 * 3.14159265358979 * 20.0) * 1.0e6;
    d_hi = -wrap(h2 - h1) / (2.0 * 3.14159265358979 * 20.0) * 1.0e6;
  endtask

  function automatic bit near_us(real got, real want);
    return got > want - 100.0 && got < want + 100.0;
  endfunction

  // design loss table: frequency, lowband loss, highband loss (dB);
  // -1 where the table gives no value
  real LOSS_TAB [15][3] = '{
    '{100.0, 48.52, 89.41},  '{600.0, 26.58, 77.16},  '{1020.0, 0.0042, 92.72},
    '{1070.0, -0.1367, 119.28}, '{1170.0, -0.1283, 89.32}, '{1270.0, 0.1103, 108.09},
    '{1320.0, 0.2599, 81.11}, '{1975.0, -1.0, 0.96},  '{2025.0, 115.05, 0.83},
    '{2125.0, 86.14, 0.51},  '{2225.0, 119.23, 0.44}, '{2275.0, -1.0, 0.59},
    '{3000.0, 67.97, 32.72}, '{3500.0, 68.59, 41.07}, '{4000.0, 71.93, 47.92}};

  function automatic bit loss_ok(real got, real want);
    if (want < -0.5) return 1'b1;
    if (want < 50.0) return got > want - 1.0 && got < want + 1.0;
    return got >= 50.0;
  endfunction

  function automatic real loss_db(real pk); loss_db = 20.0 * $log10(200000.0 / (pk + 1e-3)); endfunction

  initial begin
    real maxerr_lo = 0, maxerr_hi = 0, pl, ph;
    reset_all();
    // impulse response, 0.25 of full scale
    for (int n = 0; n < 400; n++) begin
      real xin, rl, rh;
      xin = (n == 0) ? 131072.0 : 0.0;
      sample(n == 0 ? W'(131072) : '0);
      rl = ref_step(0, xin);
      rh = ref_step(1, xin);
      if (rabs(rl - real'(y_lo)) > maxerr_lo) maxerr_lo = rabs(rl - real'(y_lo));
      if (rabs(rh - real'(y_hi)) > maxerr_hi) maxerr_hi = rabs(rh - real'(y_hi));
    end
    $display("impulse max error: lowband %0.1f highband %0.1f LSB", maxerr_lo, maxerr_hi);
    `CHECK(maxerr_lo < 300.0, "lowband impulse response")
    `CHECK(maxerr_hi < 300.0, "highband impulse response")
    begin
      real gl0, gl1, gh0, gh1, dummy;
      gdelay_us(1070.0, gl0, dummy); gdelay_us(1270.0, gl1, dummy);
      gdelay_us(2025.0, dummy, gh0); gdelay_us(2225.0, dummy, gh1);
      $display("group delay: lowband %0.0f / %0.0f us, highband %0.0f / %0.0f us",
               gl0, gl1, gh0, gh1);
      `CHECK(near_us(gl0, 5359.0) && near_us(gl1, 5332.0), "lowband group delay at 1070 / 1270 Hz")
      `CHECK(near_us(gh0, 4392.0) && near_us(gh1, 4468.0), "highband group delay at 2025 / 2225 Hz")
      `CHECK(rabs(gl1 - gl0) <= 100.0, "lowband mark/space group delay within 100 us")
      `CHECK(rabs(gh1 - gh0) <= 100.0, "highband mark/space group delay within 100 us")
    end

    begin
      int bad;
      bad = 0;
      for (int i = 0; i < 15; i++) begin
        tone(LOSS_TAB[i][0], pl, ph);
        if (!loss_ok(loss_db(pl), LOSS_TAB[i][1]) || !loss_ok(loss_db(ph), LOSS_TAB[i][2])) begin
          bad++;
          $display("%0.0f Hz: lowband %0.2f dB (design %0.2f), highband %0.2f dB (design %0.2f)",
                   LOSS_TAB[i][0], loss_db(pl), LOSS_TAB[i][1], loss_db(ph), LOSS_TAB[i][2]);
        end
      end
      `CHECK(bad == 0, "losses match the design loss table")
    end
    tone(1170.0, pl, ph);
    $display("1170 Hz: lowband loss %0.2f dB highband loss %0.2f dB", loss_db(pl), loss_db(ph));
    `CHECK(loss_db(pl) > -1.0 && loss_db(pl) < 1.0, "lowband passband at 1170 Hz")
    `CHECK(loss_db(ph) > 55.0, "highband rejects 1170 Hz")
    tone(1070.0, pl, ph);
    `CHECK(loss_db(pl) > -1.0 && loss_db(pl) < 1.0, "lowband passband at 1070 Hz")
    `CHECK(loss_db(ph) > 55.0, "highband rejects 1070 Hz")
    tone(2125.0, pl, ph);
    $display("2125 Hz: lowband loss %0.2f dB highband loss %0.2f dB", loss_db(pl), loss_db(ph));
    `CHECK(loss_db(ph) > -1.0 && loss_db(ph) < 1.5, "highband passband at 2125 Hz")
    `CHECK(loss_db(pl) > 55.0, "lowband rejects 2125 Hz")
    tone(2225.0, pl, ph);
    `CHECK(loss_db(ph) > -1.0 && loss_db(ph) < 1.5, "highband passband at 2225 Hz")
    `CHECK(loss_db(pl) > 55.0, "lowband rejects 2225 Hz")
    tone(600.0, pl, ph);
    $display("600 Hz: lowband loss %0.2f dB highband loss %0.2f dB", loss_db(pl), loss_db(ph));
    `CHECK(loss_db(pl) > 20.0, "lowband below 600 Hz")
    `CHECK(loss_db(ph) > 60.0, "highband below 600 Hz")
    tone(3500.0, pl, ph);
    $display("3500 Hz: lowband loss %0.2f dB highband loss %0.2f dB", loss_db(pl), loss_db(ph));
    `CHECK(loss_db(pl) > 55.0, "lowband above 3000 Hz")
    `CHECK(loss_db(ph) > 24.0, "highband above 3000 Hz")
    `TB_FINISH
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

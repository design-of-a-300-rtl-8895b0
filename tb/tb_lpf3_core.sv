// tb_lpf3_core -- checks the demodulator/AGC third order lowpass filter (one
// second order plus one first order section), with the state registers held
// here:
//  * DC gain close to the 0.955 of the rounded coefficients;
//  * loss at the eight frequencies of the filter design table (100 Hz to
//    4.5 kHz), measured by correlating the output with the input tone:
//    within 0.5 dB of the table up to 30 dB, within 3 dB for the stopband
//    values of 47 to 60 dB (there the 14-bit truncation noise matters);
//  * step response rise time about 1 ms (10-90 %, 5 to 20 samples) and
//    overshoot under 10 %.
`include "tb_util.svh"
module tb_lpf3_core;
  import modem_pkg::*;
  int checks = 0, failures = 0;
  logic signed [13:0] x = '0, s1q1 = '0, s1q2 = '0, s2q1 = '0, s1q0, s2q0, y;
  lpf3_core #(.W(14)) dut (.x, .s1_q1(s1q1), .s1_q2(s1q2), .s2_q1(s2q1),
                           .s1_q0(s1q0), .s2_q0(s2q0), .y);

  function automatic real rabs(real v); rabs = v < 0 ? -v : v; endfunction

  task automatic clear(); s1q1 = '0; s1q2 = '0; s2q1 = '0; endtask
  task automatic tick(input int xin, output int yout);
    x = 14'(xin); #1; yout = y;
    s1q2 = s1q1; s1q1 = s1q0; s2q1 = s2q0; #1;
  endtask

  function automatic real db(real a, real b); return 20.0 * $log10(a / b); endfunction

  // loss in dB at frequency f, from the correlation of 1920 settled
  // output samples with the input tone (amplitude 6000)
  task automatic tone(input real f, output real loss);
    int yo, xi; real w, c, d;
    clear(); c = 0; d = 0;
    w = 2.0 * 3.14159265358979 * f / 9600.0;
    for (int n = 0; n < 2520; n++) begin
      xi = int'($floor(6000.0 * $sin(w * n)));
      tick(xi, yo);
      if (n >= 600) begin
        c += real'(yo) * $cos(w * n);
        d += real'(yo) * $sin(w * n);
      end
    end
    loss = db(6000.0 * 960.0, $sqrt(c * c + d * d) + 1e-3);
    $display("%0.0f Hz: loss %0.2f dB", f, loss);
  endtask

  // filter design loss table (Hz, dB)
  real LT [8][2] = '{'{100.0, 0.40}, '{150.0, 0.40}, '{300.0, 0.44}, '{1500.0, 30.06},
                     '{2000.0, 47.78}, '{2500.0, 50.72}, '{3000.0, 47.39}, '{4500.0, 60.38}};

  initial begin
    int yo, t10, t90, pk; real loss, g;
    clear(); t10 = -1; t90 = -1; pk = 0;
    for (int n = 0; n < 400; n++) begin
      tick(4000, yo);
      if (t10 < 0 && yo > 382) t10 = n;
      if (t90 < 0 && yo > 3438) t90 = n;
      if (yo > pk) pk = yo;
    end
    g = real'(yo) / 4000.0;
    $display("DC gain %0.4f, 10-90%% rise %0d samples, peak %0d (final %0d)", g, t90 - t10, pk, yo);
    `CHECK(g > 0.94 && g < 0.97, "DC gain about 0.955")
    `CHECK(t90 - t10 >= 5 && t90 - t10 <= 20, "rise time about 1 ms")
    `CHECK(real'(pk) < 1.10 * real'(yo), "overshoot under 10 %")
    for (int i = 0; i < 8; i++) begin
      real tol;
      tol = LT[i][1] < 35.0 ? 0.5 : 3.0;
      tone(LT[i][0], loss);
      `CHECK(loss > LT[i][1] - tol && loss < LT[i][1] + tol, "loss matches the filter design table")
    end
    `TB_FINISH
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

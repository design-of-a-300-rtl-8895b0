// tb_modulator_spectra -- spectral checks of the transmit signal, from
// 512-sample Hann-windowed DFTs (frequency resolution 18.75 Hz) of:
//   * the sawtooth modulator on its own, at 1070 Hz: the shaping removes
//     the third harmonic (3210 Hz, below -40 dB) and attenuates the n-th
//     odd harmonic by sin(n pi/3)/n^2 relative to the fundamental: the
//     aliased fifth (4250 Hz) near -28 dB, the aliased seventh (2110 Hz)
//     near -34 dB (each checked within 4 dB);
//   * the table modulator on its own: in the lowband, where the step is
//     corrected by three every tenth sample, no spurious line above -29 dB;
//     in the highband, where the correction is one step, none above -38 dB
//     (measured about -30 dB and -39 dB);
//   * the transmit output of the whole modem (after the transmit bandpass
//     filter), with either modulator, at all four tones: no spurious line
//     above -32 dB and nothing above -48 dB at the two tones of the
//     opposite (receive) band.
// Lines closer than 100 Hz to the tone are taken as part of it. Each tone is
// measured after 600 samples of settling; the start phase differs by a
// random number of samples of a preceding space tone.
`include "tb_util.svh"
module tb_modulator_spectra;
  import modem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, orig = 1, txd = 0;
  logic signed [13:0] saw, tab;
  logic clipped, turned;
  logic [11:0] wordin;
  logic signed [11:0] tx_s, tx_t;
  logic [11:0] wo_s, wo_t;
  always #5 clk = ~clk;
  assign wordin = {orig, txd, 2'b00, 8'h00};

  sawtooth_mod   u_saw (.clk, .rst_n, .en, .orig, .txd, .sqt(1'b0), .mod_out(saw), .clipped);
  sine_table_mod u_tab (.clk, .rst_n, .en, .orig, .txd, .sqt(1'b0), .mod_out(tab), .turned);
  fsk_modem_top u_top_s (.clk, .rst_n, .sample_en(en), .wordin, .rxin(12'sd0),
                         .txout(tx_s), .wordout(wo_s));
  fsk_modem_top #(.MOD_SAWTOOTH(1'b0)) u_top_t (.clk, .rst_n, .sample_en(en), .wordin,
                         .rxin(12'sd0), .txout(tx_t), .wordout(wo_t));

  real xs [4][512];   // 0 sawtooth, 1 table, 2 modem with sawtooth, 3 modem with table

  task automatic step();
    en <= 1; @(posedge clk); en <= 0;
    repeat (39) @(posedge clk);
  endtask

  // power of the windowed DFT of x at frequency f (linear)
  function automatic real pwr(ref real x [4][512], input int s, input real f);
    real c, d, w, win;
    c = 0; d = 0;
    w = 2.0 * 3.14159265358979 * f / 9600.0;
    for (int n = 0; n < 512; n++) begin
      win = 0.5 - 0.5 * $cos(2.0 * 3.14159265358979 * n / 512.0);
      c += win * x[s][n] * $cos(w * n);
      d += win * x[s][n] * $sin(w * n);
    end
    return c * c + d * d + 1e-9;
  endfunction

  function automatic real rel_db(ref real x [4][512], input int s, input real f, input real f0);
    return 10.0 * $log10(pwr(x, s, f) / pwr(x, s, f0));
  endfunction

  // largest line (dB relative to the tone f0) more than 100 Hz from f0
  function automatic real spur_db(ref real x [4][512], input int s, input real f0);
    real m, p0, p;
    p0 = pwr(x, s, f0);
    m = 1e-30;
    for (int k = 1; k < 256; k++) begin
      real f;
      f = k * 9600.0 / 512.0;
      if (f < f0 - 100.0 || f > f0 + 100.0) begin
        p = pwr(x, s, f);
        if (p > m) m = p;
      end
    end
    return 10.0 * $log10(m / p0);
  endfunction

  initial begin
    real F [4] = '{1070.0, 1270.0, 2025.0, 2225.0};
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    repeat ($urandom_range(1, 64)) step();
    for (int m = 0; m < 4; m++) begin
      real f0, fo0, fo1;
      orig = m < 2;
      txd  = m % 2 == 1;
      f0 = F[m];
      fo0 = orig ? 2025.0 : 1070.0;
      fo1 = orig ? 2225.0 : 1270.0;
      repeat (600) step();
      for (int n = 0; n < 512; n++) begin
        step();
        xs[0][n] = real'(saw); xs[1][n] = real'(tab);
        xs[2][n] = real'(tx_s); xs[3][n] = real'(tx_t);
      end
      if (m == 0) begin
        real h3, h5, h7;
        h3 = rel_db(xs, 0, 3210.0, f0);
        h5 = rel_db(xs, 0, 4250.0, f0);
        h7 = rel_db(xs, 0, 2110.0, f0);
        $display("sawtooth 1070 Hz: 3rd %0.1f dB, aliased 5th %0.1f dB, aliased 7th %0.1f dB", h3, h5, h7);
        `CHECK(h3 < -40.0, "sawtooth: third harmonic removed")
        `CHECK(h5 > -32.0 && h5 < -24.0, "sawtooth: aliased fifth harmonic about 28 dB down")
        `CHECK(h7 > -38.0 && h7 < -30.0, "sawtooth: aliased seventh harmonic about 34 dB down")
      end
      begin
        real st, ms, mt, os, ot;
        st = spur_db(xs, 1, f0);
        ms = spur_db(xs, 2, f0);
        mt = spur_db(xs, 3, f0);
        os = rel_db(xs, 2, fo0, f0) > rel_db(xs, 2, fo1, f0) ? rel_db(xs, 2, fo0, f0) : rel_db(xs, 2, fo1, f0);
        ot = rel_db(xs, 3, fo0, f0) > rel_db(xs, 3, fo1, f0) ? rel_db(xs, 3, fo0, f0) : rel_db(xs, 3, fo1, f0);
        $display("%0.0f Hz: table modulator spur %0.1f dB; modem output spur %0.1f / %0.1f dB, receive band %0.1f / %0.1f dB (sawtooth / table)",
                 f0, st, ms, mt, os, ot);
        if (m < 2) `CHECK(st <= -29.0, "table modulator: lowband spurs at most -29 dB")
        else       `CHECK(st <= -38.0, "table modulator: highband spurs at most -38 dB")
        `CHECK(ms <= -32.0 && mt <= -32.0, "modem output: spurs at most -32 dB")
        `CHECK(os <= -48.0 && ot <= -48.0, "modem output: receive band at least 48 dB down")
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

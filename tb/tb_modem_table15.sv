// tb_modem_table15 -- runs the modem acceptance tests at default parameters:
// the control word sequences are the 12-bit values of the test table (for
// example -2048/-1024 = originate space/mark, 0/1024 = answer space/mark,
// 256/1280 = answer self-test space/mark, -1792/-768 = originate self-test,
// 512 = squelch), 512 samples per test, each test from reset:
//   1  squelch from the start: 64 samples of transmit output are all 0;
//   2-3 full duplex originate <-> answer, 150 Hz toggled data both ways;
//   4  400 bit/s (200 Hz toggling) in self-test, answer and originate;
//   5  originate mode receiving FSK 36 dB below full scale (generated here,
//      phase continuous, 150 Hz toggling);
//   6-9 self-test, originate and answer, patterns "2 marks, 1 space" and
//      "2 spaces, 1 mark".
// For each data test the alignment of received to sent data is found by
// correlation (for periodic data it is known only modulo the pattern
// period, which does not matter for jitter) and the delay of every data
// transition after the first 128 samples (192 where the signal crosses the
// line and the receiver must settle first) is measured. Bit jitter, the
// deviation of a transition's delay from the nominal, must stay within
// +-1 sample at 300 bit/s (spread of 2) and +-2 samples at 400 bit/s
// (spread of 4); every transition must arrive, and no false transitions
// may occur.
`include "tb_util.svh"
module tb_modem_table15;
  int checks = 0, failures = 0;
  localparam int NS = 512;

  logic clk = 0, rst_n = 0, sample_en = 0;
  logic [11:0] win_a = '0, win_b = '0, wout_a, wout_b;
  logic signed [11:0] tx_a, tx_b, rx_a, rx_b, gen = '0;
  bit use_gen = 0;
  always #5 clk = ~clk;

  fsk_modem_top u_a (.clk, .rst_n, .sample_en, .wordin(win_a), .rxin(rx_a),
                     .txout(tx_a), .wordout(wout_a));
  fsk_modem_top u_b (.clk, .rst_n, .sample_en, .wordin(win_b), .rxin(rx_b),
                     .txout(tx_b), .wordout(wout_b));
  assign rx_a = use_gen ? gen : tx_b;
  assign rx_b = tx_a;

  bit da [NS], db [NS], ra [NS], rb [NS];
  int tx_nonzero;

  task automatic reset();
    rst_n <= 0; repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
  endtask

  task automatic sample();
    repeat (39) @(posedge clk);
    sample_en <= 1; @(posedge clk); sample_en <= 0;
  endtask

  // data pattern: kind 0 = toggling with period 2*len, 1 = M M S, 2 = S S M
  function automatic bit pat(int kind, int n, int len);
    int b = n / len;
    case (kind)
      0: return 1'(b % 2);
      1: return (b % 3) != 2;
      default: return (b % 3) == 2;
    endcase
  endfunction

  // sent data d, received r; jitter limit jmax
  task automatic analyse(input string name, input bit d [NS], input bit r [NS], input int jmax, input int t0);
    int d0, best, agree, lo [2], hi [2], dly, good, want, mism;
    bit near;
    best = -1; d0 = 0;
    for (int dd = 0; dd < 250; dd++) begin
      agree = 0;
      for (int n = t0; n < NS - dd; n++) if (r[n+dd] == d[n]) agree++;
      if (agree > best) begin best = agree; d0 = dd; end
    end
    lo = '{9999, 9999}; hi = '{-1, -1}; good = 0; want = 0;
    for (int n = t0; n < NS - d0 - 8; n++)
      if (d[n] != d[n-1]) begin
        want++;
        dly = d0 - 8;
        while (dly < d0 + 8 && r[n+dly] != d[n]) dly++;
        if (dly < d0 + 8) begin
          good++;
          if (dly < lo[d[n]]) lo[d[n]] = dly;
          if (dly > hi[d[n]]) hi[d[n]] = dly;
        end
      end
    mism = 0;
    for (int n = t0 + d0 + 8; n < NS; n++) begin
      near = 0;
      for (int k = -8; k <= 8; k++) if (d[n-d0-k] != d[n-d0-k-1]) near = 1;
      if (!near && r[n] != d[n-d0]) mism++;
    end
    $display("%-34s alignment %0d, to-space %0d..%0d, to-mark %0d..%0d, %0d of %0d transitions, %0d mismatches",
             name, d0, lo[0], hi[0], lo[1], hi[1], good, want, mism);
    `CHECK(want > 0 && good == want, {name, ": every data transition received"})
    `CHECK(hi[0] - lo[0] <= jmax && hi[1] - lo[1] <= jmax, {name, ": bit jitter within limit"})
    `CHECK(mism == 0, {name, ": no false transitions"})
  endtask

  // self-test in one modem: ctrl base (space) and mark words
  task automatic self_test(input string name, input logic [11:0] w_space, input logic [11:0] w_mark,
                           input int kind, input int len, input int jmax);
    reset();
    for (int n = 0; n < NS; n++) begin
      da[n] = pat(kind, n, len);
      win_a = da[n] ? w_mark : w_space;
      sample();
      ra[n] = wout_a[11];
    end
    analyse(name, da, ra, jmax, 128);
  endtask

  initial begin
    real ph;
    // test 1: squelch from the start
    win_a = 12'd512; win_b = 12'd512;
    reset();
    tx_nonzero = 0;
    for (int n = 0; n < 64; n++) begin
      sample();
      if (tx_a != 0) tx_nonzero++;
    end
    `CHECK(tx_nonzero == 0, "test 1: squelched transmit output is 0 for 64 samples")
    // tests 2-3: full duplex
    reset();
    for (int n = 0; n < NS; n++) begin
      da[n] = pat(0, n, 32); db[n] = pat(0, n + 16, 32);
      win_a = da[n] ? 12'hC00 : 12'h800;     // -1024 / -2048
      win_b = db[n] ? 12'h400 : 12'h000;     //  1024 / 0
      sample();
      ra[n] = wout_a[11]; rb[n] = wout_b[11];
    end
    analyse("test 2: originate -> answer", da, rb, 2, 192);
    analyse("test 3: answer -> originate", db, ra, 2, 192);
    // test 4: 400 bit/s self-test, answer and originate
    self_test("test 4: 400 bit/s self-test answer", 12'h100, 12'h500, 0, 24, 4);
    self_test("test 4: 400 bit/s self-test originate", 12'h900, 12'hD00, 0, 24, 4);
    // test 5: originate receiving -36 dB FSK (2025/2225 Hz)
    reset();
    use_gen = 1; ph = 0.0; win_a = 12'h800;
    for (int n = 0; n < NS; n++) begin
      db[n] = pat(0, n, 32);
      ph += 2.0 * 3.14159265358979 * (db[n] ? 2225.0 : 2025.0) / 9600.0;
      gen <= 12'(int'($floor(2047.0 * 0.01585 * $sin(ph) + 0.5)));
      sample();
      ra[n] = wout_a[11];
    end
    use_gen = 0;
    analyse("test 5: -36 dB receive, originate", db, ra, 2, 192);
    // tests 6-9: self-test patterns
    self_test("test 6: self-test originate MMS", 12'h900, 12'hD00, 1, 32, 2);
    self_test("test 7: self-test originate SSM", 12'h900, 12'hD00, 2, 32, 2);
    self_test("test 8: self-test answer MMS", 12'h100, 12'h500, 1, 32, 2);
    self_test("test 9: self-test answer SSM", 12'h100, 12'h500, 2, 32, 2);
    begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  end
  initial begin #200000000; failures++; $display("watchdog"); begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end end
endmodule

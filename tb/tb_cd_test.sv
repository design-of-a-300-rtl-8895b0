// tb_cd_test -- carrier detect test through the whole receive chain (receive
// bandpass filter, gain control envelope, carrier detector) of the modem in
// originate mode, with the detector's test step sizes 164 / -328, which make
// the counter delay 50 samples each way.
//
// The received signal is a steady mark tone of the answer band (2225 Hz,
// random start phase) whose level follows the schedule of the original
// test:
//     samples   0..63   0 dB
//     samples  64..255  -60 dB
//     samples 256..271  0 dB
//     samples 272..303  -60 dB
//     samples 304..431  -24 dB
//     samples 432..511  -45 dB      (between the two thresholds)
// The reference carrier detect output turns on at sample 64, off at 229, on
// at 318, and is still on at 496. The late turn-off comes from the slow
// decay of the narrow receive filter's ringing; the short 0 dB burst at 256
// starts the turn-on count, and the envelope stays above threshold through
// the following -60 dB gap, so CD comes on 50 counts later despite it. The
// -45 dB level keeps the on state (hysteresis). An extra part shows the
// hysteresis from the other side:
//     samples 512..767  -60 dB      goes off
//     samples 768..1023 -45 dB      stays off
// Each measured transition must lie within 8 samples of the reference. The
// result depends on the tone: a space tone (2025 Hz) excites the receive
// filter's slowest pole (near 1956 Hz) and rings so long that CD stays on
// through the whole first gap, and random data varies the turn-off by tens
// of samples. The start phase moves it by about one sample. 0 dB is a peak of
// 2047 at the 12-bit line input. One sample every 40 clocks.
`include "tb_util.svh"
module tb_cd_test;
  import modem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sample_en = 0;
  logic [11:0] wordin = 12'h800;               // originate, space, no squelch
  logic signed [11:0] rxin = '0, txout;
  logic [11:0] wordout;
  always #5 clk = ~clk;

  fsk_modem_top #(.CD_ST1(164), .CD_ST2(-328)) dut (
    .clk, .rst_n, .sample_en, .wordin, .rxin, .txout, .wordout);

  real ph, amp;
  int  ons [$], offs [$];
  logic cd_prev;

  function automatic real db_amp(real db);
    return 2047.0 * (10.0 ** (db / 20.0));
  endfunction

  task automatic sample(input int n);
    ph += 2.0 * 3.14159265358979 * 2225.0 / 9600.0;
    rxin <= 12'(int'($floor(amp * $sin(ph))));
    sample_en <= 1; @(posedge clk); sample_en <= 0;
    repeat (39) @(posedge clk);
    if (wordout[10] != cd_prev) begin
      if (wordout[10] == 1'b0) ons.push_back(n); else offs.push_back(n);
    end
    cd_prev = wordout[10];
  endtask

  function automatic bit near(int got, int want);
    return got >= want - 8 && got <= want + 8;
  endfunction

  initial begin
    ph = real'($urandom_range(999)) / 1000.0 * 6.2831853;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    cd_prev = wordout[10];
    `CHECK(cd_prev == 1'b1, "carrier detect off after reset")
    for (int n = 0; n < 1024; n++) begin
      amp = n < 64  ? db_amp(0.0)   : n < 256 ? db_amp(-60.0) : n < 272 ? db_amp(0.0) :
            n < 304 ? db_amp(-60.0) : n < 432 ? db_amp(-24.0) : n < 512 ? db_amp(-45.0) :
            n < 768 ? db_amp(-60.0) : db_amp(-45.0);
      sample(n);
      if (n == 511) `CHECK(wordout[10] == 1'b0, "on state held at -45 dB (hysteresis)")
    end
    $write("CD on at samples:");  foreach (ons[i])  $write(" %0d", ons[i]);
    $write("   off at samples:"); foreach (offs[i]) $write(" %0d", offs[i]);
    $display("");
    `CHECK(ons.size() == 2, "carrier detect came on exactly twice")
    `CHECK(offs.size() == 2, "carrier detect went off exactly twice")
    if (ons.size() >= 2) begin
      `CHECK(near(ons[0], 64), "first turn-on near sample 64")
      `CHECK(near(ons[1], 318), "second turn-on near sample 318")
    end
    if (offs.size() >= 2) begin
      `CHECK(near(offs[0], 229), "first turn-off near sample 229")
      `CHECK(offs[1] > 512 && offs[1] < 768, "turn-off in the extra -60 dB part")
    end
    `CHECK(wordout[10] == 1'b1, "off state held at -45 dB (hysteresis)")
    begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  end

  initial begin #50_000_000; failures++; $display("watchdog"); begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end end
endmodule

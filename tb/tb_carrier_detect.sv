// tb_carrier_detect -- checks the carrier detector:
//  * with the test step sizes 164 / -328 the on and off delays are 50
//    updates (counter from -8191 to >= 0 in steps of 164, limiter jump,
//    then back in steps of -164); turn-on needs one extra update because
//    the reset comparison result is "below threshold";
//  * with the default steps 43 / -128 the delays are 20 ms (192 updates)
//    on and 10 ms (97 updates) off;
//  * hysteresis: a level between the -48 dB and -43 dB thresholds keeps
//    whichever state the detector is in;
//  * a bit-exact model follows 20000 updates of a random level walk.
`include "tb_util.svh"
module tb_carrier_detect;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, cd_n, changed, cd_n_t, changed_t;
  logic signed [13:0] level = '0;
  always #5 clk = ~clk;
  carrier_detect dut (.*);
  carrier_detect #(.ST1(164), .ST2(-328)) dut_t (.clk, .rst_n, .en, .level,
                                                 .cd_n(cd_n_t), .changed(changed_t));

  // model of the default detector
  int m_cd, m_count, m_past; bit m_cdn;
  function automatic int s14(int v); return v > 8191 ? 8191 : (v < -8192 ? -8192 : v); endfunction
  task automatic model_reset(); m_cd = -1; m_count = -8191; m_past = -8191; m_cdn = 1; endtask
  task automatic model_step(input int lv);
    bit rneg, sc; int c;
    rneg = m_cd < 0;
    m_cd = s14(lv - (rneg ? 58 : 33));
    c = s14(m_count + 43);
    if (rneg) c = s14(c - 128);
    sc = c < 0;
    if (sc != (m_past < 0)) c = sc ? -8191 : 8191;
    m_count = c; m_past = c; m_cdn = sc;
  endtask

  task automatic upd(input int lv);
    level <= 14'(lv); en <= 1; @(posedge clk); en <= 0; @(posedge clk);
  endtask

  // apply lv until the given output changes; return number of updates
  task automatic until_change(input int lv, input bit test_inst, output int k);
    bit s0 = test_inst ? cd_n_t : cd_n;
    k = 0;
    do begin upd(lv); k++; end while ((test_inst ? cd_n_t : cd_n) == s0 && k < 1000);
  endtask

  initial begin
    int k, mism = 0, lv;
    bit held;
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    `CHECK(cd_n == 1 && cd_n_t == 1, "carrier absent after reset")
    until_change(400, 1, k);
    $display("test steps: on after %0d updates", k);
    `CHECK(k == 51, "test steps: on delay 50 samples + 1")
    until_change(0, 1, k);
    $display("test steps: off after %0d updates", k);
    `CHECK(k == 50, "test steps: off delay 50 samples")
    rst_n <= 0; @(posedge clk); rst_n <= 1; @(posedge clk);
    until_change(400, 0, k);
    $display("default steps: on after %0d updates", k);
    `CHECK(k == 192, "default: on delay 20 ms")
    until_change(0, 0, k);
    $display("default steps: off after %0d updates", k);
    `CHECK(k == 97, "default: off delay 10 ms")
    // hysteresis: level 45 lies between the thresholds (33 < 45 < 58)
    held = 1;
    for (int n = 0; n < 600; n++) begin upd(45); if (cd_n != 1) held = 0; end
    `CHECK(held, "level between thresholds does not turn carrier on")
    until_change(400, 0, k);
    held = 1;
    for (int n = 0; n < 600; n++) begin upd(45); if (cd_n != 0) held = 0; end
    `CHECK(held, "level between thresholds does not turn carrier off")
    // random walk against the model
    rst_n <= 0; @(posedge clk); rst_n <= 1; @(posedge clk);
    model_reset(); lv = 0;
    for (int n = 0; n < 20000; n++) begin
      lv += int'($urandom_range(0, 20)) - 10;
      if (lv < 0) lv = 0; if (lv > 120) lv = 120;
      if ($urandom_range(0, 499) == 0) lv = $urandom_range(0, 1) ? 100 : 0;
      upd(lv); model_step(lv);
      if (cd_n != m_cdn) mism++;
    end
    `CHECK(mism == 0, "random level walk matches model")
    `TB_FINISH
  end
  initial begin #100000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

// tb_agc -- checks the gain control:
//  * a 2225 Hz tone at -24 dB and at -36 dB is brought to nearly full scale
//    (peak within 2 dB of 8191) after settling;
//  * the output sign always equals the input sign (zero input gives zero);
//  * `level` tracks the input amplitude (12 dB apart for the two tones);
//  * `level_valid` is high in the cycle after `en` (level registered on the
//    `en` edge), `y_valid` 14 clock edges after the `en` edge (W-1 divider
//    steps plus the output register).
`include "tb_util.svh"
module tb_agc;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, y_valid, level_valid, busy;
  logic signed [13:0] x = '0, y, level;
  always #5 clk = ~clk;
  agc #(.W(14)) dut (.*);

  int sign_bad = 0, lat_bad = 0;

  task automatic run(input real amp, input real f, output real pk, output int lvl);
    int xi, lat, lv_lat;
    rst_n <= 0; repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    pk = 0;
    for (int n = 0; n < 1500; n++) begin
      xi = int'($floor(amp * $sin(2.0 * 3.14159265358979 * f * n / 9600.0)));
      x <= 14'(xi); en <= 1; @(posedge clk); en <= 0;
      #1; lat = 0; lv_lat = level_valid ? 0 : -1;
      do begin
        @(posedge clk); #1; lat++;
        if (level_valid && lv_lat < 0) lv_lat = lat;
      end while (!y_valid && lat < 60);
      if (lat != 14) lat_bad++;
      if (lv_lat != 0) lat_bad++;
      if ((xi > 0 && y <= 0) || (xi < 0 && y >= 0) || (xi == 0 && y != 0)) begin
        sign_bad++; if (sign_bad < 4) $display("sign n=%0d x=%0d y=%0d", n, xi, y);
      end
      if (lat != 14 && lat_bad < 3) $display("lat %0d lv %0d", lat, lv_lat);
      if (n > 1000 && (y > pk || -y > pk)) pk = y < 0 ? -real'(y) : real'(y);
      repeat (24) @(posedge clk);
    end
    lvl = level;
  endtask

  initial begin
    real pk24, pk36; int l24, l36;
    run(8191.0 * 0.0631, 2225.0, pk24, l24);
    run(8191.0 * 0.01585, 1070.0, pk36, l36);
    $display("-24 dB: out peak %0.0f level %0d; -36 dB: out peak %0.0f level %0d", pk24, l24, pk36, l36);
    `CHECK(pk24 > 6500, "-24 dB tone normalised to near full scale")
    `CHECK(pk36 > 6500, "-36 dB tone normalised to near full scale")
    `CHECK(real'(l24) / real'(l36) > 3.2 && real'(l24) / real'(l36) < 5.2, "level follows amplitude (x4)")
    `CHECK(sign_bad == 0, "sign restored")
    `CHECK(lat_bad == 0, "level_valid next cycle, y_valid 14 clocks after en")
    `TB_FINISH
  end
  initial begin #100000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

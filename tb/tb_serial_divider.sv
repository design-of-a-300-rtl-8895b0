// tb_serial_divider -- checks the bit-serial divider:
//  * the worked 6-bit example (N = 001000, D = 010100 gives 0.01100);
//  * 3000 random 14-bit operand pairs against a bit-exact model of the
//    subtract/keep procedure, plus an accuracy check against N/D (the
//    quotient is N/D truncated, error at most 1 LSB);
//  * saturation when |N| >= |D|, all four sign combinations;
//  * `done` exactly W-1 clocks after `start`, busy during the operation.
`include "tb_util.svh"
module tb_serial_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start6 = 0, done6, busy6;
  logic signed [5:0] n6, d6, q6;
  serial_divider #(.W(6)) dut6 (.clk, .rst_n, .start(start6), .num(n6), .den(d6),
                                .quot(q6), .done(done6), .busy(busy6));
  logic start = 0, done, busy;
  logic signed [13:0] num, den, quot;
  serial_divider #(.W(14)) dut (.clk, .rst_n, .start, .num, .den, .quot, .done, .busy);

  function automatic int model(int n, int d, int w);
    longint an, ad, diff;
    int q;
    an = n < 0 ? -n : n; ad = d < 0 ? -d : d; q = 0;
    an = an << (w - 1); ad = ad << (w - 1);
    for (int i = 1; i < w; i++) begin
      diff = an - (ad >> i);
      if (diff > 0) begin an = diff; q |= 1 << (w - 1 - i); end
    end
    return ((n < 0) != (d < 0)) ? -q : q;
  endfunction

  task automatic div14(input int n, input int d, output int q, output int lat);
    num <= 14'(n); den <= 14'(d); start <= 1; @(posedge clk); start <= 0;
    lat = 0;
    do begin @(posedge clk); #1; lat++; if (lat == 1 && !busy) failures++; end while (!done && lat < 100);
    q = quot;
  endtask

  initial begin
    int q, lat, n, d, errs = 0, lat_bad = 0, acc_bad = 0;
    real r;
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    // worked example
    n6 <= 6'b001000; d6 <= 6'b010100; start6 <= 1; @(posedge clk); start6 <= 0;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!done6 && lat < 100);
    $display("6-bit example: quotient %b after %0d clocks", q6, lat);
    `CHECK(q6 == 6'b001100, "worked example 0.25/0.625 -> 0.01100")
    `CHECK(lat == 5, "6-bit divide takes W-1 = 5 clocks")
    // random operands with |N| < |D|
    for (int t = 0; t < 3000; t++) begin
      d = int'($urandom_range(1, 8191)); if ($urandom_range(0, 1)) d = -d;
      n = int'($urandom_range(0, (d < 0 ? -d : d) - 1)); if ($urandom_range(0, 1)) n = -n;
      div14(n, d, q, lat);
      if (q != model(n, d, 14)) errs++;
      if (lat != 13) lat_bad++;
      r = real'(n) / real'(d) * 8192.0;
      if (r - real'(q) > 1.0 || real'(q) - r > 1.0) acc_bad++;
    end
    `CHECK(errs == 0, "random divides match bit-exact model")
    `CHECK(lat_bad == 0, "done exactly W-1 = 13 clocks after start")
    `CHECK(acc_bad == 0, "quotient within 1 LSB of N/D")
    // saturation and signs
    div14(5000, 3000, q, lat);   `CHECK(q == 8191, "N > D saturates positive")
    div14(-5000, 3000, q, lat);  `CHECK(q == -8191, "negative N saturates negative")
    div14(4000, -4000, q, lat);  `CHECK(q == -8191, "|N| = |D| gives full scale, sign from D")
    div14(-2048, -4096, q, lat); `CHECK(q == 4095, "negative/negative = +0.5 less one LSB")
    div14(0, 0, q, lat);         `CHECK(q == 0, "0/0 gives 0")
    div14(0, 1234, q, lat);      `CHECK(q == 0, "zero numerator")
    `TB_FINISH
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

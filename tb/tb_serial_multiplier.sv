// tb_serial_multiplier -- checks the parallel-serial multiplier:
//  * the worked 6-bit example (x = 011000, y = 110100 gives 110111);
//  * 3000 random 14-bit products against a bit-exact model of the
//    shift-and-add procedure, and within W-1 LSB of the exact product;
//  * -1 * -1 saturation;
//  * `done` exactly W-1 clocks after `start`.
`include "tb_util.svh"
module tb_serial_multiplier;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start6 = 0, done6, busy6;
  logic signed [5:0] x6, y6, p6;
  serial_multiplier #(.W(6)) dut6 (.clk, .rst_n, .start(start6), .x(x6), .y(y6),
                                   .p(p6), .done(done6), .busy(busy6));
  logic start = 0, done, busy;
  logic signed [13:0] x, y, p;
  serial_multiplier #(.W(14)) dut (.*);

  function automatic int model(int xv, int yv, int w);
    int acc, lim;
    lim = 1 << (w - 1);
    acc = yv < 0 ? -xv : 0;
    if (acc > lim - 1) acc = lim - 1;
    for (int i = 1; i < w; i++)
      if (((yv >> (w - 1 - i)) & 1) != 0) begin
        acc += xv >>> i;
        if (acc > lim - 1) acc = lim - 1;
        if (acc < -lim) acc = -lim;
      end
    return acc;
  endfunction

  task automatic mul14(input int a, input int b, output int r, output int lat);
    x <= 14'(a); y <= 14'(b); start <= 1; @(posedge clk); start <= 0;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!done && lat < 100);
    r = p;
  endtask

  initial begin
    int r, lat, a, b, errs = 0, lat_bad = 0, acc_bad = 0;
    real e;
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    x6 <= 6'b011000; y6 <= 6'b110100; start6 <= 1; @(posedge clk); start6 <= 0;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!done6 && lat < 100);
    $display("6-bit example: product %b after %0d clocks", p6, lat);
    `CHECK(p6 == 6'b110111, "worked example 0.75 * -0.375 -> 110111")
    `CHECK(lat == 5, "6-bit multiply takes W-1 = 5 clocks")
    for (int t = 0; t < 3000; t++) begin
      a = int'($urandom_range(0, 16383)) - 8192;
      b = int'($urandom_range(0, 16383)) - 8192;
      mul14(a, b, r, lat);
      if (r != model(a, b, 14)) errs++;
      if (lat != 13) lat_bad++;
      e = real'(a) * real'(b) / 8192.0 - real'(r);
      if (!(a == -8192 && b == -8192) && (e > 14.0 || e < -14.0)) acc_bad++;
    end
    `CHECK(errs == 0, "random products match bit-exact model")
    `CHECK(lat_bad == 0, "done exactly W-1 = 13 clocks after start")
    `CHECK(acc_bad == 0, "product within W LSB of exact value")
    mul14(-8192, -8192, r, lat); `CHECK(r == 8191, "-1 * -1 saturates")
    mul14(4096, 4096, r, lat);   `CHECK(r == 2048, "0.5 * 0.5 = 0.25")
    mul14(4096, -8192, r, lat);  `CHECK(r == -4096, "0.5 * -1 = -0.5")
    `TB_FINISH
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

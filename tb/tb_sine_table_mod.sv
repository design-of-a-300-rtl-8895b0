// tb_sine_table_mod -- checks the table look-up modulator:
//  * over 9600 samples the number of cycles is within one of 1070, 1270, 2025 and
//    2225 for the four mode/data combinations (the frequency depends only on
//    the sample rate);
//  * every output is a signed entry of the 24-value quarter-wave table
//    (sin(k * 90/23 degrees) * 8191, recomputed here);
//  * the index reflects at both ends; squelch gives zero.
`include "tb_util.svh"
module tb_sine_table_mod;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, orig = 0, txd = 0, sqt = 0, turned;
  logic signed [13:0] mod_out;
  always #5 clk = ~clk;
  sine_table_mod dut (.*);

  int table_v [24];
  int bad = 0, turns = 0;

  function automatic bit in_table(int v);
    int a = v < 0 ? -v : v;
    foreach (table_v[i]) if (a == table_v[i]) return 1;
    return 0;
  endfunction

  task automatic measure(input bit o, input bit d, input int f);
    int prev = 0, crossings = 0, got;
    orig = o; txd = d;
    for (int n = 0; n < 9600; n++) begin
      en <= 1; @(posedge clk); en <= 0; @(posedge clk);
      got = mod_out;
      if (!in_table(got)) bad++;
      if (turned) turns++;
      if (prev < 0 && got >= 0) crossings++;
      prev = got;
    end
    $display("orig=%0d txd=%0d: %0d cycles in 9600 samples", o, d, crossings);
    `CHECK(crossings >= f - 1 && crossings <= f + 1, "frequency within 1 Hz")
  endtask

  initial begin
    foreach (table_v[i]) table_v[i] = int'($floor(8191.0 * $sin(i * 3.14159265358979 / 46.0) + 0.5));
    repeat (2) @(posedge clk); rst_n <= 1;
    measure(1, 0, 1070);
    measure(1, 1, 1270);
    measure(0, 0, 2025);
    measure(0, 1, 2225);
    `CHECK(bad == 0, "outputs are table values")
    `CHECK(turns > 100, "index reflects at both ends")
    sqt = 1;
    for (int n = 0; n < 20; n++) begin
      en <= 1; @(posedge clk); en <= 0; @(posedge clk);
      `CHECK(mod_out == 0, "squelch forces zero")
    end
    `TB_FINISH
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

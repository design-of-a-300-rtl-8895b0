// tb_sawtooth_mod -- checks the sawtooth modulator:
//  * output samples equal a reference computed here from the phase
//    recursion and the four shaping steps (with clipping);
//  * frequency over one second of samples (9600) is within 1 Hz of
//    1070/1270/2025/2225 Hz for the four mode/data combinations;
//  * data changes are phase continuous (reference is never reset);
//  * squelch gives zero output; clipping occurs.
`include "tb_util.svh"
module tb_sawtooth_mod;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, orig = 0, txd = 0, sqt = 0, clipped;
  logic signed [13:0] mod_out;
  always #5 clk = ~clk;
  sawtooth_mod #(.W(14)) dut (.*);

  int phase = 0;   // reference phase, 8191 = one period
  int mism = 0, clips = 0;

  function automatic int clamp14(int v); return v > 8191 ? 8191 : (v < -8192 ? -8192 : v); endfunction

  function automatic int ref_next(bit o, bit d, bit q);
    int k, a;
    k = o ? (d ? 1084 : 913) : (d ? 1898 : 1728);
    if (phase < 0) phase += 8191;
    phase = clamp14(phase - k);
    a = clamp14(phase - 4096);
    a = clamp14(2 * a);
    a = clamp14(a < 0 ? -a : a);
    a = clamp14(a - 4096);
    a = clamp14(3 * a);
    return q ? 0 : a;
  endfunction

  task automatic step(output int got, output int expv);
    expv = ref_next(orig, txd, sqt);
    en <= 1; @(posedge clk); en <= 0; @(posedge clk);
    got = mod_out;
    if (got != expv) mism++;
    if (clipped) clips++;
  endtask

  task automatic measure(input bit o, input bit d, input real f);
    int got, expv, prev, crossings;
    orig = o; txd = d; prev = 0; crossings = 0;
    for (int n = 0; n < 9600; n++) begin
      step(got, expv);
      if (prev < 0 && got >= 0) crossings++;
      prev = got;
    end
    $display("orig=%0d txd=%0d: %0d cycles in 9600 samples (nominal %0.0f Hz)", o, d, crossings, f);
    `CHECK(crossings >= int'(f) - 1 && crossings <= int'(f) + 1, "frequency within 1 Hz")
  endtask

  initial begin
    int got, expv;
    repeat (2) @(posedge clk); rst_n <= 1;
    measure(1, 0, 1070.0);
    measure(1, 1, 1270.0);
    measure(0, 0, 2025.0);
    measure(0, 1, 2225.0);
    // 300 bit/s toggling data: reference stays in step => phase continuous
    for (int n = 0; n < 640; n++) begin
      if (n % 32 == 0) txd = ~txd;
      step(got, expv);
    end
    `CHECK(mism == 0, "samples match reference, phase continuous across data changes")
    `CHECK(clips > 0, "triangle peaks are clipped")
    sqt = 1;
    for (int n = 0; n < 50; n++) begin
      step(got, expv);
      `CHECK(got == 0, "squelch forces zero")
    end
    `TB_FINISH
  end
  initial begin #10000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

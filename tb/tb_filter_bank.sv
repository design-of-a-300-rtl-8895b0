// tb_filter_bank -- checks the mode multiplexing of the filter unit:
// originate sends the modulator through the lowband filter and the line
// through the highband filter, answer the reverse; self-test (ALB) feeds the
// filtered transmit signal to the demodulator. Signal routing is judged by
// passband tones coming through at near full level and adjacent-band tones
// being suppressed by more than 45 dB. Also checks the control/status word
// transfer and the one-clock strobe latency.
`include "tb_util.svh"
module tb_filter_bank;
  import modem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sample_en = 0;
  logic [11:0] wordin = '0, wd_out = '0, cword, wordout;
  logic signed [11:0] rxin = '0, txmod = '0, txout, demod;
  logic demod_valid;
  always #5 clk = ~clk;

  filter_bank dut (.*);

  real pk_tx, pk_dm;
  int  mism;

  function automatic logic signed [11:0] tone(real f, int n, real a);
    if (f == 0.0) return '0;
    return 12'(longint'($floor(a * $sin(2.0 * 3.14159265358979 * f * n / 9600.0))));
  endfunction
  function automatic real rabs(real v); rabs = v < 0 ? -v : v; endfunction

  task automatic run(input bit orig, input bit alb, input real ftx, input real frx);
    rst_n <= 0; repeat (2) @(posedge clk); rst_n <= 1;
    pk_tx = 0; pk_dm = 0; mism = 0;
    for (int n = 0; n < 800; n++) begin
      wordin <= {orig, 2'b00, alb, 8'h00};
      txmod  <= tone(ftx, n, 1500.0);
      rxin   <= tone(frx, n, 1500.0);
      wd_out <= 12'(n);
      sample_en <= 1; @(posedge clk); sample_en <= 0;
      @(posedge clk);
      if (!demod_valid) mism++;
      if (cword != {orig, 2'b00, alb, 8'h00} || wordout != 12'(n)) mism++;
      if (alb && demod != txout) mism++;
      @(posedge clk);
      if (demod_valid) mism++;
      if (n > 600) begin
        if (rabs(real'(txout)) > pk_tx) pk_tx = rabs(real'(txout));
        if (rabs(real'(demod)) > pk_dm) pk_dm = rabs(real'(demod));
      end
    end
    `CHECK(mism == 0, "strobe timing, word transfer, self-test routing")
  endtask

  initial begin
    // originate: transmit lowband, receive highband
    run(1, 0, 1070.0, 2225.0);
    `CHECK(pk_tx > 1200 && pk_tx < 1900, "originate: 1070 Hz transmitted")
    `CHECK(pk_dm > 1200 && pk_dm < 1900, "originate: 2225 Hz received")
    run(1, 0, 2225.0, 1070.0);
    `CHECK(pk_tx < 8, "originate: highband tone blocked on transmit")
    `CHECK(pk_dm < 8, "originate: lowband tone blocked on receive")
    // answer: transmit highband, receive lowband
    run(0, 0, 2025.0, 1270.0);
    `CHECK(pk_tx > 1200 && pk_tx < 1900, "answer: 2025 Hz transmitted")
    `CHECK(pk_dm > 1200 && pk_dm < 1900, "answer: 1270 Hz received")
    run(0, 0, 1270.0, 2025.0);
    `CHECK(pk_tx < 8, "answer: lowband tone blocked on transmit")
    `CHECK(pk_dm < 8, "answer: highband tone blocked on receive")
    // self-test: demodulator sees own transmit signal
    run(1, 1, 1270.0, 2225.0);
    `CHECK(pk_dm > 1200, "originate self-test loops lowband transmit back")
    run(0, 1, 2225.0, 1070.0);
    `CHECK(pk_dm > 1200, "answer self-test loops highband transmit back")
    `TB_FINISH
  end
  initial begin #1000000000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

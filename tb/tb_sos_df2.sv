// tb_sos_df2 -- checks one direct form II section against a reference
// written with real arithmetic (floor of exact products, clamp to W bits),
// for random inputs and coefficients, including saturating cases.
`include "tb_util.svh"
module tb_sos_df2;
  import modem_pkg::*;
  localparam int W = 14;
  int checks = 0, failures = 0;
  logic signed [W-1:0] x, q1, q2, q0, y;
  sos_coef_t c;
  sos_df2 #(.W(W)) dut (.x, .q1, .q2, .c, .q0, .y);

  function automatic longint fl(real v); fl = longint'($floor(v)); endfunction
  function automatic longint clampw(longint v);
    longint hi = (64'sd1 <<< (W-1)) - 1, lo = -(64'sd1 <<< (W-1));
    clampw = v > hi ? hi : (v < lo ? lo : v);
  endfunction

  initial begin
    // hand case: scale 1.0, a1 0.5, q1 100 -> q0 = x + 50 ; y = q0 + q2*(-1)
    x = 14'sd1000; q1 = 14'sd100; q2 = 14'sd30;
    c = '{scale: 4096, a1: 2048, a2: 0, b1: 0, b2: -4096};
    #1;
    `CHECK(q0 == 14'sd1050, "hand q0")
    `CHECK(y  == 14'sd1020, "hand y")
    // saturation: 8000 + 8000 -> 8191
    x = 14'sd8000; q1 = 14'sd8000; q2 = '0;
    c = '{scale: 4096, a1: 4096, a2: 0, b1: 0, b2: 0};
    #1;
    `CHECK(q0 == 14'sd8191, "positive saturation")
    x = -14'sd8000; q1 = -14'sd8000;
    #1;
    `CHECK(q0 == -14'sd8192, "negative saturation")
    for (int n = 0; n < 2000; n++) begin
      longint eq, ey;
      x  = W'($urandom); q1 = W'($urandom); q2 = W'($urandom);
      c.scale = coef_t'($urandom_range(0, 8192));
      c.a1 = coef_t'(int'($urandom_range(0, 16384)) - 8192);
      c.a2 = coef_t'(int'($urandom_range(0, 8192)) - 4096);
      c.b1 = coef_t'(int'($urandom_range(0, 16384)) - 8192);
      c.b2 = coef_t'(int'($urandom_range(0, 8192)) - 4096);
      #1;
      eq = clampw(fl(real'(x) * c.scale / 4096.0) + fl(real'(q1) * c.a1 / 4096.0)
                  + fl(real'(q2) * c.a2 / 4096.0));
      ey = clampw(eq + fl(real'(q1) * c.b1 / 4096.0) + fl(real'(q2) * c.b2 / 4096.0));
      `CHECK(longint'(q0) == eq && longint'(y) == ey, "random section vector")
    end
    `TB_FINISH
  end
  initial begin #100000; failures++; $display("watchdog"); `TB_FINISH end
endmodule

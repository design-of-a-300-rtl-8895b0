// modem_pkg -- word lengths, control-word layout, coefficient tables and
// saturating arithmetic shared by the 300-baud FSK modem.
//
// Numbers are two's complement fractions: a W-bit word represents values in
// [-1, 1) with 2^(W-1)-1 as the largest positive value. Filter coefficients
// are held as integers in units of 2^-12 (COEF_FRAC), which represents every
// coefficient of the design exactly (the finest is 2^-12 in the demodulator
// bandpass scale factor). The adder of the original processors saturates on
// overflow; sat() reproduces that at each node where a result is written back
// to a word.
//
// Word lengths follow the design: 12-bit signal I/O bus, 20-bit filter
// processor, 14-bit modulator/demodulator processor. The bit positions of the
// mode bits inside the 12-bit control word (O/A bit 11, TXD bit 10, SQT bit 9,
// ALB bit 8) are read off the control-word values used in the modem tests;
// the status word carries RXD in bit 11 and CD (active low) in bit 10.
//
// Lint note: when a single block is linted together with this package, the
// constants and tables that block does not use are reported as unused
// parameters; each of them is used elsewhere in the modem.
package modem_pkg;

  localparam int unsigned IO_W    = 12;   // parallel signal I/O bus
  localparam int unsigned FILT_W  = 20;   // processor "filters"
  localparam int unsigned MODEM_W = 14;   // processor "modem"
  localparam int unsigned COEF_W  = 16;   // coefficient word (signed, Q12)
  localparam int unsigned COEF_FRAC = 12;

  typedef logic signed [COEF_W-1:0] coef_t;

  // Coefficients of one direct form II second order section (Fig. 14):
  // q0 = scale*in + a1*q1 + a2*q2 ; out = q0 + b1*q1 + b2*q2
  typedef struct packed {
    coef_t scale;
    coef_t a1;
    coef_t a2;
    coef_t b1;
    coef_t b2;
  } sos_coef_t;

  // Control word from the host side (wordin).
  typedef struct packed {
    logic orig;   // O/A: 1 = originate, 0 = answer
    logic txd;    // data to transmit: 1 = mark, 0 = space
    logic sqt;    // squelch: modulator output forced to 0
    logic alb;    // analog loopback self-test
  } ctrl_t;

  // takes control word bits 11..8; bits 7..0 carry no control function
  function automatic ctrl_t decode_wordin(input logic [3:0] w);
    decode_wordin = '{orig: w[3], txd: w[2], sqt: w[1], alb: w[0]};
  endfunction

  function automatic logic [IO_W-1:0] encode_wordout(input logic rxd, input logic cd_n);
    encode_wordout = {rxd, cd_n, {(IO_W-2){1'b0}}};
  endfunction

  // ---- 10th order transmit/receive filters (five sections each) ----
  localparam int unsigned NSEC = 5;
  typedef sos_coef_t band_coef_t [NSEC];

  localparam band_coef_t LOWBAND_SOS = '{
    '{scale:  256, a1: 5376, a2: -3488, b1: -6720, b2:  4800},
    '{scale: 1024, a1: 6176, a2: -3712, b1: -1984, b2:  4096},
    '{scale: 2048, a1: 5088, a2: -3840, b1: -6112, b2:  4928},
    '{scale: 1024, a1: 5088, a2: -3424, b1:  -928, b2:  4096},
    '{scale: 1024, a1: 5728, a2: -3488, b1:     0, b2: -4096}
  };
  localparam coef_t LOWBAND_OUT_SCALE = 16'sd8704;   // 2.125

  localparam band_coef_t HIGHBAND_SOS = '{
    '{scale:  512, a1: 1504, a2: -3488, b1: -2336, b2:  5728},
    '{scale:  512, a1: 1664, a2: -2912, b1: -6272, b2:  4096},
    '{scale: 2048, a1:  544, a2: -3680, b1: -1184, b2:  5152},
    '{scale: 1024, a1: 2272, a2: -3840, b1: -5536, b2:  4096},
    '{scale: 2048, a1:  928, a2: -3264, b1:     0, b2: -4096}
  };
  localparam coef_t HIGHBAND_OUT_SCALE = 16'sd7168;  // 1.75

  // ---- demodulator third order lowpass filter ----
  localparam sos_coef_t LPF_SEC1 = '{scale: 384, a1: 6400, a2: -2816, b1: -1024, b2: 4096};
  localparam sos_coef_t LPF_SEC2 = '{scale: 512, a1: 2688, a2:     0, b1:  4096, b2:    0};

  // ---- demodulator bandpass filters: only a1 differs between the four ----
  localparam coef_t BPF_SCALE   = 16'sd65;      // 2^-6 + 2^-12
  localparam coef_t BPF_A2      = -16'sd3840;   // -0.9375
  localparam coef_t BPF_B2      = -16'sd4096;   // -1.0
  localparam coef_t BPF_A1_ORIG_MARK  = 16'sd768;   // 0.1875  (2250 Hz)
  localparam coef_t BPF_A1_ORIG_SPACE = 16'sd2048;  // 0.5     (2000 Hz)
  localparam coef_t BPF_A1_ANS_MARK   = 16'sd5248;  // 1.28125 (1295 Hz)
  localparam coef_t BPF_A1_ANS_SPACE  = 16'sd6144;  // 1.5     (1045 Hz)

  // Saturate a wide signed value into W bits (the adder's overflow rule).
  function automatic logic signed [39:0] sat(input logic signed [39:0] v, input int unsigned w);
    logic signed [39:0] hi, lo;
    hi = (40'sd1 <<< (w-1)) - 40'sd1;
    lo = -(40'sd1 <<< (w-1));
    if (v > hi)      sat = hi;
    else if (v < lo) sat = lo;
    else             sat = v;
  endfunction

  // Multiply a sample by a Q12 coefficient; the product is truncated
  // (arithmetic shift right), as the shift-and-add hardware does.
  function automatic logic signed [39:0] cmul(input logic signed [39:0] x, input coef_t c);
    logic signed [55:0] p;
    p = 56'(x) * 56'(c);
    cmul = 40'(p >>> COEF_FRAC);
  endfunction

endpackage

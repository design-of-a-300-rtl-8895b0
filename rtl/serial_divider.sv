// serial_divider -- fractional divider, one quotient bit per clock.
//
// Divides N by D for two's complement fractions with |D| > |N|, the way the
// modem processor does it with its shifter and saturating accumulator:
//   1. the sign of the quotient is sign(N) xor sign(D);
//   2. the accumulator is loaded with |N|;
//   3. on successive cycles |D|/2, |D|/4, ... is subtracted; the
//      accumulator carries W-1 extra low-order bits so the shifted divisor
//      loses nothing (the worked example's words grow a bit per cycle), which
//      makes the quotient floor(|N|/|D| * 2^(W-1)) (one LSB less when a
//      power-of-two fraction divides exactly);
//   4. a difference that is positive is kept and sets the matching
//      quotient bit (MSB first); a negative or zero one is discarded;
//   5. the sign-magnitude quotient is converted to two's complement.
// If |N| >= |D| every quotient bit comes out 1, i.e. the result saturates at
// the largest magnitude, which the gain control relies on.
//
// Interface/timing: `start` (one cycle) captures `num` and `den`; the W-1
// quotient bits take W-1 clocks, and `done` pulses together with a valid
// `quot` W-1 clocks after the `start` cycle. `start` while `busy` is ignored.
// Discarding a zero difference (strictly positive, as worded) makes 0/0 give
// 0, which the gain control needs at start-up when its envelope is still 0.
module serial_divider #(
  parameter int unsigned W = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] num,
  input  logic signed [W-1:0] den,
  output logic signed [W-1:0] quot,
  output logic                done,
  output logic                busy
);
  localparam int unsigned AW = 2*W;   // W magnitude bits + W-1 guard bits + 1
  logic        [AW-1:0]         acc, dabs;
  logic        [$clog2(W)-1:0]  idx;
  logic                         neg;
  logic        [W-2:0]          qbits;
  logic signed [AW:0]           diff;
  logic        [W-2:0]          qbits_n;
  logic        [W-2:0]          onehot;

  // |v| placed above the W-1 guard bits
  function automatic logic [AW-1:0] magnitude(input logic signed [W-1:0] v);
    logic [W:0] m;
    m = v[W-1] ? (W+1)'(-(W+1)'(v)) : (W+1)'(v);
    magnitude = AW'(m) << (W-1);
  endfunction

  always_comb begin
    diff    = $signed({1'b0, acc}) - $signed({1'b0, dabs >> idx});
    onehot  = (W-1)'(1) << ((W-1) - 32'(idx));
    qbits_n = (diff[AW] || diff == '0) ? qbits : (qbits | onehot);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc   <= '0;
      dabs  <= '0;
      idx   <= '0;
      neg   <= 1'b0;
      qbits <= '0;
      quot  <= '0;
      done  <= 1'b0;
      busy  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          acc   <= magnitude(num);
          dabs  <= magnitude(den);
          neg   <= num[W-1] ^ den[W-1];
          qbits <= '0;
          idx   <= 1;
          busy  <= 1'b1;
        end
      end else begin
        if (!diff[AW] && diff != '0) acc <= diff[AW-1:0];
        qbits <= qbits_n;
        idx   <= idx + 1'b1;
        if (idx == ($clog2(W))'(W-1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= neg ? -$signed({1'b0, qbits_n}) : $signed({1'b0, qbits_n});
        end
      end
    end
  end
endmodule

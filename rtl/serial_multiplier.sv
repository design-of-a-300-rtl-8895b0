// serial_multiplier -- parallel-serial two's complement multiplier.
//
// Multiplies fractions x and y (-1 <= y < 1) by using the bits of y serially,
// MSB first, to gate shifted copies of x into one saturating accumulator:
//   x*y = -x*y0 + sum_{i=1}^{W-1} y_i * x/2^i
// The accumulator starts at -x when y is negative and at 0 otherwise, and on
// each following cycle adds x shifted right by i (truncated) when bit i of y
// is one. This is the multiply the modem processor performs for variable by
// variable products (used by the delay-line discriminator).
//
// Interface/timing: `start` (one cycle) captures x and y and forms the sign
// term; W-1 further clocks add the partial products, and `done` pulses with a
// valid `p` W-1 clocks after the `start` cycle. The product keeps W bits
// (W-1 fraction bits); -1 * -1 saturates to the largest positive value.
module serial_multiplier #(
  parameter int unsigned W = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic signed [W-1:0] p,
  output logic                done,
  output logic                busy
);
  localparam logic signed [W+1:0] MAXV = (W+2)'((1 <<< (W-1)) - 1);
  localparam logic signed [W+1:0] MINV = -(W+2)'(1 <<< (W-1));

  logic signed [W-1:0]         xr;
  logic        [W-1:0]         yr;
  logic signed [W+1:0]         acc, sum;
  logic        [$clog2(W)-1:0] idx;

  function automatic logic signed [W+1:0] clamp(input logic signed [W+1:0] v);
    clamp = (v > MAXV) ? MAXV : ((v < MINV) ? MINV : v);
  endfunction

  always_comb begin
    sum = acc;
    if (yr[(W-1) - 32'(idx)]) sum = clamp(acc + (W+2)'(xr >>> idx));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xr   <= '0;
      yr   <= '0;
      acc  <= '0;
      idx  <= '0;
      p    <= '0;
      done <= 1'b0;
      busy <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          xr   <= x;
          yr   <= y;
          acc  <= y[W-1] ? clamp(-(W+2)'(x)) : '0;
          idx  <= 1;
          busy <= 1'b1;
        end
      end else begin
        acc <= sum;
        idx <= idx + 1'b1;
        if (idx == ($clog2(W))'(W-1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          p    <= sum[W-1:0];
        end
      end
    end
  end
endmodule

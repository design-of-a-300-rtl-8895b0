// sine_table_mod -- FSK modulator reading a quarter-wave sine table.
//
// The table holds 24 sine values from 0 to 90 degrees (14-bit, 8191 = 1.0).
// An index `step` walks up the table and back down (direction flag u), and a
// sign flag pn negates the values on the negative half cycle, so a full
// cycle is 96 index steps and the output frequency is (mean step) * 100 Hz.
// Fractional steps are made by alternating two integer steps:
//   1070 Hz: 11, but 8 every 10th sample     1270 Hz: 13, but 10 every 10th
//   2025 Hz: 20, but 21 every 4th sample     2225 Hz: 22, but 23 every 4th
// Turning at the top, an index past 23 is reflected to 47-step; turning at
// the bottom, an index below 0 is reflected to -1-step and pn toggles. The
// mod-10 and mod-4 counters give the every-10th / every-4th flags. Only the
// step size depends on the data, so frequency changes are phase coherent.
// SQT forces the output to zero.
//
// Timing: on `en` the current table value is registered to `mod_out` and the
// index advanced, one sample per `en`. Reset: index 0, counting up, positive.
module sine_table_mod
  import modem_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      orig,
  input  logic                      txd,
  input  logic                      sqt,
  output logic signed [MODEM_W-1:0] mod_out,
  output logic                      turned   // pulses when the index reflects
);
  localparam int TABLE_N = 24;
  localparam logic signed [MODEM_W-1:0] SINE [TABLE_N] = '{
    14'sd0,    14'sd559,  14'sd1115, 14'sd1667, 14'sd2210, 14'sd2743,
    14'sd3263, 14'sd3768, 14'sd4256, 14'sd4724, 14'sd5169, 14'sd5591,
    14'sd5986, 14'sd6354, 14'sd6692, 14'sd6999, 14'sd7273, 14'sd7513,
    14'sd7718, 14'sd7887, 14'sd8020, 14'sd8115, 14'sd8172, 14'sd8191};

  logic signed [7:0] step, step_n;
  logic              up, up_n, pn, pn_n;
  logic        [3:0] o_count, o_count_n;
  logic        [1:0] a_count, a_count_n;
  logic              oc, ac, oc_n, ac_n;
  logic signed [7:0] inc;
  logic signed [MODEM_W-1:0] sine;

  always_comb begin
    sine = SINE[step[4:0]];
    unique case ({orig, txd})
      2'b10:   inc = oc ? 8'sd8  : 8'sd11;   // originate space 1070 Hz
      2'b11:   inc = oc ? 8'sd10 : 8'sd13;   // originate mark  1270 Hz
      2'b00:   inc = ac ? 8'sd21 : 8'sd20;   // answer space    2025 Hz
      default: inc = ac ? 8'sd23 : 8'sd22;   // answer mark     2225 Hz
    endcase
    step_n = up ? step + inc : step - inc;
    up_n   = up;
    pn_n   = pn;
    if (up && step_n > 8'sd23) begin
      step_n = 8'sd47 - step_n;
      up_n   = 1'b0;
    end else if (!up && step_n < 8'sd0) begin
      step_n = -8'sd1 - step_n;
      up_n   = 1'b1;
      pn_n   = ~pn;
    end
    oc_n      = (o_count == 4'd9);
    o_count_n = oc_n ? 4'd0 : o_count + 4'd1;
    ac_n      = (a_count == 2'd3);
    a_count_n = a_count + 2'd1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step    <= '0;
      up      <= 1'b1;
      pn      <= 1'b0;
      o_count <= '0;
      a_count <= '0;
      oc      <= 1'b0;
      ac      <= 1'b0;
      mod_out <= '0;
      turned  <= 1'b0;
    end else if (en) begin
      mod_out <= sqt ? '0 : (pn ? -sine : sine);
      step    <= step_n;
      up      <= up_n;
      pn      <= pn_n;
      o_count <= o_count_n;
      a_count <= a_count_n;
      oc      <= oc_n;
      ac      <= ac_n;
      turned  <= up_n != up;
    end else begin
      turned  <= 1'b0;
    end
  end
endmodule

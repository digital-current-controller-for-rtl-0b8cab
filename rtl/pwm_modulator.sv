// pwm_modulator - one center-aligned counter/comparator modulator.
//
// A 7-bit counter runs up from 0 to CNT_MAX-1 and back down, holding each end
// value for two clocks, so one period is 2*CNT_MAX clocks (250 clocks, 1 us at
// 250 MHz) and the output is high for exactly 2*cmp clocks. The output is high
// while the counter is below the compare value; with ADAPT set, the compare
// value is cmp+1 while counting down, which is how the 180 degree modulator of
// the high-resolution DPWM stays symmetric. The compare value is loaded from d
// when the counter turns round at zero, and also at the top when LOAD_AT_MAX is
// set. The comparator result is registered, so pwm lags the counter by one
// clock. upd is high (combinationally) in the clock whose edge turns the counter
// round and loads d. The counter law, the Table-II-style adaptation and the
// update instants follow the document; the two-clock dwell at the ends is
// this design's reading of a 200 ns pulse for d = 50 at a maximum count of 125.
`timescale 1ns/1ps
module pwm_modulator #(
  parameter int unsigned CNT_MAX     = 125,
  parameter bit          ADAPT       = 1'b0,
  parameter bit          LOAD_AT_MAX = 1'b0,
  localparam int unsigned CW         = $clog2(CNT_MAX + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] d,
  output logic [CW-1:0] cmp,
  output logic          pwm,
  output logic          upd_zero,
  output logic          upd_max
);
  logic [CW-1:0] cnt;
  logic          up;      // counting direction

  assign upd_zero = !up && (cnt == '0);
  assign upd_max  =  up && (cnt == CW'(CNT_MAX - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      up  <= 1'b0;
      cmp <= '0;
      pwm <= 1'b0;
    end else begin
      if (upd_zero) begin
        up  <= 1'b1;
        cmp <= d;
      end else if (upd_max) begin
        up  <= 1'b0;
        if (LOAD_AT_MAX) cmp <= d;
      end else if (up) begin
        cnt <= cnt + 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
      end
      // Table II: counting up -> cnt < d ; counting down -> cnt < d (+1 if ADAPT)
      if (up) pwm <= (cnt < cmp);
      else    pwm <= ({1'b0, cnt} < ({1'b0, cmp} + (CW+1)'(ADAPT)));
    end
  end
endmodule

// pi_lag - discrete P+lag current controller, u[n] = K*(e[n] - k1*e[n-1]) + k2*u[n-1].
//
// This is the Tustin form K(z) = K (1 - k1 z^-1) / (1 - k2 z^-1) of an analog
// P+lag controller, built as a pipeline of three 18x18 multipliers:
//   stage 1  input registers for e[n-1], k1, e[n], K, u[n-1], k2
//   stage 2  products e[n-1]*k1 and u[n-1]*k2 (36 bit) registered
//   stage 3  e[n] - (e[n-1]*k1 >> 12) registered (19 bit sum cut to 18)
//   stage 4  product of stage 3 and K registered
//   stage 5  sum of the two scaled products registered as u[n]
// Products drop their 12 fraction bits (floor) and, like the sums, saturate to
// 18 bits. The stage structure and widths are those of the document; the
// saturation is this design's choice.
//
// Interface: pulse start for one cycle with e valid; e, k_gain, k1, k2 must be
// held until valid. u and valid appear 5 clock cycles after the start cycle.
// At that instant e[n] and u[n] are kept as e[n-1] and u[n-1] for the next
// sample. Reset clears both (reset behaviour is this design's choice).
`timescale 1ns/1ps
module pi_lag
  import vr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t e,
  input  word_t k_gain,
  input  word_t k1,
  input  word_t k2,
  output word_t u,
  output logic  valid
);
  localparam int unsigned LATENCY = 5;

  word_t e_prev;
  // stage 1
  word_t r_eprev, r_k1, r_e, r_k, r_uprev, r_k2;
  // stage 2
  logic signed [2*W-1:0] p_e1, p_u;
  // stage 3
  word_t s_diff;
  // stage 4
  logic signed [2*W-1:0] p_k;
  // latency tracking
  logic [LATENCY-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_eprev <= '0; r_k1 <= '0; r_e <= '0; r_k <= '0; r_uprev <= '0; r_k2 <= '0;
      p_e1 <= '0; p_u <= '0; s_diff <= '0; p_k <= '0;
    end else begin
      r_eprev <= e_prev;   r_k1 <= k1;
      r_e     <= e;        r_k  <= k_gain;
      r_uprev <= u;        r_k2 <= k2;
      p_e1    <= r_eprev * r_k1;
      p_u     <= r_uprev * r_k2;
      s_diff  <= sat_w(48'(r_e) - 48'(sat_w(48'(p_e1 >>> FRAC))));
      p_k     <= s_diff * r_k;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld    <= '0;
      u      <= '0;
      e_prev <= '0;
    end else begin
      vld <= {vld[LATENCY-2:0], start};
      if (vld[LATENCY-2]) begin
        u      <= sat_w(48'(sat_w(48'(p_k >>> FRAC))) + 48'(sat_w(48'(p_u >>> FRAC))));
      end
      if (vld[LATENCY-1]) e_prev <= r_e;
    end
  end

  assign valid = vld[LATENCY-1];

  // e and the gains must stay put while a sample is in the pipeline.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (|vld[LATENCY-2:0]) |-> $stable(e) && $stable(k_gain) && $stable(k1) && $stable(k2);
  endproperty
  a_hold: assert property (p_hold) else $error("pi_lag: operands changed inside the pipeline");
endmodule

// current_controller - current controller of one rectifier phase.
//
// Each switching period it turns one current sample and one voltage sample into
// the two duties of the phase's switches:
//   i_ref = g_e * u_N                    reference current (conductance model)
//   e     = i_ref - i_meas
//   u     = K(z) e                       P+lag controller (pi_lag)
//   d_ff  = (u_N - v3harm) * 2*FULL / v_o voltage feedforward (vff_divider)
//   x     = u + i_0 - d_ff
//   d_p   = clamp(x + POS_OFFSET - I_ff) duty of S+
//   d_n   = clamp(x + NEG_OFFSET + I_ff) duty of the PWM that drives S- through
//                                        an inverter
// With POS_OFFSET = FULL and NEG_OFFSET = 0 this is d = 1 - |u_N|/(V_o/2) for
// the switch of the active half wave and a permanently-on switch in the other.
// Inside the controller a duty is counted in 1/16 of a PWM step, so FULL =
// 250 x 16 = 4000 (a 12-bit range like the samples); the clamped duties lose
// the 4 fraction bits on the way out. Without them the floor after k2*u[n-1]
// would take one whole PWM step per period off u and defeat the lag's
// integral action.
// The samples arrive in binary offset and are made two's complement by
// inverting their MSB. The structure (reference multiplier, K(z), divider,
// i_0, offsets, I_ff, inverter) follows the document; the sign of d_ff at the
// summing point, the duty scaling and the clamp to 0..FULL are this design's
// choices.
//
// Timing (125 MHz clock): start is a one-cycle pulse with the samples valid.
// Cycle 1 converts and registers samples and settings, 2 forms i_ref, 3 the
// error; the P+lag pipeline ends at 8. The divider starts in the same cycle as
// the samples and ends at 14; 15 forms the sums and 16 clamps them. valid
// pulses 16 cycles (128 ns) after start and the duties hold until the next
// result. Samples must be at least 16 cycles apart (asserted).
`timescale 1ns/1ps
module current_controller
  import vr_pkg::*;
#(
  parameter int unsigned DUTY_FULL = 250,
  parameter int unsigned DUTY_FRAC = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  adc_word_t    i_meas_raw,
  input  adc_word_t    u_n_raw,
  input  ctrl_params_t prm,
  input  word_t        i_ff,
  output duty_t        d_p,
  output duty_t        d_n,
  output logic         valid
);
  localparam int unsigned LATENCY   = 16;
  localparam int unsigned CTRL_FULL = DUTY_FULL << DUTY_FRAC;   // 4000
  localparam int unsigned SW = 22;   // width of the final sums
  typedef logic signed [SW-1:0] sum_t;

  ctrl_params_t prm_r;
  word_t        iff_r, i_m, u_n, i_ref, err, u, d_ff;
  logic         s1, s2, s3, div_done;
  sum_t         sp, sn;
  logic         s15;

  // stage 1: sample conversion, settings frozen for this sample
  // stage 2: reference current, stage 3: error
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prm_r <= '0; iff_r <= '0; i_m <= '0; u_n <= '0; i_ref <= '0; err <= '0;
      s1 <= 1'b0; s2 <= 1'b0; s3 <= 1'b0;
    end else begin
      s1 <= start;
      s2 <= s1;
      s3 <= s2;
      if (start) begin
        i_m   <= offs2tc(i_meas_raw);
        u_n   <= offs2tc(u_n_raw);
        prm_r <= prm;
        iff_r <= i_ff;
      end
      if (s1) i_ref <= mul_q(u_n, prm_r.g_e);
      if (s2) err   <= sat_w(48'(i_ref) - 48'(i_m));
    end
  end

  pi_lag u_pi (
    .clk, .rst_n, .start(s3), .e(err),
    .k_gain(prm_r.k_gain), .k1(prm_r.k1), .k2(prm_r.k2),
    .u, .valid()
  );

  // the divider takes the sample straight from the input and registers it
  vff_divider #(.SCALE(2*CTRL_FULL)) u_div (
    .clk, .rst_n, .start, .u_n(offs2tc(u_n_raw)), .v3(prm.v3harm), .v_o(prm.v_o),
    .d_ff, .done(div_done)
  );

  // the P+lag result (cycle 8) is held in pi_lag's output register until the
  // divider finishes (cycle 14)
  // clamp to 0..CTRL_FULL and drop the DUTY_FRAC fraction bits
  function automatic duty_t clamp(input sum_t v);
    if (v < 0)                      return '0;
    else if (v > sum_t'(CTRL_FULL)) return duty_t'(DUTY_FULL);
    else                            return duty_t'(v >>> DUTY_FRAC);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= '0; sn <= '0; s15 <= 1'b0; d_p <= '0; d_n <= '0; valid <= 1'b0;
    end else begin
      s15   <= div_done;
      valid <= s15;
      if (div_done) begin
        sp <= sum_t'(u) + sum_t'(prm_r.i_0) - sum_t'(d_ff) + sum_t'(prm_r.pos_off) - sum_t'(iff_r);
        sn <= sum_t'(u) + sum_t'(prm_r.i_0) - sum_t'(d_ff) + sum_t'(prm_r.neg_off) + sum_t'(iff_r);
      end
      if (s15) begin
        d_p <= clamp(sp);
        d_n <= clamp(sn);
      end
    end
  end

  // a new sample must not arrive while one is in the pipeline
  a_order: assert property (@(posedge clk) disable iff (!rst_n) div_done |-> !(|{s1, s2, s3}))
    else $error("current_controller: samples closer than the pipeline length");
endmodule

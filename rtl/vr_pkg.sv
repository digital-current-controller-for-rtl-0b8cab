// vr_pkg - shared types and constants of the VIENNA rectifier current controller.
//
// All controller arithmetic uses 18-bit signed words, the operand width of the
// FPGA hardware multipliers. ADC samples keep their 12-bit range inside these
// words (they are sign-extended, not scaled up). Controller constants K, k1, k2
// and the conductance g_e use a fractional format with 6 integer bits
// (sign included) and 12 fraction bits; a product is brought back to 18 bits by
// dropping the 12 fraction bits. Duties are counts of 4 ns (one half period of
// the 250 MHz PWM clock), 0..250 for a 1 us switching period.
`timescale 1ns/1ps
package vr_pkg;

  localparam int unsigned W        = 18;   // datapath word width
  localparam int unsigned FRAC     = 12;   // fraction bits of Q6.12 constants
  localparam int unsigned ADC_BITS = 12;   // converter resolution
  localparam int unsigned DUTY_BITS = 8;   // duty word (C2: 8 bit)

  typedef logic signed [W-1:0] word_t;
  typedef logic [ADC_BITS-1:0] adc_word_t;
  typedef logic [DUTY_BITS-1:0] duty_t;

  // Q6.12 constants of the measured prototype: K = 0.25, k1 = 0.96, k2 = 0.99
  localparam word_t K_DEFAULT  = word_t'(1024);   // 0.25 * 4096
  localparam word_t K1_DEFAULT = word_t'(3932);   // 0.96 * 4096, truncated
  localparam word_t K2_DEFAULT = word_t'(4055);   // 0.99 * 4096, truncated

  // Which A/D converter interface the top uses.
  typedef enum logic {
    ADC_SPI  = 1'b0,   // realization C1: AD7274, SPI, 1 MSa/s
    ADC_LVDS = 1'b1    // realization C2: ADS5240, serial LVDS, 25 MSa/s
  } adc_if_e;

  // Settings written by the voltage-controller DSP and shared by the phases.
  typedef struct packed {
    word_t g_e;        // conductance: i_ref = g_e * u_N (Q6.12)
    word_t v_o;        // output voltage, in voltage-ADC LSBs
    word_t i_0;        // zero-sequence component from the symmetry controller (1/16 PWM steps)
    word_t v3harm;     // third-harmonic signal
    word_t pos_off;    // POS_OFFSET (1/16 PWM steps, full duty 4000)
    word_t neg_off;    // NEG_OFFSET (1/16 PWM steps)
    word_t k_gain;     // K  (Q6.12)
    word_t k1;         // k1 (Q6.12)
    word_t k2;         // k2 (Q6.12)
  } ctrl_params_t;

  // Saturate a wider signed value to an 18-bit word.
  function automatic word_t sat_w(input logic signed [47:0] v);
    if (v > 48'sd131071)       return word_t'(18'sh1FFFF);
    else if (v < -48'sd131072) return word_t'(18'sh20000);
    else                       return word_t'(v);
  endfunction

  // Multiply two words and drop the 12 fraction bits (floor), saturating.
  function automatic word_t mul_q(input word_t a, input word_t b);
    logic signed [2*W-1:0] p;
    p = a * b;
    return sat_w(48'(p >>> FRAC));
  endfunction

  // Binary offset to two's complement: invert the MSB, then sign-extend.
  function automatic word_t offs2tc(input adc_word_t x);
    logic [ADC_BITS-1:0] t;
    t = {~x[ADC_BITS-1], x[ADC_BITS-2:0]};
    return word_t'($signed(t));
  endfunction

endpackage

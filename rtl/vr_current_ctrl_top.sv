// vr_current_ctrl_top - FPGA current controller of a 1 MHz three-phase VIENNA rectifier.
//
// Signal chain per switching period (1 us):
//   1. The phase-1 S+ modulator turns round at counter zero, the middle of its
//      pulse, where the sampled inductor current equals its period average.
//      Its start of conversion is brought into the 125 MHz system clock.
//   2. The ADC interface returns the six samples (channels 0..2 the phase
//      currents, 3..5 the phase voltages): ADC_LVDS uses the serial LVDS
//      deserializer (realization C2), ADC_SPI the SPI converters (C1).
//   3. Three current controllers, one per phase, compute the S+ and S- duties
//      in parallel in 16 system clocks (128 ns).
//   4. The six duties cross into the 250 MHz PWM clock together and are taken
//      by the modulators at the next counter-zero instant, one period after
//      the sample.
// The settings (g_e, v_o, i_0, v3harm, offsets, I_ff, K, k1, k2) arrive from
// the voltage-controller DSP over SPI. S- is driven through an inverter, so a
// zero duty keeps it on. Defaults give the C2 realization (LVDS converters,
// 8-bit DPWM from two 180 degree shifted modulators); ADC_IF = ADC_SPI with
// HIRES = 0 gives C1 (SPI converters, 7-bit PWM). The ports of the interface
// that is not selected are unused and the SPI ADC outputs rest high.
//
// Clocks are inputs (they come from the FPGA's PLL/DCM): clk_sys 125 MHz,
// clk_pwm0 / clk_pwm180 250 MHz at 0 and 180 degrees, clk_spi_adc 31.25 MHz
// for C1, lvds_clk0 / lvds_clk180 the converters' bit clock and its inverse
// for C2. rst_n resets every domain asynchronously.
`timescale 1ns/1ps
module vr_current_ctrl_top
  import vr_pkg::*;
#(
  parameter adc_if_e     ADC_IF        = ADC_LVDS,
  parameter bit          HIRES         = 1'b1,
  parameter bit          DOUBLE_UPDATE = 1'b0,
  parameter int unsigned N_PH          = 3,
  parameter int unsigned CNT_MAX       = 125,
  parameter int unsigned PICK_WORD     = 7,
  localparam int unsigned N_CH         = 2 * N_PH,
  localparam int unsigned DUTY_FULL    = 2 * CNT_MAX
) (
  input  logic            clk_sys,
  input  logic            clk_pwm0,
  input  logic            clk_pwm180,
  input  logic            rst_n,
  // C1: SPI converters
  input  logic            clk_spi_adc,
  output logic            adc_spi_cs_n,
  output logic            adc_spi_sclk,
  input  logic [N_CH-1:0] adc_spi_sdata,
  // C2: serial LVDS converters
  input  logic            lvds_clk0,
  input  logic            lvds_clk180,
  input  logic            lvds_frame,
  input  logic [N_CH-1:0] lvds_data,
  // SPI from the voltage-controller DSP
  input  logic            dsp_sclk,
  input  logic            dsp_cs_n,
  input  logic            dsp_mosi,
  // gate signals
  output logic [N_PH-1:0] pwm_p,
  output logic [N_PH-1:0] pwm_n,
  // start of conversion as seen by the system clock
  output logic            soc_sys
);
  // ---------------------------------------------------------------- DSP link
  ctrl_params_t     prm;
  word_t [N_PH-1:0] i_ff;

  dsp_spi_slave #(.N_PH(N_PH), .CTRL_FULL(DUTY_FULL << 4)) u_dsp (
    .clk(clk_sys), .rst_n, .sclk(dsp_sclk), .cs_n(dsp_cs_n), .mosi(dsp_mosi),
    .prm, .i_ff, .wr()
  );

  // ---------------------------------------------------------------- sampling
  logic soc_pwm;

  cdc_word_sync #(.WIDTH(1)) u_soc_sync (
    .src_clk(clk_pwm0), .src_rst_n(rst_n), .src_valid(soc_pwm), .src_data(1'b1),
    .dst_clk(clk_sys), .dst_rst_n(rst_n), .dst_valid(soc_sys), .dst_data()
  );

  adc_word_t [N_CH-1:0] smp;
  logic                 smp_vld;

  generate
    if (ADC_IF == ADC_SPI) begin : g_spi
      adc_spi_if #(.N_CH(N_CH)) u_adc (
        .clk(clk_sys), .rst_n, .sclk(clk_spi_adc), .soc(soc_sys),
        .adc_cs_n(adc_spi_cs_n), .adc_sclk(adc_spi_sclk), .adc_sdata(adc_spi_sdata),
        .data(smp), .valid(smp_vld)
      );
    end else begin : g_lvds
      adc_lvds_if #(.N_CH(N_CH), .PICK_WORD(PICK_WORD)) u_adc (
        .clk0(lvds_clk0), .clk180(lvds_clk180), .frame(lvds_frame), .sdata(lvds_data),
        .clk(clk_sys), .rst_n, .soc(soc_sys),
        .word(), .word_valid(), .data(smp), .valid(smp_vld)
      );
      assign adc_spi_cs_n = 1'b1;
      assign adc_spi_sclk = 1'b1;
    end
  endgenerate

  // ---------------------------------------------------------------- control
  duty_t [N_PH-1:0] dp, dn;
  logic  [N_PH-1:0] dvld;

  for (genvar ph = 0; ph < N_PH; ph++) begin : g_ph
    current_controller #(.DUTY_FULL(DUTY_FULL)) u_cc (
      .clk(clk_sys), .rst_n, .start(smp_vld),
      .i_meas_raw(smp[ph]), .u_n_raw(smp[N_PH + ph]),
      .prm, .i_ff(i_ff[ph]),
      .d_p(dp[ph]), .d_n(dn[ph]), .valid(dvld[ph])
    );
  end

  // ---------------------------------------------------------------- PWM update
  duty_t [N_PH-1:0] dp_pwm, dn_pwm;

  cdc_word_sync #(.WIDTH(2*N_PH*DUTY_BITS)) u_duty_sync (
    .src_clk(clk_sys), .src_rst_n(rst_n), .src_valid(dvld[0]), .src_data({dn, dp}),
    .dst_clk(clk_pwm0), .dst_rst_n(rst_n), .dst_valid(), .dst_data({dn_pwm, dp_pwm})
  );

  logic [N_PH-1:0] pwm_n_raw;
  logic [2*N_PH-1:0] soc_all;

  for (genvar ph = 0; ph < N_PH; ph++) begin : g_pwm
    dpwm #(.CNT_MAX(CNT_MAX), .HIRES(HIRES), .DOUBLE_UPDATE(DOUBLE_UPDATE)) u_pwm_p (
      .clk0(clk_pwm0), .clk180(clk_pwm180), .rst_n, .duty(dp_pwm[ph]),
      .pwm_out(pwm_p[ph]), .soc(soc_all[2*ph]), .upd()
    );
    dpwm #(.CNT_MAX(CNT_MAX), .HIRES(HIRES), .DOUBLE_UPDATE(DOUBLE_UPDATE)) u_pwm_n (
      .clk0(clk_pwm0), .clk180(clk_pwm180), .rst_n, .duty(dn_pwm[ph]),
      .pwm_out(pwm_n_raw[ph]), .soc(soc_all[2*ph+1]), .upd()
    );
    assign pwm_n[ph] = ~pwm_n_raw[ph];
  end

  // all modulators leave reset together and count in step; phase 1 S+ paces sampling
  assign soc_pwm = soc_all[0];
endmodule

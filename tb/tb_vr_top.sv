// tb_vr_top - closed-loop end-to-end test of the current controller (default configuration).
//
// The top runs with its default parameters (LVDS converters, 8-bit DPWM,
// 1 MHz). A simple averaged model of the three boost inductors closes the
// loop: once per period, half way between two update instants, each phase
// current changes by G (v_N - v_conv), where v_conv follows from the measured
// on-time of the active switch (S+ for v_N >= 0, S- below); G = 0.2 makes a
// full-duty change move the current by about its own amplitude in one
// period, roughly the ratio of the 1 MHz, 10 kW design. The mains voltages
// are a 2.5 kHz three-phase set so that 800 periods cover two mains cycles.
// The settings are sent over the DSP SPI link: the loop gain K is raised to
// 4.0 because this model's current scale is arbitrary (not mentioned in the
// document), and at period 400 the conductance g_e is stepped up and i_0,
// v3harm and I_ff are set.
// Checked:
//   - every sample the controllers receive equals the converter input
//   - every period, the high time of each of the six gate signals equals
//     4 ns x the duty that a reference model of the control law computes from
//     the previous period's samples (so the one-period update delay holds)
//   - sample-to-duty time below one period (printed)
//   - current tracking error after settling (RMS printed, bounded)
//   - each mechanism happened: odd duties through the 180 degree modulator,
//     S+ held on (duty 250), S- held on (duty 0), duties in between, DSP
//     writes, the g_e step and the converter words.
`timescale 1ns/1ps
module tb_vr_top;
  import vr_pkg::*;
  import vr_ref_pkg::*;
  localparam int NP = 3, NCH = 6, N_PERIODS = 800;
  localparam real G = 0.2, AMPL = 1200.0, FMAINS = 2.5e3;

  logic clk_sys = 0, clk_pwm0 = 0, clk_spi_adc = 0, rst_n = 0;
  wire  clk_pwm180 = ~clk_pwm0;
  logic dsp_sclk = 0, dsp_cs_n = 1, dsp_mosi = 0;
  logic [NP-1:0] pwm_p, pwm_n;
  logic soc_sys, adc_spi_cs_n, adc_spi_sclk;
  logic [NCH-1:0] adc_spi_sdata;

  always #4  clk_sys     = ~clk_sys;
  always #2  clk_pwm0    = ~clk_pwm0;
  always #16 clk_spi_adc = ~clk_spi_adc;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ converters
  logic [NCH-1:0][11:0] ain, ain_snap;
  logic lclk, frame;
  logic [NCH-1:0] dout;
  logic [NCH-1:0][11:0] sent;
  realtime sent_t;
  int sent_cnt;
  ads5240_model #(.N_CH(NCH)) u_adc (.ain, .lclk, .frame, .dout, .sent, .sent_t, .sent_cnt);
  assign adc_spi_sdata = '0;

  // ------------------------------------------------------------ design
  vr_current_ctrl_top dut (
    .clk_sys, .clk_pwm0, .clk_pwm180, .rst_n,
    .clk_spi_adc, .adc_spi_cs_n, .adc_spi_sclk, .adc_spi_sdata,
    .lvds_clk0(lclk), .lvds_clk180(~lclk), .lvds_frame(frame), .lvds_data(dout),
    .dsp_sclk, .dsp_cs_n, .dsp_mosi, .pwm_p, .pwm_n, .soc_sys
  );

  function automatic longint expect_width(longint d);
    return d;          // 8-bit modulator: every duty count is 4 ns
  endfunction

  // ------------------------------------------------------------ DSP link
  task automatic dsp_write(input logic [3:0] a, input word_t v);
    logic [23:0] f;
    f = {a, 2'b00, v};
    dsp_cs_n = 0; #100;
    for (int i = 23; i >= 0; i--) begin
      dsp_mosi = f[i]; #50; dsp_sclk = 1; #50; dsp_sclk = 0;
    end
    #50 dsp_cs_n = 1; #200;
  endtask

  // ------------------------------------------------------------ reference model
  phase_model mdl [NP];
  longint exp_p [NP][$], exp_n [NP][$];
  realtime t_soc;
  int n_samples = 0, n_words = 0, n_dsp_wr = 0;
  realtime max_lat = 0;

  always @(posedge clk_sys) if (rst_n && dut.smp_vld) begin
    n_samples++;
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (dut.smp[c] != ain_snap[c]) begin
        failures++;
        if (failures < 20) $display("sample %0d ch %0d: %0d, converter input %0d", n_samples, c, dut.smp[c], ain_snap[c]);
      end
    end
    for (int ph = 0; ph < NP; ph++) begin
      longint dp, dn;
      mdl[ph].step(int'(dut.smp[ph]), int'(dut.smp[NP+ph]), dut.prm, longint'(dut.i_ff[ph]), dp, dn);
      exp_p[ph].push_back(dp);
      exp_n[ph].push_back(dn);
    end
  end

  always @(posedge clk_sys) if (rst_n && dut.dvld[0]) begin
    if ($realtime - t_soc > max_lat) max_lat = $realtime - t_soc;
  end

  // ------------------------------------------------------------ gate-signal timing
  logic [2*NP-1:0] line;
  assign line = {~pwm_n, pwm_p};            // raw PWM of S- (before the inverter), S+
  realtime t_hi [2*NP];
  realtime acc [2*NP];
  for (genvar k = 0; k < 2*NP; k++) begin : g_line
    always @(line[k]) begin
      if (line[k]) t_hi[k] = $realtime;
      else         acc[k] = acc[k] + ($realtime - t_hi[k]);
    end
  end

  // mechanism counters
  int n_odd = 0, n_full = 0, n_zero = 0, n_mid = 0, n_windows = 0;
  real err2 = 0.0;
  int  n_err = 0;
  real cur [NP], volt [NP];
  longint dmeas [2*NP];
  logic step_done = 0;

  task automatic close_window();
    for (int k = 0; k < 2*NP; k++) begin
      if (line[k]) begin acc[k] = acc[k] + ($realtime - t_hi[k]); t_hi[k] = $realtime; end
      dmeas[k] = longint'($floor(acc[k] / 4.0 + 0.5));
      acc[k] = 0;
    end
    // Closing number w ends the period that began at update w-1 (the first
    // one ends the time before the first update); that period carries the
    // duty computed from sample w-2.
    if (n_windows >= 2) begin
      for (int ph = 0; ph < NP; ph++) begin
        longint ep, en;
        if (exp_p[ph].size() < 1) begin
          failures++; $display("window %0d: no duty computed in time", n_windows);
        end else begin
          ep = exp_p[ph].pop_front();
          en = exp_n[ph].pop_front();
          checks += 2;
          if (dmeas[ph] != expect_width(ep)) begin
            failures++;
            if (failures < 20) $display("window %0d ph %0d: S+ duty %0d, expected %0d", n_windows, ph, dmeas[ph], ep);
          end
          if (dmeas[NP+ph] != expect_width(en)) begin
            failures++;
            if (failures < 20) $display("window %0d ph %0d: S- duty %0d, expected %0d", n_windows, ph, dmeas[NP+ph], en);
          end
          if (ep % 2) n_odd++;
          if (ep == 250) n_full++;
          if (en == 0)   n_zero++;
          if (ep > 0 && ep < 250) n_mid++;
        end
      end
    end
    n_windows++;
  endtask

  // plant: half way through the period the currents follow the last window
  task automatic plant_step();
    real t, vc, ge;
    t = $realtime * 1.0e-9;
    ge = real'(dut.prm.g_e) / 4096.0;
    for (int ph = 0; ph < NP; ph++) begin
      if (volt[ph] >= 0.0) vc = 1500.0 * (1.0 - real'(dmeas[ph]) / 250.0);
      else                 vc = -1500.0 * (real'(dmeas[NP+ph]) / 250.0);
      cur[ph] = cur[ph] + G * (volt[ph] - vc);
      if (cur[ph] > 2000.0) cur[ph] = 2000.0;
      if (cur[ph] < -2000.0) cur[ph] = -2000.0;
      if (n_windows > 40 && (n_windows < 400 || n_windows > 440)) begin
        err2 += (cur[ph] - ge * volt[ph]) ** 2;
        n_err++;
      end
      volt[ph] = AMPL * $sin(6.283185307 * FMAINS * t - real'(ph) * 2.094395102);
      ain[ph]      = 12'(2048 + int'($floor(cur[ph] + 0.5)));
      ain[NP + ph] = 12'(2048 + int'($floor(volt[ph] + 0.5)));
    end
  endtask

  always @(posedge clk_pwm0) if (rst_n && dut.soc_pwm) begin
    t_soc = $realtime;
    ain_snap = ain;
    #5;
    close_window();
    #495;
    plant_step();
  end

  always @(posedge clk_sys) if (rst_n && dut.u_dsp.wr) n_dsp_wr++;
  always @(posedge clk_sys) if (rst_n && dut.g_lvds.u_adc.word_valid) n_words++;

  // ------------------------------------------------------------ run
  initial begin
    #(N_PERIODS * 1000 + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ph = 0; ph < NP; ph++) begin
      mdl[ph] = new();
      cur[ph] = 0.0;
      volt[ph] = AMPL * $sin(-real'(ph) * 2.094395102);
      ain[ph] = 12'd2048;
      ain[NP + ph] = 12'(2048 + int'($floor(volt[ph] + 0.5)));
    end
    for (int k = 0; k < 2*NP; k++) begin acc[k] = 0; t_hi[k] = 0; dmeas[k] = 0; end
    ain_snap = ain;
    repeat (4) @(negedge clk_sys);
    rst_n = 1;
    dsp_write(4'd1, word_t'(3000));      // v_o
    dsp_write(4'd9, word_t'(16384));     // K = 4.0
    dsp_write(4'd0, word_t'(1024));      // g_e = 0.25
    wait (n_windows == 400);
    dsp_write(4'd0, word_t'(1536));      // g_e step to 0.375
    step_done = 1;
    dsp_write(4'd2, word_t'(48));        // i_0 (3 PWM steps)
    dsp_write(4'd3, word_t'(100));       // v3harm
    dsp_write(4'd6, word_t'(64));        // I_ff of phase 1
    dsp_write(4'd8, -word_t'(64));       // I_ff of phase 3
    wait (n_windows == N_PERIODS);
    // ---- report
    begin
      real rms;
      rms = $sqrt(err2 / real'(n_err));
      $display("sample to duty ready: %0.1f ns at most", max_lat);
      $display("current tracking error after settling: %0.1f LSB rms", rms);
      $display("windows %0d, samples %0d, converter words %0d, DSP writes %0d", n_windows, n_samples, n_words, n_dsp_wr);
      $display("duties: odd %0d, S+ held on %0d, S- held on %0d, in between %0d", n_odd, n_full, n_zero, n_mid);
      checks += 9;
      if (max_lat >= 1000.0 || max_lat == 0) begin failures++; $display("sample to duty time out of range"); end
      if (rms > 40.0) begin failures++; $display("current does not follow the reference"); end
      if (n_odd == 0)  begin failures++; $display("no odd duty"); end
      if (n_full == 0) begin failures++; $display("S+ never held on"); end
      if (n_zero == 0) begin failures++; $display("S- never held on"); end
      if (n_mid == 0)  begin failures++; $display("no modulated duty"); end
      if (n_dsp_wr != 8) begin failures++; $display("DSP writes %0d, expected 8", n_dsp_wr); end
      if (!step_done)  begin failures++; $display("no g_e step"); end
      if (n_words == 0) begin failures++; $display("no converter words"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

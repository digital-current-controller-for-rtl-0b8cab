// tb_current_controller - self-checking test of one phase's current controller.
//
// Feeds 500 sample pairs in binary offset, with settings that change every 25
// samples, and compares d_p and d_n with a model of the control law worked out
// here in 64-bit integers:
//   i = raw - 2048, u_N = raw - 2048, i_ref = floor(g_e u_N / 4096),
//   u[n] = K(e[n] - k1 e[n-1]) + k2 u[n-1] with floors after each product,
//   d_ff = sign(u_N - v3) * min(4095, trunc(|u_N - v3| * 8000 / v_o)),
//   d_p = clamp(u + i_0 - d_ff + POS_OFFSET - I_ff, 0, 4000) / 16,
//   d_n = clamp(u + i_0 - d_ff + NEG_OFFSET + I_ff, 0, 4000) / 16.
// Checks the 16-cycle (128 ns) latency, and counts how often each duty was
// clamped at 0 and at 250 and how often it was in between; each must happen.
`timescale 1ns/1ps
module tb_current_controller;
  import vr_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  adc_word_t i_raw = '0, u_raw = '0;
  ctrl_params_t prm;
  word_t i_ff = '0;
  duty_t d_p, d_n;
  logic valid;
  int checks = 0, failures = 0;
  int n_lo = 0, n_hi = 0, n_mid = 0;
  longint m_eprev = 0, m_uprev = 0;

  always #4 clk = ~clk;

  current_controller dut (.clk, .rst_n, .start, .i_meas_raw(i_raw), .u_n_raw(u_raw),
                          .prm, .i_ff, .d_p, .d_n, .valid);

  function automatic longint sat18(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction
  function automatic longint fl12(longint v);
    longint q = v / 4096;
    if ((v % 4096 != 0) && (v < 0)) q = q - 1;
    return q;
  endfunction
  function automatic longint clampd(longint v);
    if (v < 0) return 0;
    if (v > 4000) return 250;
    return v / 16;
  endfunction

  task automatic count(longint v);
    if (v == 0) n_lo++; else if (v == 250) n_hi++; else n_mid++;
  endtask

  task automatic one(input int ir, input int ur);
    longint im, un, iref, e, u, diff, mag, q, dff, sp, sn;
    int cyc;
    i_raw = adc_word_t'(ir); u_raw = adc_word_t'(ur);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!valid && cyc < 40) begin @(negedge clk); cyc++; end
    im   = longint'(ir) - 2048;
    un   = longint'(ur) - 2048;
    iref = sat18(fl12(un * longint'(prm.g_e)));
    e    = sat18(iref - im);
    u    = sat18(sat18(fl12(sat18(e - sat18(fl12(m_eprev * longint'(prm.k1)))) * longint'(prm.k_gain)))
                 + sat18(fl12(m_uprev * longint'(prm.k2))));
    m_eprev = e; m_uprev = u;
    diff = un - longint'(prm.v3harm);
    mag  = (diff < 0) ? -diff : diff;
    if (prm.v_o <= 0 || mag * 8000 >= longint'(prm.v_o) * 4096) q = 4095;
    else q = mag * 8000 / longint'(prm.v_o);
    dff = (diff < 0) ? -q : q;
    sp = clampd(u + longint'(prm.i_0) - dff + longint'(prm.pos_off) - longint'(i_ff));
    sn = clampd(u + longint'(prm.i_0) - dff + longint'(prm.neg_off) + longint'(i_ff));
    count(sp); count(sn);
    checks += 3;
    if (cyc != 16) begin failures++; $display("latency %0d, expected 16", cyc); end
    if (longint'(d_p) != sp) begin failures++; if (failures < 10) $display("d_p=%0d expected %0d", d_p, sp); end
    if (longint'(d_n) != sn) begin failures++; if (failures < 10) $display("d_n=%0d expected %0d", d_n, sn); end
    // the settings may change as soon as a sample has been taken
    repeat (4) @(negedge clk);
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prm = '{g_e: word_t'(4096), v_o: word_t'(3000), i_0: '0, v3harm: '0,
            pos_off: word_t'(4000), neg_off: '0, k_gain: K_DEFAULT, k1: K1_DEFAULT, k2: K2_DEFAULT};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      if (n % 25 == 24) begin
        prm.g_e     = word_t'($urandom_range(2048));
        prm.v_o     = word_t'($urandom_range(4000) + 1000);
        prm.i_0     = word_t'(int'($urandom_range(640)) - 320);
        prm.v3harm  = word_t'(int'($urandom_range(400)) - 200);
        prm.neg_off = word_t'(int'($urandom_range(320)) - 160);
        prm.pos_off = word_t'(3840 + int'($urandom_range(320)));
        i_ff        = word_t'(int'($urandom_range(480)) - 240);
      end
      // a sinusoid-like voltage with a current that roughly follows it
      one(int'($urandom_range(300)) + 1900 + ((n % 50) < 25 ? 100 : -100),
          2048 + int'(1400.0 * $sin(6.2832 * n / 50.0)));
    end
    if (n_lo == 0 || n_hi == 0 || n_mid == 0) begin
      failures++; $display("clamp cases lo=%0d hi=%0d mid=%0d", n_lo, n_hi, n_mid);
    end
    $display("duty at 0: %0d, at full: %0d, in between: %0d", n_lo, n_hi, n_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

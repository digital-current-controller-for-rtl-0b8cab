// tb_pi_lag - self-checking test of the P+lag controller pipeline.
//
// Drives 400 error samples (random, with runs of large values that force
// saturation) with the prototype gains and then with random gains, and
// compares each u[n] with a reference recursion computed here in 64-bit
// integers: u[n] = sat(floor(sat(e[n] - floor(k1 e[n-1] / 4096)) K / 4096)
// + floor(k2 u[n-1] / 4096)). Also checks that u[n] appears exactly 5 clock
// cycles after start and that e[n-1], u[n-1] start at zero after reset.
`timescale 1ns/1ps
module tb_pi_lag;
  import vr_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  word_t e = '0, kg, k1, k2, u;
  logic valid;
  int checks = 0, failures = 0;
  longint m_eprev, m_uprev;

  always #4 clk = ~clk;

  pi_lag dut (.clk, .rst_n, .start, .e, .k_gain(kg), .k1, .k2, .u, .valid);

  function automatic longint sat18(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction
  function automatic longint fl12(longint v);   // floor(v / 4096)
    longint q = v / 4096;
    if ((v % 4096 != 0) && (v < 0)) q = q - 1;
    return q;
  endfunction

  task automatic one(input longint ev);
    longint exp_u;
    int cyc;
    e = word_t'(ev);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!valid && cyc < 20) begin @(negedge clk); cyc++; end
    exp_u = sat18(sat18(fl12(sat18(ev - sat18(fl12(m_eprev * longint'(k1)))) * longint'(kg)))
                  + sat18(fl12(m_uprev * longint'(k2))));
    checks += 2;
    if (cyc != 5) begin failures++; $display("latency %0d, expected 5", cyc); end
    if (longint'(u) != exp_u) begin
      failures++;
      if (failures < 10) $display("e=%0d u=%0d expected %0d", ev, u, exp_u);
    end
    m_eprev = ev; m_uprev = exp_u;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kg = K_DEFAULT; k1 = K1_DEFAULT; k2 = K2_DEFAULT;
    m_eprev = 0; m_uprev = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // step response with the prototype gains
    for (int n = 0; n < 100; n++) one(400);
    for (int n = 0; n < 100; n++) one(longint'($urandom_range(4095)) - 2048);
    // large errors drive the sums into saturation
    for (int n = 0; n < 50; n++) one((n % 2) ? 131000 : -131000);
    // random gains
    for (int n = 0; n < 150; n++) begin
      if (n % 10 == 0) begin
        kg = word_t'($urandom_range(16384)); k1 = word_t'($urandom_range(4095));
        k2 = word_t'($urandom_range(4095));
      end
      one(longint'($urandom_range(8191)) - 4096);
    end
    // reset clears the history: the first result is K * e only
    rst_n = 0; @(negedge clk); rst_n = 1;
    m_eprev = 0; m_uprev = 0;
    one(1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

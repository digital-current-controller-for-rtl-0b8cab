// tb_vff_divider - self-checking test of the voltage feedforward divider.
//
// Applies 600 random operand sets (phase voltage, third harmonic, output
// voltage, including quotients that overflow and non-positive v_o) and checks
// the signed quotient trunc(|u_N - v3| * 8000 / v_o), saturated at 4095, and
// the 14-cycle latency from start to done.
`timescale 1ns/1ps
module tb_vff_divider;
  import vr_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  word_t u_n = '0, v3 = '0, v_o = '0, d_ff;
  logic done;
  int checks = 0, failures = 0, n_ovf = 0;

  always #4 clk = ~clk;

  vff_divider dut (.clk, .rst_n, .start, .u_n, .v3, .v_o, .d_ff, .done);

  task automatic one(input longint a, input longint b, input longint c);
    longint diff, mag, q, expv;
    int cyc;
    u_n = word_t'(a); v3 = word_t'(b); v_o = word_t'(c);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done && cyc < 40) begin @(negedge clk); cyc++; end
    diff = a - b;
    mag  = (diff < 0) ? -diff : diff;
    if (c <= 0 || mag * 8000 >= c * 4096) begin q = 4095; n_ovf++; end
    else q = (mag * 8000) / c;
    expv = (diff < 0) ? -q : q;
    checks += 2;
    if (cyc != 14) begin failures++; $display("latency %0d, expected 14", cyc); end
    if (longint'(d_ff) != expv) begin
      failures++;
      if (failures < 10) $display("u=%0d v3=%0d vo=%0d: d_ff=%0d expected %0d", a, b, c, d_ff, expv);
    end
    // operands may change after start
    u_n = word_t'($urandom); v_o = word_t'($urandom);
    @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    one(1000, 0, 2000);      // u_N = v_o / 2 -> full duty 4000
    one(-1000, 0, 2000);
    one(0, 0, 2000);
    one(500, 0, 0);          // v_o = 0 saturates
    for (int n = 0; n < 600; n++)
      one(longint'($urandom_range(4095)) - 2048, longint'($urandom_range(1000)) - 500,
          (n % 50 == 7) ? -longint'($urandom_range(100)) : longint'($urandom_range(4095)));
    if (n_ovf == 0) begin failures++; $display("no saturated quotient seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

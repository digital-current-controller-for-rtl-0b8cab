// tb_dpwm - self-checking test of the high-resolution center-aligned DPWM.
//
// Three modulators run from a 250 MHz clock pair 180 degrees apart: the
// default 8-bit one, a 7-bit one (HIRES = 0) and one with a second update per
// period (DOUBLE_UPDATE = 1). For a list of duties (the 50 / 51 / 52 of the
// measurement, the ends of the range and random values) the test waits until
// the duty has been taken and then times one pulse with $realtime:
//   8 bit: width = d x 4 ns, and the pulse center stays at the same place for
//          every d (symmetric pattern, odd d through the 180 degree modulator)
//   7 bit: width = 2 floor(d/2) x 4 ns
//   d = 0: never high, d = 250: always high for one period
// It also checks the start-of-conversion period (1000 ns, 500 ns with the
// double update) and counts how many pulses used the 180 degree path.
`timescale 1ns/1ps
module tb_dpwm;
  import vr_pkg::*;
  logic clk0 = 0, rst_n = 0;
  wire  clk180 = ~clk0;
  duty_t duty = '0;
  logic [2:0] pw, soc, upd;
  int checks = 0, failures = 0, n_odd = 0, n_even = 0;
  realtime center_ref = -1.0;

  always #2 clk0 = ~clk0;

  dpwm                       dut    (.clk0, .clk180, .rst_n, .duty, .pwm_out(pw[0]), .soc(soc[0]), .upd(upd[0]));
  dpwm #(.HIRES(1'b0))       dut_lo (.clk0, .clk180, .rst_n, .duty, .pwm_out(pw[1]), .soc(soc[1]), .upd(upd[1]));
  dpwm #(.DOUBLE_UPDATE(1'b1)) dut_du (.clk0, .clk180, .rst_n, .duty, .pwm_out(pw[2]), .soc(soc[2]), .upd(upd[2]));

  // start-of-conversion period
  realtime last_soc [3];
  int n_soc [3];
  for (genvar k = 0; k < 3; k++) begin : g_soc
    always @(posedge clk0) if (rst_n && soc[k]) begin
      if (n_soc[k] > 0) begin
        checks++;
        if ($realtime - last_soc[k] != ((k == 2) ? 500.0 : 1000.0)) begin
          failures++; $display("soc period %0t on modulator %0d", $realtime - last_soc[k], k);
        end
      end
      last_soc[k] = $realtime;
      n_soc[k]++;
    end
  end

  task automatic wait_soc(int k, int n);
    repeat (n) begin
      @(posedge clk0);
      while (!soc[k]) @(posedge clk0);
    end
  endtask

  // time one pulse of modulator k that starts after the next start of conversion
  // and ends before the following one (the pulse is centered on a counter-zero instant,
  // so wait for a low level first)
  task automatic pulse(int k, output realtime w, output realtime c);
    realtime tr, tf;
    wait_soc(k, 1);
    wait (pw[k] == 1'b0);
    @(posedge pw[k]); tr = $realtime;
    @(negedge pw[k]); tf = $realtime;
    w = tf - tr;
    c = (tr + tf) / 2.0;
  endtask

  task automatic check_level(int k, logic lvl);
    int bad = 0;
    wait_soc(k, 1);
    repeat (1000) begin #1; if (pw[k] !== lvl) bad++; end
    checks++;
    if (bad != 0) begin failures++; $display("duty %0d on %0d: %0d ns at the wrong level", duty, k, bad); end
  endtask

  task automatic one(int d);
    realtime w, c, ph;
    duty = duty_t'(d);
    wait_soc(0, 3);
    if (d == 0 || d == 250) begin
      check_level(0, d == 250);
      check_level(1, d == 250);
      return;
    end
    // 8 bit
    pulse(0, w, c);
    checks++;
    if (w < d * 4.0 - 0.01 || w > d * 4.0 + 0.01) begin failures++; $display("8 bit d=%0d width %0t", d, w); end
    ph = c - last_soc[0];
    if (ph < 0) ph = ph + 1000.0;
    while (ph >= 1000.0) ph = ph - 1000.0;
    if (center_ref < 0) center_ref = ph;
    checks++;
    if (ph < center_ref - 0.01 || ph > center_ref + 0.01) begin
      failures++; $display("8 bit d=%0d center %0t, expected %0t", d, ph, center_ref);
    end
    if (d % 2) n_odd++; else n_even++;
    // 7 bit (no pulse at all for d < 2)
    if (d < 2) check_level(1, 1'b0);
    else pulse(1, w, c);
    checks++;
    if (w < (d / 2) * 8.0 - 0.01 || w > (d / 2) * 8.0 + 0.01) begin
      if (d > 1) begin failures++; $display("7 bit d=%0d width %0t", d, w); end
    end
    if (d < 2) checks--;
    // double update gives the same widths
    pulse(2, w, c);
    checks++;
    if (w < d * 4.0 - 0.01 || w > d * 4.0 + 0.01) begin failures++; $display("double-update d=%0d width %0t", d, w); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_soc[k]) n_soc[k] = 0;
    repeat (3) @(negedge clk0);
    rst_n = 1;
    one(50); one(51); one(52);
    one(2); one(3); one(1); one(0); one(250); one(249); one(248); one(125); one(126);
    for (int n = 0; n < 40; n++) one(2 + $urandom_range(246));
    if (n_odd == 0 || n_even == 0) begin failures++; $display("odd/even duties not both seen"); end
    $display("pulses through the 180 degree modulator: %0d, through the 0 degree one: %0d; pulse center %0.3f ns after soc", n_odd, n_even, center_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dsp_spi_slave - self-checking test of the DSP settings link.
//
// Checks the reset values, then writes every register address with random
// values from an SPI master running at 10 MHz (mode 0, MSB first, 24-bit
// frames) and compares the whole register file after each write with a copy
// kept here. Frames with 23 or 25 bits and writes to unused addresses must
// change nothing, and wr must pulse once per accepted frame.
`timescale 1ns/1ps
module tb_dsp_spi_slave;
  import vr_pkg::*;
  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, mosi = 0;
  ctrl_params_t prm;
  word_t [2:0] i_ff;
  logic wr;
  int checks = 0, failures = 0, n_wr = 0, n_exp = 0;
  word_t ref_r [16];

  always #4 clk = ~clk;

  dsp_spi_slave dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .prm, .i_ff, .wr);

  always @(posedge clk) if (rst_n && wr) n_wr++;

  task automatic xfer(input logic [31:0] bits, input int n);
    cs_n = 0; #100;
    for (int i = n - 1; i >= 0; i--) begin
      mosi = bits[i]; #50; sclk = 1; #50; sclk = 0;
    end
    #50 cs_n = 1; #200;
  endtask

  task automatic compare();
    word_t got [12];
    got[0] = prm.g_e; got[1] = prm.v_o; got[2] = prm.i_0; got[3] = prm.v3harm;
    got[4] = prm.pos_off; got[5] = prm.neg_off; got[6] = i_ff[0]; got[7] = i_ff[1];
    got[8] = i_ff[2]; got[9] = prm.k_gain; got[10] = prm.k1; got[11] = prm.k2;
    for (int a = 0; a < 12; a++) begin
      checks++;
      if (got[a] != ref_r[a]) begin failures++; $display("reg %0d = %0d, expected %0d", a, got[a], ref_r[a]); end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_r[a]) ref_r[a] = '0;
    ref_r[1] = 2047; ref_r[4] = 4000; ref_r[9] = 1024; ref_r[10] = 3932; ref_r[11] = 4055;
    repeat (3) @(negedge clk);
    rst_n = 1;
    #100;
    compare();
    for (int n = 0; n < 200; n++) begin
      logic [3:0] a;
      word_t v;
      a = 4'($urandom_range(15));
      v = word_t'($urandom);
      if (n % 17 == 5) begin
        xfer({8'h0, a, 2'b00, v}, 23);                  // short frame
      end else if (n % 17 == 11) begin
        xfer({7'h0, a, 2'b00, v, 1'b1}, 25);            // long frame
      end else begin
        xfer({8'h0, a, 2'b00, v}, 24);
        n_exp++;
        if (a < 12) ref_r[a] = v;
      end
      compare();
    end
    checks++;
    if (n_wr != n_exp) begin failures++; $display("%0d write pulses, expected %0d", n_wr, n_exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

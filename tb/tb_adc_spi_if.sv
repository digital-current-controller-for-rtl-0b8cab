// tb_adc_spi_if - self-checking test of the SPI converter interface (C1).
//
// Six converter models share chip select and clock; each gets a random code
// per conversion. For 60 conversions started 1 us apart the test checks that
// every channel's word equals the code its converter sampled, that chip select
// stays low for 14 ADC clocks (448 ns), that valid follows the rising chip
// select within 5 system clocks (the 32 ns interface time) and that exactly
// one valid comes per start of conversion.
`timescale 1ns/1ps
module tb_adc_spi_if;
  import vr_pkg::*;
  localparam int N_CH = 6;
  logic clk = 0, sclk = 0, rst_n = 0, soc = 0;
  logic cs_n, adc_sclk;
  logic [N_CH-1:0] sd;
  logic [N_CH-1:0][11:0] ain, smp;
  realtime ts [N_CH];
  adc_word_t [N_CH-1:0] data;
  logic valid;
  int checks = 0, failures = 0, n_valid = 0;
  realtime t_fall, t_rise;

  always #4  clk  = ~clk;     // 125 MHz
  always #16 sclk = ~sclk;    // 31.25 MHz

  adc_spi_if dut (.clk, .rst_n, .sclk, .soc, .adc_cs_n(cs_n), .adc_sclk, .adc_sdata(sd), .data, .valid);

  for (genvar c = 0; c < N_CH; c++) begin : g_adc
    ad7274_model u_adc (.cs_n, .sclk(adc_sclk), .ain(ain[c]), .sdata(sd[c]), .sample(smp[c]), .t_sample(ts[c]));
  end

  always @(negedge cs_n) t_fall = $realtime;
  always @(posedge cs_n) if (rst_n) begin
    t_rise = $realtime;
    checks++;
    if (t_rise - t_fall != 448.0) begin failures++; $display("chip select low for %0t", t_rise - t_fall); end
  end

  always @(posedge clk) if (rst_n && valid) begin
    n_valid++;
    checks++;
    if ($realtime - t_rise > 40.0) begin failures++; $display("valid %0t after chip select", $realtime - t_rise); end
    for (int c = 0; c < N_CH; c++) begin
      checks++;
      if (data[c] != smp[c]) begin failures++; $display("ch %0d: %h expected %h", c, data[c], smp[c]); end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ain = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      for (int c = 0; c < N_CH; c++) ain[c] = 12'($urandom);
      if (n == 1) ain = '1;
      if (n == 2) ain = '0;
      @(negedge clk) soc = 1;
      @(negedge clk) soc = 0;
      repeat (123) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (n_valid != 60) begin failures++; $display("%0d words for 60 conversions", n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

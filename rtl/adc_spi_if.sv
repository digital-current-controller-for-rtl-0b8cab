// adc_spi_if - SPI interface to AD7274-type 12-bit converters (realization C1).
//
// The PWM's start-of-conversion pulse (system clock domain) is carried into the
// 31.25 MHz ADC clock domain, where it pulls the shared chip select low; the
// converters sample on that falling edge. The interface logic runs on the ADC
// clock itself (a fast clock net of the FPGA) rather than on the system clock.
// Each converter sends two leading zeros and then its 12 bits MSB first,
// changing its output on the falling SCLK edge; the interface shifts the bits
// in on the rising edge, one shift register per channel. After FRAME_CLKS
// clocks (14 x 32 ns = 448 ns) chip select returns high and the words are
// handed to the system clock through two synchronizing flip-flops. The frame
// format is the converter's; the shared chip select and the handshake used to
// cross the clock domains are this design's choices.
//
// Timing: chip select falls 2-3 ADC clocks after soc; valid pulses for one
// system clock about 4 system clocks (32 ns) after chip select rises. data
// holds until the next conversion. Words are in the converter's binary format.
`timescale 1ns/1ps
module adc_spi_if
  import vr_pkg::*;
#(
  parameter int unsigned N_CH       = 6,
  parameter int unsigned FRAME_CLKS = 14
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sclk,
  input  logic                   soc,
  output logic                   adc_cs_n,
  output logic                   adc_sclk,
  input  logic [N_CH-1:0]        adc_sdata,
  output adc_word_t [N_CH-1:0]   data,
  output logic                   valid
);
  localparam int unsigned BW = $clog2(FRAME_CLKS);

  logic                 soc_a;          // soc in the ADC clock domain
  logic                 busy, last;
  logic [BW-1:0]        bitcnt;
  adc_word_t [N_CH-1:0] sh;

  assign adc_sclk = sclk;
  assign last     = busy && (bitcnt == BW'(FRAME_CLKS - 1));

  cdc_word_sync #(.WIDTH(1)) u_soc_sync (
    .src_clk(clk), .src_rst_n(rst_n), .src_valid(soc), .src_data(1'b1),
    .dst_clk(sclk), .dst_rst_n(rst_n), .dst_valid(soc_a), .dst_data()
  );

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      adc_cs_n <= 1'b1;
      busy     <= 1'b0;
      bitcnt   <= '0;
      sh       <= '0;
    end else begin
      if (!busy) begin
        if (soc_a) begin
          adc_cs_n <= 1'b0;          // conversion starts here
          busy     <= 1'b1;
          bitcnt   <= '0;
        end
      end else if (last) begin
        adc_cs_n <= 1'b1;            // words are handed over on this edge
        busy     <= 1'b0;
      end else begin
        for (int c = 0; c < N_CH; c++) sh[c] <= {sh[c][ADC_BITS-2:0], adc_sdata[c]};
        bitcnt <= bitcnt + 1'b1;
      end
    end
  end

  cdc_word_sync #(.WIDTH(N_CH*ADC_BITS)) u_data_sync (
    .src_clk(sclk), .src_rst_n(rst_n), .src_valid(last), .src_data(sh),
    .dst_clk(clk), .dst_rst_n(rst_n), .dst_valid(valid), .dst_data(data)
  );
endmodule

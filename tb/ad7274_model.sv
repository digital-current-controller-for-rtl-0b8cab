// ad7274_model - behavioural model of an AD7274-type 12-bit SPI A/D converter
// (testbench only, not synthesizable).
//
// The "analog" input is given as the 12-bit code the converter would produce.
// The input is sampled on the falling edge of cs_n. The output then shows a
// leading zero, and each falling sclk edge while cs_n is low moves to the next
// bit of the sequence 0, 0, D11 .. D0, 0, 0. With cs_n high the output is 0
// (the real part's output is then high impedance). sample and t_sample
// report the last conversion.
`timescale 1ns/1ps
module ad7274_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic [11:0] ain,
  output logic        sdata,
  output logic [11:0] sample,
  output realtime     t_sample
);
  logic [15:0] frame_bits;
  int          pos;

  initial begin sdata = 1'b0; sample = '0; t_sample = 0; pos = 0; frame_bits = '0; end

  always @(negedge cs_n) begin
    sample     = ain;
    t_sample   = $realtime;
    frame_bits = {2'b00, ain, 2'b00};
    pos        = 15;
    sdata      = frame_bits[pos];
  end

  always @(posedge cs_n) sdata = 1'b0;

  always @(negedge sclk) begin
    if (!cs_n && pos > 0) begin
      pos   = pos - 1;
      sdata = frame_bits[pos];
    end
  end
endmodule

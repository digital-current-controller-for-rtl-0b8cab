// ads5240_model - behavioural model of ADS5240-type serial LVDS A/D converters
// (testbench only, not synthesizable).
//
// N_CH channels convert continuously at 25 MSa/s (one word every 40 ns). Each
// word is sent MSB first as 12 bits of 3.333 ns, two bits per period of the
// bit clock lclk: a bit is centered on a rising lclk edge, the next on the
// falling edge. frame is high during the first six bits of a word. With
// ODD_START the words start on a falling-edge bit instead of a rising-edge
// one. The code sampled at the start of word w is sent in word w + LAT.
// The "analog" input is the 12-bit code itself. sent and sent_vld report the
// word that has just started to go out on the lines, and its sample time.
`timescale 1ns/1ps
module ads5240_model #(
  parameter int N_CH      = 6,
  parameter int LAT       = 6,
  parameter bit ODD_START = 1'b0
) (
  input  logic [N_CH-1:0][11:0] ain,
  output logic                  lclk,
  output logic                  frame,
  output logic [N_CH-1:0]       dout,
  output logic [N_CH-1:0][11:0] sent,
  output realtime               sent_t,
  output int                    sent_cnt
);
  localparam realtime HALF_BIT = 40.0 / 24.0;   // ns
  logic [N_CH-1:0][11:0] pipe [0:15];
  realtime               tpipe [0:15];
  logic [N_CH-1:0][11:0] cur;
  longint b;      // global bit counter
  int     wb;     // bit within word

  initial begin
    lclk = 1'b0; frame = 1'b0; dout = '0; sent = '0; sent_t = 0; sent_cnt = 0; cur = '0;
    for (int i = 0; i < 16; i++) begin pipe[i] = '0; tpipe[i] = 0; end
    b = 0;
    forever begin
      // data change, half a bit before the clock edge that samples it
      wb = int'((b + (ODD_START ? 11 : 0)) % 12);
      if (wb == 0) begin
        for (int i = 15; i > 0; i--) begin pipe[i] = pipe[i-1]; tpipe[i] = tpipe[i-1]; end
        pipe[0]  = ain;
        tpipe[0] = $realtime;
        cur      = pipe[LAT];
        sent     = pipe[LAT];
        sent_t   = tpipe[LAT];
        sent_cnt = sent_cnt + 1;
      end
      frame = (wb < 6);
      for (int c = 0; c < N_CH; c++) dout[c] = cur[c][11 - wb];
      #(HALF_BIT);
      lclk = (b % 2 == 0);    // rising edge centered on even bits
      #(HALF_BIT);
      b = b + 1;
    end
  end
endmodule

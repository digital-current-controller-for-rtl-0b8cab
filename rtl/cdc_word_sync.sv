// cdc_word_sync - carries a word and its strobe from one clock domain to another.
//
// On src_valid the word is held in a source register and a toggle flips. The
// toggle passes two synchronizing flip-flops in the destination domain; a
// change of the synchronized toggle loads the held word into the destination
// register and raises dst_valid for one destination cycle. The held word is
// stable for as long as the toggle takes to cross, so only the toggle needs
// synchronizing. Strobes must be further apart than about three destination
// cycles. Latency: 3 to 4 destination cycles. Used for the start-of-conversion
// pulse, the ADC words and the duties; the two flip-flop synchronizer follows
// the ADC data path of the document, the toggle handshake is this design's choice.
`timescale 1ns/1ps
module cdc_word_sync #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             src_clk,
  input  logic             src_rst_n,
  input  logic             src_valid,
  input  logic [WIDTH-1:0] src_data,
  input  logic             dst_clk,
  input  logic             dst_rst_n,
  output logic             dst_valid,
  output logic [WIDTH-1:0] dst_data
);
  logic [WIDTH-1:0] hold;
  logic             tgl;
  logic [2:0]       sync;   // two synchronizers and one edge-detect stage

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold <= '0;
      tgl  <= 1'b0;
    end else if (src_valid) begin
      hold <= src_data;
      tgl  <= ~tgl;
    end
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      sync      <= '0;
      dst_valid <= 1'b0;
      dst_data  <= '0;
    end else begin
      sync      <= {sync[1:0], tgl};
      dst_valid <= sync[2] ^ sync[1];
      if (sync[2] ^ sync[1]) dst_data <= hold;
    end
  end
endmodule

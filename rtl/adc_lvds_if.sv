// adc_lvds_if - serial LVDS interface to ADS5240-type converters (realization C2).
//
// The converters send each 12-bit word serially at six times the sample rate
// on both edges of a bit clock (25 MSa/s -> 300 Mbit/s per channel), together
// with a frame clock that is high for the first six bits of a word. The bit
// clock and its inverse, clk0 and clk180, sample every data line and the frame
// line in a DDR input register pair. Each of the two samples streams fills its
// own six-stage flip-flop cascade. In each clock domain the rising edge of the
// frame marks the first of six bits of that domain, and ena0 / ena180 copy the
// cascades into parallel registers once they hold six new bits. The word may
// start on a clk0 or on a clk180 sample; ena_mux records which, and the data
// multiplexer interleaves the two halves in the right order into the output
// register (clk0, one clock after ena0). This structure follows the document's
// figure of the interface; the frame polarity, the MSB-first order and the way
// ena_mux is derived are this design's choices.
//
// The words (one every 40 ns) cross into the system clock through two
// synchronizing flip-flops and appear on word / word_valid. The converter runs
// continuously, so the word that belongs to a start of conversion is chosen by
// counting: the PICK_WORD-th word completed after soc is put on data with a
// one-cycle valid. Words are in the converter's binary format.
`timescale 1ns/1ps
module adc_lvds_if
  import vr_pkg::*;
#(
  parameter int unsigned N_CH      = 6,
  parameter int unsigned PICK_WORD = 7
) (
  input  logic                 clk0,
  input  logic                 clk180,
  input  logic                 frame,
  input  logic [N_CH-1:0]      sdata,
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 soc,
  output adc_word_t [N_CH-1:0] word,
  output logic                 word_valid,
  output adc_word_t [N_CH-1:0] data,
  output logic                 valid
);
  localparam int unsigned HB = ADC_BITS / 2;   // bits per clock edge

  // ---------------- clk0 side
  logic [N_CH-1:0]          iob0;
  logic [N_CH-1:0][HB-1:0]  sh0, cap0;
  logic [2:0]               f0;
  logic [2:0]               cnt0;
  logic                     ena0, ena0_q, ena_mux;
  // ---------------- clk180 side
  logic [N_CH-1:0]          iob180;
  logic [N_CH-1:0][HB-1:0]  sh180, cap180;
  logic [2:0]               f180;
  logic [2:0]               cnt180;
  logic                     ena180;
  // ---------------- output register
  adc_word_t [N_CH-1:0]     out_reg;
  logic                     out_vld;

  logic rise0, rise180;
  assign rise0   = f0[1]   & ~f0[2];
  assign rise180 = f180[1] & ~f180[2];
  assign ena0    = (cnt0 == 3'd5);
  assign ena180  = (cnt180 == 3'd5);

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) begin
      iob0 <= '0; sh0 <= '0; cap0 <= '0; f0 <= '0; cnt0 <= 3'd7;
      ena0_q <= 1'b0; ena_mux <= 1'b0;
    end else begin
      iob0 <= sdata;
      f0   <= {f0[1:0], frame};
      for (int c = 0; c < N_CH; c++) sh0[c] <= {sh0[c][HB-2:0], iob0[c]};
      if (rise0) begin
        cnt0    <= 3'd1;
        // the word started one half clock earlier if the clk180 side already
        // saw the frame high at its sample just before this one
        ena_mux <= f180[2];
      end else if (cnt0 != 3'd7) begin
        cnt0 <= cnt0 + 3'd1;
      end
      if (ena0) cap0 <= sh0;
      ena0_q <= ena0;
    end
  end

  always_ff @(posedge clk180 or negedge rst_n) begin
    if (!rst_n) begin
      iob180 <= '0; sh180 <= '0; cap180 <= '0; f180 <= '0; cnt180 <= 3'd7;
    end else begin
      iob180 <= sdata;
      f180   <= {f180[1:0], frame};
      for (int c = 0; c < N_CH; c++) sh180[c] <= {sh180[c][HB-2:0], iob180[c]};
      if (rise180)             cnt180 <= 3'd1;
      else if (cnt180 != 3'd7) cnt180 <= cnt180 + 3'd1;
      if (ena180) cap180 <= sh180;
    end
  end

  // data multiplexer and output register
  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) begin
      out_reg <= '0;
      out_vld <= 1'b0;
    end else begin
      out_vld <= ena0_q;
      if (ena0_q) begin
        for (int c = 0; c < N_CH; c++) begin
          for (int i = 0; i < HB; i++) begin
            out_reg[c][2*i+1] <= ena_mux ? cap180[c][i] : cap0[c][i];
            out_reg[c][2*i]   <= ena_mux ? cap0[c][i]   : cap180[c][i];
          end
        end
      end
    end
  end

  cdc_word_sync #(.WIDTH(N_CH*ADC_BITS)) u_sync (
    .src_clk(clk0), .src_rst_n(rst_n), .src_valid(out_vld), .src_data(out_reg),
    .dst_clk(clk), .dst_rst_n(rst_n), .dst_valid(word_valid), .dst_data(word)
  );

  // choose the word that belongs to the start of conversion
  logic       armed;
  logic [3:0] wcnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0; wcnt <= '0; data <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (soc) begin
        armed <= 1'b1;
        wcnt  <= '0;
      end else if (armed && word_valid) begin
        if (wcnt == 4'(PICK_WORD - 1)) begin
          data  <= word;
          valid <= 1'b1;
          armed <= 1'b0;
        end
        wcnt <= wcnt + 4'd1;
      end
    end
  end
endmodule

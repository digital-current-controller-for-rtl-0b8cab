// dsp_spi_slave - write-only SPI slave for the settings sent by the voltage-controller DSP.
//
// The slower output-voltage and voltage-symmetry controllers run on a DSP that
// sends their results (conductance g_e, zero-sequence component i_0) and the
// other controller settings over SPI. The slave oversamples the SPI lines with
// the system clock: each line passes two synchronizing flip-flops, a rising
// SCLK edge while CS_N is low shifts MOSI in (MSB first, SPI mode 0), and a
// rising CS_N after exactly FRAME_BITS bits writes the register file.
// Frame: [23:20] address, [19:18] unused, [17:0] value.
//   0 g_e  1 v_o  2 i_0  3 v3harm  4 POS_OFFSET  5 NEG_OFFSET
//   6..8 I_ff of phases 1..3   9 K   10 k1   11 k2
// Only the fact that an SPI link carries these values is from the document; the
// frame, the register map and the reset values are this design's choices.
// Reset values: g_e 0, v_o 2047, POS_OFFSET CTRL_FULL (full duty), gains of the
// prototype (K 0.25, k1 0.96, k2 0.99 in Q6.12), all others 0.
// SCLK must be slower than a quarter of the system clock. wr pulses for one
// cycle with each write; the new value is visible in the same cycle.
`timescale 1ns/1ps
module dsp_spi_slave
  import vr_pkg::*;
#(
  parameter int unsigned FRAME_BITS = 24,
  parameter int unsigned N_PH       = 3,
  parameter int unsigned CTRL_FULL  = 4000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sclk,
  input  logic                cs_n,
  input  logic                mosi,
  output ctrl_params_t        prm,
  output word_t [N_PH-1:0]    i_ff,
  output logic                wr
);
  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  logic [FRAME_BITS-1:0] sh;
  logic [$clog2(FRAME_BITS+1)-1:0] nbits;

  logic [3:0] addr;
  word_t      val;
  assign addr = sh[FRAME_BITS-1 -: 4];
  assign val  = word_t'(sh[W-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; mosi_s <= '0; sh <= '0; nbits <= '0; wr <= 1'b0;
      prm <= '{g_e: '0, v_o: word_t'(2047), i_0: '0, v3harm: '0,
               pos_off: word_t'(CTRL_FULL), neg_off: '0,
               k_gain: K_DEFAULT, k1: K1_DEFAULT, k2: K2_DEFAULT};
      i_ff <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
      wr     <= 1'b0;
      if (cs_s[1]) begin
        if (!cs_s[2] && nbits == ($clog2(FRAME_BITS+1))'(FRAME_BITS)) begin
          wr <= 1'b1;
          unique case (addr)
            4'd0:  prm.g_e     <= val;
            4'd1:  prm.v_o     <= val;
            4'd2:  prm.i_0     <= val;
            4'd3:  prm.v3harm  <= val;
            4'd4:  prm.pos_off <= val;
            4'd5:  prm.neg_off <= val;
            4'd9:  prm.k_gain  <= val;
            4'd10: prm.k1      <= val;
            4'd11: prm.k2      <= val;
            default: begin
              for (int p = 0; p < N_PH; p++)
                if (addr == 4'(6 + p)) i_ff[p] <= val;
            end
          endcase
        end
        nbits <= '0;
      end else if (sclk_s[1] && !sclk_s[2]) begin
        sh    <= {sh[FRAME_BITS-2:0], mosi_s[1]};
        if (nbits != '1) nbits <= nbits + 1'b1;
      end
    end
  end
endmodule

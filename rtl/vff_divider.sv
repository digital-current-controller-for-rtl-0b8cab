// vff_divider - voltage feedforward d_ff = (u_N - v3harm) * SCALE / v_o.
//
// The feedforward of the current controller needs the measured phase voltage
// divided by the output voltage. The divider is sequential: after the operands
// are registered, the difference is formed, its magnitude is multiplied by
// SCALE (2 x the controller's full duty of 4000, so that u_N = v_o/2 gives a full duty), and a
// restoring divider produces QBITS quotient bits, one per clock, most
// significant first. The sign is applied at the (combinational) output. A quotient that would not
// fit in QBITS bits, or a v_o that is not positive, gives the largest
// magnitude. The document only shows a divider symbol; this implementation is
// this design's choice.
//
// Interface: pulse start with the operands valid (they are registered at
// once). done pulses and d_ff is valid QBITS+2 cycles after the start cycle
// (14 cycles by default); d_ff holds until two cycles after the next start.
`timescale 1ns/1ps
module vff_divider
  import vr_pkg::*;
#(
  parameter int unsigned QBITS = 12,
  parameter int unsigned SCALE = 8000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t u_n,
  input  word_t v3,
  input  word_t v_o,
  output word_t d_ff,
  output logic  done
);
  localparam int unsigned NW = 32;   // numerator width, |diff| * SCALE < 2^29
  typedef enum logic [1:0] {IDLE, SCALE_ST, DIV} state_e;

  state_e            st;
  logic signed [W:0] diff;           // 19-bit difference
  logic              neg;
  logic [NW-1:0]     rem;
  logic [NW-1:0]     den;
  logic [QBITS-1:0]  q;
  logic [$clog2(QBITS+1)-1:0] idx;
  logic              ovf;

  logic [NW-1:0] den_sh;
  logic [W:0]    mag;                // |diff|
  logic [NW-1:0] num;                // |diff| * SCALE
  assign den_sh = den << idx;
  assign mag    = diff[W] ? -diff : diff;
  assign num    = NW'(mag) * NW'(SCALE);

  word_t q_mag;
  assign q_mag = ovf ? word_t'({QBITS{1'b1}}) : word_t'(q);
  assign d_ff  = neg ? -q_mag : q_mag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; diff <= '0; neg <= 1'b0; rem <= '0; den <= '0; q <= '0;
      idx <= '0; ovf <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          diff <= (W+1)'(u_n) - (W+1)'(v3);
          den  <= (v_o > 0) ? NW'(unsigned'(v_o)) : '0;
          st   <= SCALE_ST;
        end
        SCALE_ST: begin
          neg <= diff[W];
          rem <= num;
          // the quotient fits QBITS bits only if num < den << QBITS
          ovf <= (den == '0) || (num >= (den << QBITS));
          idx <= ($clog2(QBITS+1))'(QBITS - 1);
          q   <= '0;
          st  <= DIV;
        end
        DIV: begin
          if (rem >= den_sh) begin
            rem    <= rem - den_sh;
            q[idx] <= 1'b1;
          end
          if (idx == 0) begin
            st   <= IDLE;
            done <= 1'b1;
          end else begin
            idx <= idx - 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule

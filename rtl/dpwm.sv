// dpwm - high-resolution center-aligned digital PWM (8 bit at 1 MHz).
//
// A 250 MHz counter/comparator can place edges only every 8 ns in a
// center-aligned pattern (both edges move). Two identical modulators run from
// clocks 180 degrees apart; the upper duty bits d[7:1] drive both, and d[0]
// selects which modulator reaches the output through a 2:1 multiplexer. The
// 180 degree modulator compares with d+1 while counting down, so its pulse is
// 4 ns longer and still centered: the output pulse is d x 4 ns for any d in
// 0..250. The multiplexer has no register (the modulator outputs are
// registered in their own clock domains), as in the document; in silicon its
// inputs are asynchronous to each other and their paths must be matched by
// placement, and a short glitch may occur when the selection changes.
//
// The duty is taken when the 0 degree counter turns round at zero (the middle
// of the high pulse, which is also where the phase current equals its average)
// and, with DOUBLE_UPDATE, also at the top. soc marks these instants (clk0
// domain, one clk0 cycle) to start the A/D conversion. The 180 degree modulator
// takes the same value half a clock later from the 0 degree modulator's
// register. With HIRES = 0 only the 0 degree modulator is built and d[0] is
// ignored (7-bit resolution, 8 ns steps).
//
// The select bit d[0] is captured at the update and applied to the
// multiplexer one clk0 cycle later, when both modulator outputs already show
// the new pattern. The reset is released synchronously: two flip-flops on clk0,
// then one on clk180 fed from the clk0 side, so the 180 degree counter always
// starts half a clock after the 0 degree one (this design's choice; the
// document gives no reset scheme).
//
// duty must be stable around the update instant (it is written from a
// clock-domain crossing register in the clk0 domain). Structure, the d+1 rule
// and the unregistered multiplexer follow the document; the counter law
// (2 clocks per count, see pwm_modulator), update timing, reset and the
// soc output are this design's choices.
`timescale 1ns/1ps
module dpwm
  import vr_pkg::*;
#(
  parameter int unsigned CNT_MAX       = 125,
  parameter bit          HIRES         = 1'b1,
  parameter bit          DOUBLE_UPDATE = 1'b0
) (
  input  logic  clk0,
  input  logic  clk180,
  input  logic  rst_n,
  input  duty_t duty,
  output logic  pwm_out,
  output logic  soc,
  output logic  upd
);
  localparam int unsigned CW = $clog2(CNT_MAX + 2);

  logic [CW-1:0] cmp0;
  logic          pwm0, upd_zero, upd_max;
  logic          sel;
  logic [1:0]    rst0_s;
  logic          rst0_n, rst180_n;

  // Reset leaves the clk0 domain through two flip-flops and reaches the clk180
  // domain half a clock later, so the 180 degree counter always lags by half a
  // clock and the odd-duty pulses stay centered.
  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) rst0_s <= '0;
    else        rst0_s <= {rst0_s[0], 1'b1};
  end
  assign rst0_n = rst0_s[1];
  always_ff @(posedge clk180 or negedge rst_n) begin
    if (!rst_n) rst180_n <= 1'b0;
    else        rst180_n <= rst0_n;
  end

  pwm_modulator #(.CNT_MAX(CNT_MAX), .ADAPT(1'b0), .LOAD_AT_MAX(DOUBLE_UPDATE)) u_mod0 (
    .clk(clk0), .rst_n(rst0_n), .d(CW'(duty[DUTY_BITS-1:1])), .cmp(cmp0), .pwm(pwm0),
    .upd_zero, .upd_max
  );

  assign upd = rst0_n && (upd_zero || (DOUBLE_UPDATE && upd_max));
  assign soc = upd;

  generate
    if (HIRES) begin : g_hires
      logic          pwm180;
      logic          sel_nxt, upd_q;
      pwm_modulator #(.CNT_MAX(CNT_MAX), .ADAPT(1'b1), .LOAD_AT_MAX(DOUBLE_UPDATE)) u_mod180 (
        .clk(clk180), .rst_n(rst180_n), .d(cmp0), .pwm(pwm180),
        .cmp(), .upd_zero(), .upd_max()
      );
      // The selection is taken with the update and applied one clock later,
      // when the registered modulator outputs first show the new compare value.
      always_ff @(posedge clk0 or negedge rst0_n) begin
        if (!rst0_n) begin
          sel_nxt <= 1'b0;
          upd_q   <= 1'b0;
          sel     <= 1'b0;
        end else begin
          upd_q <= upd;
          if (upd)   sel_nxt <= duty[0];
          if (upd_q) sel     <= sel_nxt;
        end
      end
      // 2:1 multiplexer without register
      assign pwm_out = sel ? pwm180 : pwm0;
    end else begin : g_lores
      assign sel     = 1'b0;
      assign pwm_out = pwm0;
    end
  endgenerate
endmodule

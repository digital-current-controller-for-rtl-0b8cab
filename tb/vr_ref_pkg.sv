// vr_ref_pkg - reference model of one phase's control law, for testbenches.
//
// Integer arithmetic with explicit floors and saturation, written apart from
// the RTL: two's complement samples from binary offset, i_ref = g_e u_N / 4096,
// the P+lag recursion, the feedforward quotient and the clamped duties
// (clamped at 4000 in sixteenths of a PWM step, then cut to whole steps).
`timescale 1ns/1ps
package vr_ref_pkg;
  import vr_pkg::*;

  function automatic longint sat18(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  function automatic longint fl12(longint v);
    longint q = v / 4096;
    if ((v % 4096 != 0) && (v < 0)) q = q - 1;
    return q;
  endfunction

  function automatic longint clampd(longint v, longint full);
    if (v < 0) return 0;
    if (v > full) return full;
    return v;
  endfunction

  class phase_model;
    longint e_prev = 0, u_prev = 0;
    longint full = 4000;          // controller duty full scale (16 per PWM step)

    function void step(input int i_raw, input int u_raw, input ctrl_params_t p, input longint iffv,
                       output longint dp, output longint dn);
      longint im, un, iref, e, u, diff, mag, q, dff;
      im   = longint'(i_raw) - 2048;
      un   = longint'(u_raw) - 2048;
      iref = sat18(fl12(un * longint'(p.g_e)));
      e    = sat18(iref - im);
      u    = sat18(sat18(fl12(sat18(e - sat18(fl12(e_prev * longint'(p.k1)))) * longint'(p.k_gain)))
                   + sat18(fl12(u_prev * longint'(p.k2))));
      e_prev = e; u_prev = u;
      diff = un - longint'(p.v3harm);
      mag  = (diff < 0) ? -diff : diff;
      if (p.v_o <= 0 || mag * 2 * full >= longint'(p.v_o) * 4096) q = 4095;
      else q = mag * 2 * full / longint'(p.v_o);
      dff = (diff < 0) ? -q : q;
      dp = clampd(u + longint'(p.i_0) - dff + longint'(p.pos_off) - iffv, full) / 16;
      dn = clampd(u + longint'(p.i_0) - dff + longint'(p.neg_off) + iffv, full) / 16;
    endfunction
  endclass
endpackage

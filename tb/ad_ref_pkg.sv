// ad_ref_pkg -- reference model of one Attack/Decay interval step, used by the
// testbenches to predict the controller's frequency and decision.
//
// Written from the algorithm description, not from the RTL: the Q16 constants
// are derived here with real arithmetic, and the frequency is kept as MHz with
// 6 fraction bits (the RTL's documented format) so the comparison is exact.
`timescale 1ns / 1ps
package ad_ref_pkg;
  import mcd_dvfs_pkg::*;

  typedef struct {
    longint unsigned f;       // MHz * 64
    longint unsigned u_prev;
    longint unsigned c_prev;
    int unsigned     lo, hi;  // endstop counts
  } ad_state_t;

  typedef struct {
    real dev, react, decay, pdt;  // fractions, e.g. 0.0175
    int unsigned endstop;
  } ad_cfg_t;

  function automatic ad_cfg_t default_cfg();
    ad_cfg_t c;
    c.dev = 0.0175; c.react = 0.06; c.decay = 0.00175; c.pdt = 0.025; c.endstop = 10;
    return c;
  endfunction

  function automatic ad_state_t reset_state();
    ad_state_t s;
    s.f = 64000; s.u_prev = 0; s.c_prev = 0; s.lo = 0; s.hi = 0;
    return s;
  endfunction

  function automatic longint unsigned q16(real x);
    return longint'($floor(x * 65536.0 + 0.5));
  endfunction

  // One interval: returns the decision; updates s.
  function automatic ad_mode_e step(ref ad_state_t s, input ad_cfg_t cfg,
                                    input longint unsigned u, input longint unsigned c);
    ad_mode_e m;
    longint unsigned thr_u, thr_c, k, nf;
    bit ipc_drop;
    thr_u = (s.u_prev * q16(cfg.dev)) >> 16;
    thr_c = (s.c_prev * q16(cfg.pdt)) >> 16;
    ipc_drop = (c > s.c_prev) && (c - s.c_prev > thr_c);
    if (s.hi == cfg.endstop)                            m = AD_FORCE_DOWN;
    else if (s.lo == cfg.endstop)                       m = AD_FORCE_UP;
    else if (u > s.u_prev && u - s.u_prev > thr_u)      m = AD_ATTACK_UP;
    else if (s.u_prev > u && s.u_prev - u > thr_u && !ipc_drop) m = AD_ATTACK_DOWN;
    else if (!ipc_drop)                                 m = AD_DECAY;
    else                                                m = AD_HOLD;
    case (m)
      AD_ATTACK_UP, AD_FORCE_UP:     k = q16(1.0 / (1.0 - cfg.react));
      AD_ATTACK_DOWN, AD_FORCE_DOWN: k = q16(1.0 / (1.0 + cfg.react));
      AD_DECAY:                      k = q16(1.0 / (1.0 + cfg.decay));
      default:                       k = 65536;
    endcase
    nf = (s.f * k) >> 16;
    if (nf > 64000) nf = 64000;
    if (nf < 16000) nf = 16000;
    s.f = nf;
    s.lo = (nf == 16000 && s.lo != cfg.endstop) ? s.lo + 1 : 0;
    s.hi = (nf == 64000 && s.hi != cfg.endstop) ? s.hi + 1 : 0;
    s.u_prev = u;
    s.c_prev = c;
    return m;
  endfunction

endpackage

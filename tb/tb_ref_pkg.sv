// Reference arithmetic for the testbenches, written independently of the RTL:
// channel widening by multiplication and shifts, BT.601 intensity, the
// greyscale band ladder (thresholds 64, 112, 160, 208) and the RGB332 grey
// shades.
package tb_ref_pkg;

  function automatic int ref_luma(input int p);
    int r3, g3, b2, r8, g8, b8;
    r3 = (p >> 5) & 7;
    g3 = (p >> 2) & 7;
    b2 = p & 3;
    r8 = r3 * 32 + r3 * 4 + r3 / 2;
    g8 = g3 * 32 + g3 * 4 + g3 / 2;
    b8 = b2 * 85;
    return (77 * r8 + 150 * g8 + 29 * b8) / 256;
  endfunction

  function automatic int ref_grey(input int p);
    int y, band, lvl;
    y    = ref_luma(p);
    band = (y >= 64) + (y >= 112) + (y >= 160) + (y >= 208);
    lvl  = band * 7 / 4;
    return lvl * 32 + lvl * 4 + lvl / 2;
  endfunction

  function automatic int ref_bw(input int p, input int thr);
    return (ref_luma(p) >= thr) ? 255 : 0;
  endfunction

endpackage

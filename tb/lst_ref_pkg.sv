// lst_ref_pkg: reference model of the split-window LST for the testbenches.
//
// The model evaluates the formulas in double precision, independently of the
// fixed-point arithmetic of the RTL, and compares a hardware result with the
// ideal value rounded to nearest and clamped to the output range. Where the
// ideal value lies within 0.01 of a rounding tie, either neighbour is accepted,
// since the fixed-point constants may fall on either side of the tie.
// All values are in kelvin x10; inputs use the engine's pixel formats
// (T4/T5 kelvin x10, W g/cm^2 x1000, epsilon x1000).
package lst_ref_pkg;

  // LST1 = T4 + 1.40 d + 0.32 d^2 + 0.83 (kelvin), d = T4 - T5; result x10.
  function automatic real lst1_ideal(logic [15:0] t4, logic [15:0] t5);
    real k4, d;
    k4 = real'(t4) / 10.0;
    d  = (real'(t4) - real'(t5)) / 10.0;
    return 10.0 * (k4 + 1.40 * d + 0.32 * d * d + 0.83);
  endfunction

  // LST2 = (57 - 5W)(1 - eps) - (161 - 30W)*0.005 (kelvin); result x10.
  function automatic real lst2_ideal(logic [15:0] w, logic [15:0] e);
    real wv, ev;
    wv = real'(w) / 1000.0;
    ev = real'(e) / 1000.0;
    return 10.0 * ((57.0 - 5.0 * wv) * (1.0 - ev) - (161.0 - 30.0 * wv) * 0.005);
  endfunction

  function automatic longint clampl(longint v, longint lo, longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // True when got is an acceptable rounding of ideal clamped to [lo, hi].
  function automatic bit part_ok(longint got, real ideal, longint lo, longint hi);
    real    fl, fr;
    longint r;
    fl = $floor(ideal);
    fr = ideal - fl;
    r  = longint'(fl) + ((fr >= 0.5) ? 1 : 0);
    if (got == clampl(r, lo, hi)) return 1'b1;
    if (fr > 0.49 && fr < 0.51)
      return (got == clampl(longint'(fl), lo, hi)) || (got == clampl(longint'(fl) + 1, lo, hi));
    return 1'b0;
  endfunction

  // Expected saturation flag of a part.
  function automatic bit saturates(real ideal, longint lo, longint hi);
    return (ideal < real'(lo) - 0.5) || (ideal >= real'(hi) + 0.5);
  endfunction

  // A realistic pixel of the AVHRR scene: cloud-free land in summer.
  typedef struct packed {
    logic [15:0] t4;
    logic [15:0] t5;
    logic [15:0] w;
    logic [15:0] eps;
  } pixel_t;

  function automatic pixel_t random_pixel();
    pixel_t p;
    int unsigned t4;
    t4    = 2600 + $urandom_range(0, 700);        // 260.0 .. 330.0 K
    p.t4  = 16'(t4);
    p.t5  = 16'(t4 + 30 - $urandom_range(0, 150)); // T4-T5 in -3.0 .. 12.0 K
    p.w   = 16'($urandom_range(0, 6000));          // 0 .. 6 g/cm^2
    p.eps = 16'($urandom_range(900, 999));         // 0.900 .. 0.999
    return p;
  endfunction

  // True when got is the sum, modulo 2^16 as in the engine, of an acceptable
  // LST1 and an acceptable LST2 for the pixel.
  function automatic bit lst_matches(pixel_t p, logic [15:0] got);
    real i1, i2;
    longint r1, r2, e1, e2;
    longint c1 [$];
    longint c2 [$];
    i1 = lst1_ideal(p.t4, p.t5);
    i2 = lst2_ideal(p.w, p.eps);
    r1 = longint'($floor(i1));
    r2 = longint'($floor(i2));
    for (longint k = -1; k <= 2; k++) begin
      e1 = clampl(r1 + k, 0, 65535);
      e2 = clampl(r2 + k, -32768, 32767);
      if (part_ok(e1, i1, 0, 65535))      c1.push_back(e1);
      if (part_ok(e2, i2, -32768, 32767)) c2.push_back(e2);
    end
    foreach (c1[m]) foreach (c2[n]) begin
      e1 = c1[m];
      e2 = c2[n];
      if (16'(e1 + e2) == got) return 1'b1;
    end
    return 1'b0;
  endfunction

endpackage

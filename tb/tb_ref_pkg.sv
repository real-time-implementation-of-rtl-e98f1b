// tb_ref_pkg: reference arithmetic for the testbenches, written apart from
// the design's helpers. Rounding is computed through real arithmetic (exact
// for the magnitudes used here): floor, then the fraction decides, ties go to
// the even neighbour.
package tb_ref_pkg;

  function automatic longint ref_rne(input longint v, input int sh);
    real    r;
    real    fl;
    real    fr;
    longint f;
    if (sh <= 0) return v * (longint'(1) << (-sh));
    r  = real'(v) / (2.0 ** sh);
    fl = $floor(r);
    f  = longint'($rtoi(fl));
    fr = r - fl;
    if (fr > 0.5) return f + 1;
    if (fr < 0.5) return f;
    return (f % 2 == 0) ? f : f + 1;
  endfunction

  function automatic longint ref_sat(input longint v, input int w);
    longint mx;
    mx = (longint'(1) << (w - 1)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

endpackage

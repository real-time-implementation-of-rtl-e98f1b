// ml_eq_pkg: number formats, sample types and shared arithmetic helpers of
// the model-based ML equalizer.
//
// All signals are two's-complement fixed point. A dual-polarization sample
// (dp_t) holds two complex values, index 0 for the X and index 1 for the Y
// polarization, each with a real (I) and imaginary (Q) part of DW bits, DF of
// them fractional. Filter coefficients are CW bits with CF fractional bits:
// 18 bits, the multiplier input width that the FPGA DSP slices favour.
// Matched-filter outputs (symbols) keep SF fractional bits in SW bits so that
// the loss stage performs the wordlength reduction.
//
// Every wordlength reduction uses rne_shift(), an unbiased round-half-to-even
// right shift, as the design prescribes for the whole backward path. The
// biased round-half-up variant is kept as rhu_shift() for comparison only.
// The widths themselves are this design's own choice: none are given for the
// original equalizer apart from the 18-bit multiplier argument.
package ml_eq_pkg;

  parameter int DW   = 16;   // sample width
  parameter int DF   = 12;   // sample fraction bits
  parameter int CW   = 18;   // coefficient width
  parameter int CF   = 15;   // coefficient fraction bits
  parameter int SW   = 20;   // matched-filter output (symbol) width
  parameter int SF   = 16;   // symbol fraction bits
  parameter int GW   = 44;   // gradient contribution width (fraction 2*DF)
  parameter int PHW  = 10;   // Kerr phase code width, LSB = 2^-PHW rad
  parameter int LW   = 16;   // cos/sin table width
  parameter int LF   = 14;   // cos/sin table fraction bits

  typedef logic signed [DW-1:0] samp_t;
  typedef struct packed {
    samp_t re;
    samp_t im;
  } cplx_t;
  typedef cplx_t [1:0] dp_t;          // [0] = X pol, [1] = Y pol

  typedef logic signed [SW-1:0] ssamp_t;
  typedef struct packed {
    ssamp_t re;
    ssamp_t im;
  } scplx_t;
  typedef scplx_t [1:0] dsym_t;       // matched-filter output per polarization

  typedef logic signed [CW-1:0] coef_t;
  typedef logic signed [GW-1:0] grad_t;
  typedef logic [PHW-1:0]       phase_t;
  typedef logic signed [LW-1:0] trig_t;

  // Round-half-to-even arithmetic right shift.
  function automatic longint rne_shift(input longint v, input int sh);
    longint q;
    longint rem;
    longint half;
    if (sh <= 0) return v <<< (-sh);
    q    = v >>> sh;
    rem  = v - (q <<< sh);
    half = longint'(1) <<< (sh - 1);
    if (rem > half || (rem == half && q[0])) q = q + 1;
    return q;
  endfunction

  // Round-half-up arithmetic right shift (biased; not used by the design).
  function automatic longint rhu_shift(input longint v, input int sh);
    if (sh <= 0) return v <<< (-sh);
    return (v + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction

  // Saturate to a signed sample.
  function automatic samp_t sat_samp(input longint v);
    longint mx;
    mx = (longint'(1) <<< (DW - 1)) - 1;
    if (v > mx)       return samp_t'(mx);
    if (v < -mx - 1)  return samp_t'(-mx - 1);
    return samp_t'(v);
  endfunction

  // Saturate to a signed symbol.
  function automatic ssamp_t sat_ssamp(input longint v);
    longint mx;
    mx = (longint'(1) <<< (SW - 1)) - 1;
    if (v > mx)       return ssamp_t'(mx);
    if (v < -mx - 1)  return ssamp_t'(-mx - 1);
    return ssamp_t'(v);
  endfunction

  // Saturate to a signed coefficient.
  function automatic coef_t sat_coef(input longint v);
    longint mx;
    mx = (longint'(1) <<< (CW - 1)) - 1;
    if (v > mx)       return coef_t'(mx);
    if (v < -mx - 1)  return coef_t'(-mx - 1);
    return coef_t'(v);
  endfunction

  // Real part of conj(a) * b: the correlation of two complex samples.
  function automatic longint cdot(input cplx_t a, input cplx_t b);
    return longint'(a.re) * longint'(b.re) + longint'(a.im) * longint'(b.im);
  endfunction

  // cos(k * 2^-PHW) or sin(k * 2^-PHW) with LF fraction bits, from a Taylor
  // series in 2^-30 fixed point (k * 2^-PHW < 1 rad, seven terms suffice).
  // Used only at elaboration to fill the trigonometric table.
  function automatic trig_t trig_entry(input int k, input bit want_sin);
    longint x;
    longint term;
    longint acc;
    x    = longint'(k) <<< (30 - PHW);
    term = want_sin ? x : (longint'(1) <<< 30);
    acc  = term;
    for (int n = 1; n < 8; n++) begin
      term = ((term * x) >>> 30);
      term = ((term * x) >>> 30);
      if (want_sin) term = -term / longint'((2 * n) * (2 * n + 1));
      else          term = -term / longint'((2 * n - 1) * (2 * n));
      acc  = acc + term;
    end
    return trig_t'(rne_shift(acc, 30 - LF));
  endfunction

endpackage

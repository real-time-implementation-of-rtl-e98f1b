// kerr_fp: fixed non-linear Kerr-effect compensator of one forward section.
//
// Each split step of the inverse Manakov equation applies a phase rotation
// that depends on the instantaneous total power of both polarizations:
//   phi = KERR_G * (|X|^2 + |Y|^2),   X' = X e^{-j phi},   Y' = Y e^{-j phi}.
// The phase is quantized to a PHW-bit code (LSB 2^-PHW rad, saturated below
// 1 rad) and cos/sin are read from trig_lut. The phase code is also output
// because the backward path needs it to propagate errors through this step.
// The step is fixed (not trained). KERR_G has GF fraction bits; its default
// (0.1 rad at unit total power) is this design's choice, since the effective
// non-linear coefficient per section is a property of the link. The rotation
// sign, quantization and look-up table realisation are also this design's
// own. Purely combinational; the enclosing section registers the result.
module kerr_fp
  import ml_eq_pkg::*;
#(
  parameter int KERR_G = 410,   // per-section non-linear coefficient, Q.GF
  parameter int GF     = 12
) (
  input  dp_t    din,
  output dp_t    dout,
  output phase_t phase
);

  localparam longint PH_MAX = (longint'(1) <<< PHW) - 1;

  longint pwr;
  longint ph_full;
  trig_t  c;
  trig_t  s;

  always_comb begin
    pwr = 0;
    for (int p = 0; p < 2; p++) pwr += cdot(din[p], din[p]);
    // power has 2*DF fraction bits; phase code has PHW
    ph_full = rne_shift(pwr * longint'(KERR_G), 2 * DF + GF - PHW);
    if (ph_full > PH_MAX) phase = phase_t'(PH_MAX);
    else                  phase = phase_t'(ph_full);
  end

  trig_lut u_lut (.ph(phase), .cos_o(c), .sin_o(s));

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      // (re + j im)(c - j s) = (re c + im s) + j (im c - re s)
      dout[p].re = sat_samp(rne_shift(longint'(din[p].re) * c + longint'(din[p].im) * s, LF));
      dout[p].im = sat_samp(rne_shift(longint'(din[p].im) * c - longint'(din[p].re) * s, LF));
    end
  end

endmodule

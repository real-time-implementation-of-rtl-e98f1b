// kerr_bp: backward propagation through a fixed Kerr compensator.
//
// The forward step multiplies each sample by e^{-j phi}; its error is carried
// back by multiplying with the conjugate e^{+j phi}, using the phase code phi
// the forward step recorded for that sample. Two versions exist, chosen by
// USE_LUT:
//   USE_LUT = 0: first-order Taylor expansion, e^{j phi} ~ 1 + j phi
//                (one multiplication per component, the cheaper version)
//   USE_LUT = 1: cos/sin from the same look-up table as the forward step
//                (more multipliers, more accurate, longer combinational path)
// The default is the Taylor version, the configuration whose resource usage
// is reported for the original system. Treating phi as a constant with
// respect to the sample (dropping the derivative of the power term) is this
// design's simplification. L samples are processed in parallel; results are
// rounded to even and saturated. Combinational.
module kerr_bp
  import ml_eq_pkg::*;
#(
  parameter int L       = 9,
  parameter bit USE_LUT = 1'b0
) (
  input  dp_t    din [L],
  input  phase_t ph  [L],
  output dp_t    dout[L]
);

  for (genvar k = 0; k < L; k++) begin : g_s
    if (USE_LUT) begin : g_lut
      trig_t c;
      trig_t s;
      trig_lut u_lut (.ph(ph[k]), .cos_o(c), .sin_o(s));
      always_comb begin
        for (int p = 0; p < 2; p++) begin
          // (re + j im)(c + j s) = (re c - im s) + j (im c + re s)
          dout[k][p].re = sat_samp(rne_shift(longint'(din[k][p].re) * c - longint'(din[k][p].im) * s, LF));
          dout[k][p].im = sat_samp(rne_shift(longint'(din[k][p].im) * c + longint'(din[k][p].re) * s, LF));
        end
      end
    end else begin : g_taylor
      always_comb begin
        for (int p = 0; p < 2; p++) begin
          // (re + j im)(1 + j phi) = (re - phi im) + j (im + phi re)
          dout[k][p].re = sat_samp(longint'(din[k][p].re)
                          - rne_shift(longint'(ph[k]) * longint'(din[k][p].im), PHW));
          dout[k][p].im = sat_samp(longint'(din[k][p].im)
                          + rne_shift(longint'(ph[k]) * longint'(din[k][p].re), PHW));
        end
      end
    end
  end

endmodule

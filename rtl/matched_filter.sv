// matched_filter: trainable matched filter of the final forward stage.
//
// Each polarization p is filtered by its own real M-tap filter h[p][j],
// applied to I and Q independently: y_p = sum_j h[p][j] * x[j][p], with x[0]
// the newest sample at two samples per symbol. The output keeps SF fraction
// bits in SW bits (extra precision handed to the loss stage). The 2:1
// downsampling to one symbol per output is done by the caller, which
// evaluates this filter every sample and registers only every second result.
// The separate per-polarization filters, the tap count M and the output
// format are this design's choices. Purely combinational.
module matched_filter
  import ml_eq_pkg::*;
#(
  parameter int M = 9
) (
  input  dp_t   x [M],
  input  coef_t h [2][M],
  output dsym_t y
);

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      longint acc_re;
      longint acc_im;
      acc_re = 0;
      acc_im = 0;
      for (int j = 0; j < M; j++) begin
        acc_re += longint'(h[p][j]) * longint'(x[j][p].re);
        acc_im += longint'(h[p][j]) * longint'(x[j][p].im);
      end
      y[p].re = sat_ssamp(rne_shift(acc_re, CF + DF - SF));
      y[p].im = sat_ssamp(rne_shift(acc_im, CF + DF - SF));
    end
  end

endmodule

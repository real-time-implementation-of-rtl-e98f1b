// mf_bp: backward propagation through the matched filter.
//
// For one symbol with error e[p] (per polarization, DF fraction bits) and the
// M filter input samples x[j] that produced it (index 0 newest):
//   grad[p][j] = Re(conj(e[p]) x[j][p])     (tap gradient, 2*DF fraction bits)
//   dx[j][p]   = h[p][j] * e[p]             (error at the filter input)
// dx is rounded to even and saturated to DW bits. The downsampling of the
// forward filter means only the samples of trained symbols receive an error.
// Plain chain rule of matched_filter; combinational.
module mf_bp
  import ml_eq_pkg::*;
#(
  parameter int M = 9
) (
  input  dp_t   e,
  input  dp_t   x    [M],
  input  coef_t h    [2][M],
  output grad_t grad [2][M],
  output dp_t   dx   [M]
);

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      for (int j = 0; j < M; j++) begin
        grad[p][j]  = grad_t'(cdot(e[p], x[j][p]));
        dx[j][p].re = sat_samp(rne_shift(longint'(h[p][j]) * longint'(e[p].re), CF));
        dx[j][p].im = sat_samp(rne_shift(longint'(h[p][j]) * longint'(e[p].im), CF));
      end
    end
  end

endmodule

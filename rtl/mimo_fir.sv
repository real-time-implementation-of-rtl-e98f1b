// mimo_fir: trainable linear step of one forward section, a 2x2 MIMO-FIR.
//
// Output polarization p is the sum over input polarizations q and taps j of
// w[p][q][j] * x[j][q], where x[0] is the newest sample of the window. The
// coefficients are real and act on the I and Q parts independently, as the
// linear steps of the equalizer are defined. Each output is rounded to even
// and saturated back to DW bits. Purely combinational: the sample window and
// the weights come from the caller (fp_path holds the delay line, grad_update
// holds the weights). The tap count T is not given for the original design;
// its default is this design's choice.
module mimo_fir
  import ml_eq_pkg::*;
#(
  parameter int T = 7
) (
  input  dp_t   x    [T],
  input  coef_t w    [2][2][T],
  output dp_t   y
);

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      longint acc_re;
      longint acc_im;
      acc_re = 0;
      acc_im = 0;
      for (int q = 0; q < 2; q++) begin
        for (int j = 0; j < T; j++) begin
          acc_re += longint'(w[p][q][j]) * longint'(x[j][q].re);
          acc_im += longint'(w[p][q][j]) * longint'(x[j][q].im);
        end
      end
      y[p].re = sat_samp(rne_shift(acc_re, CF));
      y[p].im = sat_samp(rne_shift(acc_im, CF));
    end
  end

endmodule

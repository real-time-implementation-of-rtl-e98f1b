// fir_bp: backward propagation through one 2x2 MIMO-FIR linear step.
//
// Inputs are the error window at the filter output, delta[i] for LO
// consecutive output positions (index 0 newest), and the filter input samples
// x[k], k = 0 .. LO+T-2, aligned so that output i was computed from x[i..i+T-1]
// with tap j applied to x[i+j]. Outputs:
//   grad[p][q][j] = sum_i Re(conj(delta[i][p]) x[i+j][q])    (weight gradient)
//   dx[k][q]      = sum_p sum_j w[p][q][j] delta[k-j][p]     (input error)
// The gradient keeps full precision (2*DF fraction bits); dx is rounded to
// even and saturated to DW bits. Because the coefficients are real and act on
// I and Q independently, the gradient is the sum of the I and Q
// correlations. This is the plain chain rule for the forward filter; the
// sharing of multipliers across a mini-batch used in the original design is
// not reproduced (all products are evaluated in parallel). Combinational.
module fir_bp
  import ml_eq_pkg::*;
#(
  parameter int T  = 7,
  parameter int LO = 9
) (
  input  dp_t   delta [LO],
  input  dp_t   x     [LO+T-1],
  input  coef_t w     [2][2][T],
  output grad_t grad  [2][2][T],
  output dp_t   dx    [LO+T-1]
);

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      for (int q = 0; q < 2; q++) begin
        for (int j = 0; j < T; j++) begin
          longint acc;
          acc = 0;
          for (int i = 0; i < LO; i++) acc += cdot(delta[i][p], x[i+j][q]);
          grad[p][q][j] = grad_t'(acc);
        end
      end
    end
  end

  always_comb begin
    for (int k = 0; k < LO + T - 1; k++) begin
      for (int q = 0; q < 2; q++) begin
        longint acc_re;
        longint acc_im;
        acc_re = 0;
        acc_im = 0;
        for (int p = 0; p < 2; p++) begin
          for (int j = 0; j < T; j++) begin
            if (k - j >= 0 && k - j < LO) begin
              acc_re += longint'(w[p][q][j]) * longint'(delta[k-j][p].re);
              acc_im += longint'(w[p][q][j]) * longint'(delta[k-j][p].im);
            end
          end
        end
        dx[k][q].re = sat_samp(rne_shift(acc_re, CF));
        dx[k][q].im = sat_samp(rne_shift(acc_im, CF));
      end
    end
  end

endmodule

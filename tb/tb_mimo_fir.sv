// tb_mimo_fir: checks the 2x2 MIMO-FIR against a direct evaluation of the
// sum over polarizations and taps, with random windows and weights
// (including values large enough to saturate the output).
module tb_mimo_fir;
  import ml_eq_pkg::*;
  import tb_ref_pkg::*;

  localparam int T = 7;
  dp_t   x [T];
  coef_t w [2][2][T];
  dp_t   y;
  int checks = 0, failures = 0;

  mimo_fir #(.T(T)) dut (.x(x), .w(w), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int lim;
      lim = (n % 8 == 0) ? 131071 : 20000;
      for (int j = 0; j < T; j++)
        for (int q = 0; q < 2; q++) begin
          x[j][q].re = samp_t'(rnd(-32768, 32767));
          x[j][q].im = samp_t'(rnd(-32768, 32767));
          for (int p = 0; p < 2; p++) w[p][q][j] = coef_t'(rnd(-lim, lim));
        end
      #1;
      for (int p = 0; p < 2; p++) begin
        longint sr, si;
        sr = 0; si = 0;
        for (int q = 0; q < 2; q++)
          for (int j = 0; j < T; j++) begin
            sr += longint'(w[p][q][j]) * longint'(x[j][q].re);
            si += longint'(w[p][q][j]) * longint'(x[j][q].im);
          end
        checks += 2;
        if (longint'(y[p].re) !== ref_sat(ref_rne(sr, 15), 16)) failures++;
        if (longint'(y[p].im) !== ref_sat(ref_rne(si, 15), 16)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mf_bp: checks the backward step of the matched filter: tap gradients
// and the error at the filter input, with random values.
module tb_mf_bp;
  import ml_eq_pkg::*;
  import tb_ref_pkg::*;

  localparam int M = 9;
  dp_t   e;
  dp_t   x    [M];
  coef_t h    [2][M];
  grad_t grad [2][M];
  dp_t   dx   [M];
  int checks = 0, failures = 0;

  mf_bp #(.M(M)) dut (.e(e), .x(x), .h(h), .grad(grad), .dx(dx));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int p = 0; p < 2; p++) begin
        e[p].re = samp_t'(rnd(-32768, 32767));
        e[p].im = samp_t'(rnd(-32768, 32767));
      end
      for (int j = 0; j < M; j++)
        for (int p = 0; p < 2; p++) begin
          x[j][p].re = samp_t'(rnd(-32768, 32767));
          x[j][p].im = samp_t'(rnd(-32768, 32767));
          h[p][j]    = coef_t'(rnd(-131072, 131071));
        end
      #1;
      for (int p = 0; p < 2; p++)
        for (int j = 0; j < M; j++) begin
          longint g;
          g = longint'(e[p].re) * x[j][p].re + longint'(e[p].im) * x[j][p].im;
          checks += 3;
          if (longint'(grad[p][j]) !== g) failures++;
          if (longint'(dx[j][p].re) !== ref_sat(ref_rne(longint'(h[p][j]) * e[p].re, 15), 16)) failures++;
          if (longint'(dx[j][p].im) !== ref_sat(ref_rne(longint'(h[p][j]) * e[p].im, 15), 16)) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

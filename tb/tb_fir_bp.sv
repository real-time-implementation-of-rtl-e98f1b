// tb_fir_bp: checks the backward step of a MIMO-FIR. The reference computes
// the weight gradient as a correlation and the input error by scattering
// every output error through every tap (the opposite loop order of the
// design), with random errors, inputs and weights.
module tb_fir_bp;
  import ml_eq_pkg::*;
  import tb_ref_pkg::*;

  localparam int T  = 7;
  localparam int LO = 9;
  localparam int LI = LO + T - 1;
  dp_t   delta [LO];
  dp_t   x     [LI];
  coef_t w     [2][2][T];
  grad_t grad  [2][2][T];
  dp_t   dx    [LI];
  int checks = 0, failures = 0;

  fir_bp #(.T(T), .LO(LO)) dut (.delta(delta), .x(x), .w(w), .grad(grad), .dx(dx));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      longint sre [LI][2];
      longint sim [LI][2];
      for (int i = 0; i < LO; i++)
        for (int p = 0; p < 2; p++) begin
          delta[i][p].re = samp_t'(rnd(-8000, 8000));
          delta[i][p].im = samp_t'(rnd(-8000, 8000));
        end
      for (int k = 0; k < LI; k++)
        for (int q = 0; q < 2; q++) begin
          x[k][q].re = samp_t'(rnd(-32768, 32767));
          x[k][q].im = samp_t'(rnd(-32768, 32767));
        end
      for (int p = 0; p < 2; p++)
        for (int q = 0; q < 2; q++)
          for (int j = 0; j < T; j++) w[p][q][j] = coef_t'(rnd(-50000, 50000));
      #1;
      for (int p = 0; p < 2; p++)
        for (int q = 0; q < 2; q++)
          for (int j = 0; j < T; j++) begin
            longint g;
            g = 0;
            for (int i = 0; i < LO; i++)
              g += longint'(delta[i][p].re) * x[i+j][q].re + longint'(delta[i][p].im) * x[i+j][q].im;
            checks++;
            if (longint'(grad[p][q][j]) !== g) failures++;
          end
      for (int k = 0; k < LI; k++) for (int q = 0; q < 2; q++) begin sre[k][q] = 0; sim[k][q] = 0; end
      for (int i = 0; i < LO; i++)
        for (int p = 0; p < 2; p++)
          for (int q = 0; q < 2; q++)
            for (int j = 0; j < T; j++) begin
              sre[i+j][q] += longint'(w[p][q][j]) * delta[i][p].re;
              sim[i+j][q] += longint'(w[p][q][j]) * delta[i][p].im;
            end
      for (int k = 0; k < LI; k++)
        for (int q = 0; q < 2; q++) begin
          checks += 2;
          if (longint'(dx[k][q].re) !== ref_sat(ref_rne(sre[k][q], 15), 16)) failures++;
          if (longint'(dx[k][q].im) !== ref_sat(ref_rne(sim[k][q], 15), 16)) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_matched_filter: checks the per-polarization matched filter against a
// direct evaluation with random windows and taps.
module tb_matched_filter;
  import ml_eq_pkg::*;
  import tb_ref_pkg::*;

  localparam int M = 9;
  dp_t   x [M];
  coef_t h [2][M];
  dsym_t y;
  int checks = 0, failures = 0;

  matched_filter #(.M(M)) dut (.x(x), .h(h), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int j = 0; j < M; j++)
        for (int p = 0; p < 2; p++) begin
          x[j][p].re = samp_t'(rnd(-32768, 32767));
          x[j][p].im = samp_t'(rnd(-32768, 32767));
          h[p][j]    = coef_t'(rnd(-40000, 40000));
        end
      #1;
      for (int p = 0; p < 2; p++) begin
        longint sr, si;
        sr = 0; si = 0;
        for (int j = 0; j < M; j++) begin
          sr += longint'(h[p][j]) * longint'(x[j][p].re);
          si += longint'(h[p][j]) * longint'(x[j][p].im);
        end
        checks += 2;
        if (longint'(y[p].re) !== ref_sat(ref_rne(sr, 11), 20)) failures++;
        if (longint'(y[p].im) !== ref_sat(ref_rne(si, 11), 20)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

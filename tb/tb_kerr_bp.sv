// tb_kerr_bp: checks both versions of the Kerr backward step. The Taylor
// version (default) must match (re - phi im) + j (im + phi re) exactly; the
// look-up-table version must match the real rotation by e^{+j phi} within two
// LSBs. Also checks that the two differ for large phases.
module tb_kerr_bp;
  import ml_eq_pkg::*;
  import tb_ref_pkg::*;

  localparam int L = 9;
  dp_t    din  [L];
  phase_t ph   [L];
  dp_t    dt   [L];
  dp_t    dl   [L];
  int checks = 0, failures = 0, differ = 0;

  kerr_bp #(.L(L))                  dut   (.din(din), .ph(ph), .dout(dt));
  kerr_bp #(.L(L), .USE_LUT(1'b1))  dut_l (.din(din), .ph(ph), .dout(dl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int k = 0; k < L; k++) begin
        ph[k] = phase_t'(rnd(0, 1023));
        for (int p = 0; p < 2; p++) begin
          din[k][p].re = samp_t'(rnd(-16000, 16000));
          din[k][p].im = samp_t'(rnd(-16000, 16000));
        end
      end
      #1;
      for (int k = 0; k < L; k++)
        for (int p = 0; p < 2; p++) begin
          longint re, im, tr, ti;
          real c, s, lr, li;
          re = din[k][p].re;
          im = din[k][p].im;
          tr = ref_sat(re - ref_rne(longint'(ph[k]) * im, 10), 16);
          ti = ref_sat(im + ref_rne(longint'(ph[k]) * re, 10), 16);
          checks += 2;
          if (longint'(dt[k][p].re) !== tr) failures++;
          if (longint'(dt[k][p].im) !== ti) failures++;
          c  = $cos(real'(ph[k]) / 1024.0);
          s  = $sin(real'(ph[k]) / 1024.0);
          lr = real'(re) * c - real'(im) * s;
          li = real'(im) * c + real'(re) * s;
          if (lr > 32767.0) lr = 32767.0;
          if (lr < -32768.0) lr = -32768.0;
          if (li > 32767.0) li = 32767.0;
          if (li < -32768.0) li = -32768.0;
          checks += 2;
          if (real'(dl[k][p].re) - lr > 2.0 || real'(dl[k][p].re) - lr < -2.0) failures++;
          if (real'(dl[k][p].im) - li > 2.0 || real'(dl[k][p].im) - li < -2.0) failures++;
          if (dl[k][p] !== dt[k][p]) differ++;
        end
    end
    checks++;
    if (differ == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

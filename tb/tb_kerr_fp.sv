// tb_kerr_fp: checks the Kerr compensator. The phase code is compared exactly
// with power * KERR_G; the rotated output is compared with X e^{-j phi}
// computed with the real $cos/$sin of the quantized phase, allowing two LSBs
// for the table's own rounding. Includes inputs that saturate the phase.
module tb_kerr_fp;
  import ml_eq_pkg::*;
  import tb_ref_pkg::*;

  dp_t    din;
  dp_t    dout;
  phase_t phase;
  int checks = 0, failures = 0, sat_seen = 0;

  kerr_fp dut (.din(din), .dout(dout), .phase(phase));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint v [4];
      longint pw, ph;
      real c, s;
      int lim;
      lim = (n % 10 == 0) ? 32767 : 6000;
      for (int k = 0; k < 4; k++) v[k] = longint'(rnd(-lim, lim));
      din[0].re = samp_t'(v[0]); din[0].im = samp_t'(v[1]);
      din[1].re = samp_t'(v[2]); din[1].im = samp_t'(v[3]);
      #1;
      pw = v[0] * v[0] + v[1] * v[1] + v[2] * v[2] + v[3] * v[3];
      ph = ref_rne(pw * 410, 24 + 12 - 10);
      if (ph > 1023) begin ph = 1023; sat_seen++; end
      checks++;
      if (longint'(phase) !== ph) begin
        failures++;
        if (failures < 10) $display("FAIL phase %0d exp %0d", phase, ph);
      end
      c = $cos(real'(ph) / 1024.0);
      s = $sin(real'(ph) / 1024.0);
      for (int p = 0; p < 2; p++) begin
        real er, ei;
        er = real'(v[2*p]) * c + real'(v[2*p+1]) * s;
        ei = real'(v[2*p+1]) * c - real'(v[2*p]) * s;
        if (er > 32767.0) er = 32767.0;
        if (er < -32768.0) er = -32768.0;
        if (ei > 32767.0) ei = 32767.0;
        if (ei < -32768.0) ei = -32768.0;
        checks += 2;
        if ((real'(dout[p].re) - er) > 2.0 || (real'(dout[p].re) - er) < -2.0) failures++;
        if ((real'(dout[p].im) - ei) > 2.0 || (real'(dout[p].im) - ei) < -2.0) failures++;
      end
    end
    checks++;
    if (sat_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

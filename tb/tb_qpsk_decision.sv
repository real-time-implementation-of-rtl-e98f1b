// tb_qpsk_decision: checks the hard decision on random symbols and on the
// boundary values 0, -1 and the extremes.
module tb_qpsk_decision;
  import ml_eq_pkg::*;
  import tb_ref_pkg::*;

  dsym_t sym;
  dp_t   dec;
  int checks = 0, failures = 0;

  qpsk_decision dut (.sym(sym), .dec(dec));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      longint v [4];
      for (int k = 0; k < 4; k++) begin
        case (n % 5)
          0: v[k] = 0;
          1: v[k] = -1;
          2: v[k] = (k % 2 == 0) ? 524287 : -524288;
          default: v[k] = longint'(rnd(-300000, 300000));
        endcase
      end
      sym[0].re = ssamp_t'(v[0]); sym[0].im = ssamp_t'(v[1]);
      sym[1].re = ssamp_t'(v[2]); sym[1].im = ssamp_t'(v[3]);
      #1;
      checks += 4;
      if (dec[0].re !== ((v[0] >= 0) ? 2048 : -2048)) failures++;
      if (dec[0].im !== ((v[1] >= 0) ? 2048 : -2048)) failures++;
      if (dec[1].re !== ((v[2] >= 0) ? 2048 : -2048)) failures++;
      if (dec[1].im !== ((v[3] >= 0) ? 2048 : -2048)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

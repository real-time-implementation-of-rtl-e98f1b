// tb_eq_loss: checks the loss stage. Random symbols (with many exact
// half-LSB ties in the bits that are rounded away), random pilots and both
// settings of dd_sel; the decision and the rounded difference are compared
// with a reference computed in the testbench.
module tb_eq_loss;
  import ml_eq_pkg::*;
  import tb_ref_pkg::*;

  dsym_t sym;
  dp_t   pilot;
  logic  dd_sel;
  dp_t   dec;
  dp_t   diff;
  int checks = 0, failures = 0, ties = 0;

  eq_loss dut (.sym(sym), .pilot(pilot), .dd_sel(dd_sel), .dec(dec), .diff(diff));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint s [4];
      longint pl [4];
      for (int k = 0; k < 4; k++) begin
        s[k] = longint'(rnd(-60000, 60000));
        if (n % 2 == 0) s[k] = (s[k] & ~longint'(15)) | 8;   // exact tie
        if (n % 4 == 1) s[k] = s[k] & ~longint'(15);        // exact
        pl[k] = ($urandom_range(0, 1) !== 0) ? 2048 : -2048;
      end
      sym[0].re = ssamp_t'(s[0]); sym[0].im = ssamp_t'(s[1]);
      sym[1].re = ssamp_t'(s[2]); sym[1].im = ssamp_t'(s[3]);
      pilot[0].re = samp_t'(pl[0]); pilot[0].im = samp_t'(pl[1]);
      pilot[1].re = samp_t'(pl[2]); pilot[1].im = samp_t'(pl[3]);
      dd_sel = n[3];
      #1;
      for (int k = 0; k < 4; k++) begin
        longint dref, rf, dv, dgot, decgot;
        dref = (s[k] >= 0) ? 2048 : -2048;
        rf   = dd_sel ? dref : pl[k];
        dv   = ref_sat(ref_rne(s[k] - rf * 16, 4), 16);
        if ((s[k] & 15) == 8) ties++;
        case (k)
          0: begin dgot = diff[0].re; decgot = dec[0].re; end
          1: begin dgot = diff[0].im; decgot = dec[0].im; end
          2: begin dgot = diff[1].re; decgot = dec[1].re; end
          default: begin dgot = diff[1].im; decgot = dec[1].im; end
        endcase
        checks += 2;
        if (dgot !== dv) begin
          failures++;
          if (failures < 10) $display("FAIL diff: sym %0d ref %0d got %0d exp %0d", s[k], rf, dgot, dv);
        end
        if (decgot !== dref) failures++;
      end
    end
    $display("ties exercised: %0d", ties);
    checks++;
    if (ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

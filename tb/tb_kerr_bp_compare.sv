// tb_kerr_bp_compare: runs the two versions of the Kerr backward step side
// by side on the same received signal: one equalizer with the first-order
// Taylor version (default), one with the look-up-table version. Both train
// on pilots, then switch to decision-directed mode. Checks that each version
// converges (MSE well below the untrained one, no wrong decisions after
// training) and keeps tracking in decision-directed mode, and reports the
// final MSE of both. The channel is the small test channel of
// tb_qpsk_channel with a stronger Kerr phase, not a fiber link.
module tb_kerr_bp_compare;
  import ml_eq_pkg::*;

  localparam int NSYM_ALIGN = 200;
  localparam int NSYM_PILOT = 5000;
  localparam int NSYM_DD    = 2500;
  localparam int NSYM       = NSYM_ALIGN + NSYM_PILOT + NSYM_DD;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid;
  dp_t        din [2];
  dp_t        pilot [1];
  logic       pilot_valid;
  logic       dd_sel;
  logic       train_en;
  logic       sv_t, sv_l;
  dsym_t      sym_t [1], sym_l [1];
  dp_t        dec_t [1], dec_l [1];
  dp_t        err_t [1], err_l [1];
  logic       tr_t, tr_l;
  logic [3:0] upd_t, upd_l;

  int  sym_cnt = 0;
  int  delay_sym = 0;

  tb_qpsk_channel #(.NSYM(NSYM), .KERR_PHI(0.45), .THETA(0.5)) chan (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din),
    .qa(sym_cnt - delay_sym), .ra(pilot[0]));

  ml_equalizer #(.KERR_BP_LUT(1'b0)) dut_taylor (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din),
    .pilot(pilot), .pilot_valid(pilot_valid), .dd_sel(dd_sel), .train_en(train_en),
    .sym_valid(sv_t), .sym(sym_t), .dec(dec_t), .err(err_t), .train(tr_t), .upd(upd_t));

  ml_equalizer #(.KERR_BP_LUT(1'b1)) dut_lut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din),
    .pilot(pilot), .pilot_valid(pilot_valid), .dd_sel(dd_sel), .train_en(train_en),
    .sym_valid(sv_l), .sym(sym_l), .dec(dec_l), .err(err_l), .train(tr_l), .upd(upd_l));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  always @(posedge clk) if (sv_t) sym_cnt <= sym_cnt + 1;

  task automatic measure(input int nsym, output real mt, output real ml, output int et, output int el);
    real at, al;
    at = 0.0; al = 0.0; et = 0; el = 0;
    for (int k = 0; k < nsym; k++) begin
      @(negedge clk iff sv_t);
      for (int p = 0; p < 2; p++) begin
        at += (real'(sym_t[0][p].re) / 65536.0 - real'(pilot[0][p].re) / 4096.0) ** 2;
        at += (real'(sym_t[0][p].im) / 65536.0 - real'(pilot[0][p].im) / 4096.0) ** 2;
        al += (real'(sym_l[0][p].re) / 65536.0 - real'(pilot[0][p].re) / 4096.0) ** 2;
        al += (real'(sym_l[0][p].im) / 65536.0 - real'(pilot[0][p].im) / 4096.0) ** 2;
        if (dec_t[0][p] !== pilot[0][p]) et++;
        if (dec_l[0][p] !== pilot[0][p]) el++;
      end
    end
    mt = at / real'(nsym);
    ml = al / real'(nsym);
  endtask

  task automatic expect_ok(input string what, input real m, input real m0, input int e);
    checks++;
    if (!(m < 0.5 * m0) || e !== 0) begin
      failures++;
      $display("FAIL: %s: MSE %f (untrained %f), %0d wrong decisions", what, m, m0, e);
    end
  endtask

  initial begin : ctrl
    real m0t, m0l, mt, ml;
    int  et, el, best, best_d;
    int  hits [32];
    rst_n = 1'b0;
    pilot_valid = 1'b0;
    dd_sel = 1'b0;
    train_en = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int d = 0; d < 32; d++) hits[d] = 0;
    repeat (NSYM_ALIGN - 20) begin
      @(negedge clk iff sv_t);
      for (int d = 0; d < 32; d++) if (dec_t[0] === chan.level(sym_cnt - d)) hits[d]++;
    end
    best = 0; best_d = 0;
    for (int d = 0; d < 32; d++) if (hits[d] > best) begin best = hits[d]; best_d = d; end
    delay_sym = best_d;
    measure(16, m0t, m0l, et, el);
    @(negedge clk);
    train_en = 1'b1;
    pilot_valid = 1'b1;
    measure(NSYM_PILOT - 1000, mt, ml, et, el);
    measure(1000, mt, ml, et, el);
    $display("pilot mode: MSE Taylor %f, LUT %f (untrained %f)", mt, ml, m0t);
    expect_ok("Taylor, pilot mode", mt, m0t, et);
    expect_ok("LUT, pilot mode", ml, m0l, el);
    @(negedge clk);
    dd_sel = 1'b1;
    pilot_valid = 1'b0;
    measure(NSYM_DD - 1000, mt, ml, et, el);
    measure(800, mt, ml, et, el);
    $display("DD mode:    MSE Taylor %f, LUT %f", mt, ml);
    expect_ok("Taylor, DD mode", mt, m0t, et);
    expect_ok("LUT, DD mode", ml, m0l, el);
    // the two versions must really differ in what they compute
    checks++;
    if (dut_taylor.u_bp.w1 === dut_lut.u_bp.w1) begin
      failures++;
      $display("FAIL: Taylor and LUT versions trained identical FIR1 weights");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NSYM * 2 + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

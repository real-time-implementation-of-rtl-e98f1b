// tb_ml_equalizer: end-to-end test of the adaptive equalizer at its default
// parameters (two lanes: one symbol per clock).
//
// tb_qpsk_channel supplies random DP-QPSK symbols through a channel with Kerr
// phase, polarization rotation, inter-symbol interference and noise. The
// symbol delay of the equalizer is found first from the untrained output.
// Then the equalizer trains on pilots, is switched to decision-directed mode,
// and trains on its own decisions.
//
// Checked: the mean squared error after pilot training is well below the
// untrained one; after training no decision is wrong in either mode; every
// layer receives exactly one batch update per B trained symbols; a symbol
// comes out on every clock after an input clock. Counted and required at
// least once: pilot-trained symbols, decision-directed symbols, untrained
// symbols (train_en low), updates of each layer, a non-zero Kerr phase.
module tb_ml_equalizer;
  import ml_eq_pkg::*;

  localparam int NSYM_ALIGN = 200;
  localparam int NSYM_PILOT = 6000;
  localparam int NSYM_DD    = 3000;
  localparam int NSYM       = NSYM_ALIGN + NSYM_PILOT + NSYM_DD;
  localparam int B          = 16;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid;
  dp_t        din [2];
  dp_t        pilot [1];
  logic       pilot_valid;
  logic       dd_sel;
  logic       train_en;
  logic       sym_valid;
  dsym_t      sym [1];
  dp_t        dec [1];
  dp_t        err [1];
  logic       train;
  logic [3:0] upd;

  int  sym_cnt = 0;          // symbols out of the equalizer
  int  delay_sym = 0;        // output symbol index - transmitted index

  tb_qpsk_channel #(.NSYM(NSYM)) chan (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din),
    .qa(sym_cnt - delay_sym), .ra(pilot[0]));

  ml_equalizer dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din),
    .pilot(pilot), .pilot_valid(pilot_valid), .dd_sel(dd_sel), .train_en(train_en),
    .sym_valid(sym_valid), .sym(sym), .dec(dec), .err(err), .train(train), .upd(upd));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_pilot_tr = 0, n_dd_tr = 0, n_untrained = 0, n_kerr = 0;
  int n_upd [4] = '{0, 0, 0, 0};
  int n_train_total = 0;
  int last_sym_cycle = -1, cycle = 0, gap_bad = 0;

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (dut.u_fp.k2_ph[0] !== 0) n_kerr <= n_kerr + 1;
    for (int l = 0; l < 4; l++) if (upd[l]) n_upd[l] <= n_upd[l] + 1;
    if (train) n_train_total <= n_train_total + 1;
    if (sym_valid && rst_n) begin
      sym_cnt <= sym_cnt + 1;
      if (last_sym_cycle >= 0 && cycle - last_sym_cycle !== 1 && sym_cnt < NSYM - 40) gap_bad <= gap_bad + 1;
      last_sym_cycle <= cycle;
      if (train && !dd_sel) n_pilot_tr <= n_pilot_tr + 1;
      if (train && dd_sel)  n_dd_tr <= n_dd_tr + 1;
      if (!train)           n_untrained <= n_untrained + 1;
    end
  end

  // mean squared error and wrong decisions over the next nsym symbols
  task automatic measure(input int nsym, output real mse, output int nerr);
    real acc;
    acc  = 0.0;
    nerr = 0;
    for (int k = 0; k < nsym; k++) begin
      @(negedge clk iff sym_valid);
      for (int p = 0; p < 2; p++) begin
        acc += (real'(sym[0][p].re) / 65536.0 - real'(pilot[0][p].re) / 4096.0) ** 2;
        acc += (real'(sym[0][p].im) / 65536.0 - real'(pilot[0][p].im) / 4096.0) ** 2;
        if (dec[0][p] !== pilot[0][p]) nerr++;
      end
    end
    mse = acc / real'(nsym);
  endtask

  initial begin : ctrl
    real mse0, mse1, mse2, mse3;
    int  e0, e1, e2, e3, best, best_d;
    int  hits [32];
    rst_n = 1'b0;
    pilot_valid = 1'b0;
    dd_sel = 1'b0;
    train_en = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // 1. find the symbol delay from the untrained output (train_en low)
    for (int d = 0; d < 32; d++) hits[d] = 0;
    repeat (NSYM_ALIGN - 20) begin
      @(negedge clk iff sym_valid);
      for (int d = 0; d < 32; d++) begin
        if (dec[0] === chan.level(sym_cnt - d)) hits[d]++;
      end
    end
    best = 0; best_d = 0;
    for (int d = 0; d < 32; d++) if (hits[d] > best) begin best = hits[d]; best_d = d; end
    delay_sym = best_d;
    $display("symbol delay %0d (%0d of %0d decisions agree untrained)", best_d, best, NSYM_ALIGN - 20);
    measure(16, mse0, e0);
    // 2. pilot-based training
    @(negedge clk);
    train_en = 1'b1;
    pilot_valid = 1'b1;
    measure(NSYM_PILOT - 1000, mse1, e1);
    measure(1000, mse2, e2);
    $display("MSE untrained %f, pilot-trained %f, symbol errors %0d", mse0, mse2, e2);
    checks++;
    if (!(mse2 < 0.5 * mse0)) begin
      failures++;
      $display("FAIL: pilot training did not reduce the MSE");
    end
    checks++;
    if (e2 !== 0) begin
      failures++;
      $display("FAIL: %0d wrong decisions after pilot training", e2);
    end
    // 3. decision-directed mode
    @(negedge clk);
    dd_sel = 1'b1;
    pilot_valid = 1'b0;
    measure(NSYM_DD - 1000, mse1, e1);
    measure(800, mse3, e3);
    $display("MSE after DD mode %f, symbol errors %0d", mse3, e3);
    checks++;
    if (e3 !== 0 || !(mse3 < 0.5 * mse0)) begin
      failures++;
      $display("FAIL: decision-directed mode lost track");
    end
    repeat (6) @(negedge clk);
    // one update per B trained symbols, for every layer
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (n_upd[l] !== n_train_total / B) begin
        failures++;
        $display("FAIL: layer %0d has %0d updates for %0d trained symbols", l, n_upd[l], n_train_total);
      end
    end
    checks++;
    if (gap_bad !== 0) begin
      failures++;
      $display("FAIL: %0d symbol gaps differ from one clock", gap_bad);
    end
    $display("pilot-trained %0d, DD-trained %0d, untrained %0d, updates %0d/%0d/%0d/%0d, kerr-active cycles %0d",
             n_pilot_tr, n_dd_tr, n_untrained, n_upd[0], n_upd[1], n_upd[2], n_upd[3], n_kerr);
    checks++; if (n_pilot_tr == 0)  begin failures++; $display("FAIL: no pilot training"); end
    checks++; if (n_dd_tr == 0)     begin failures++; $display("FAIL: no DD training"); end
    checks++; if (n_untrained == 0) begin failures++; $display("FAIL: no untrained symbols"); end
    checks++; if (n_kerr == 0)      begin failures++; $display("FAIL: Kerr phase never active"); end
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (n_upd[l] == 0) begin failures++; $display("FAIL: layer %0d never updated", l); end
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

// tb_bp_path: checks the backward path (T = 3, M = 5, P = 4 lanes, batch
// B = 1, MU_SHIFT = 8, Taylor Kerr BP) against a reference that applies the chain
// rule layer by layer. Isolated training symbols with random errors and
// random forward-path snapshots are applied; after each one every weight of
// the matched filter and of the three linear steps must equal the
// reference's, and each layer's update pulse must arrive at its pipeline
// depth (1, 2, 3 and 4 cycles after the symbol for MF, FIR3, FIR2, FIR1).
module tb_bp_path;
  import ml_eq_pkg::*;
  import tb_ref_pkg::*;

  localparam int T = 3, M = 5, P = 4, MU = 8;
  localparam int DM = M + P - 2, D3 = M + T + P - 1, D2 = M + 2 * T + 2 * P - 2;
  localparam int D1 = M + 3 * T + 3 * P - 3;
  localparam int L3 = M + T - 1, L2 = M + 2 * T - 2, L1 = M + 3 * T - 3;
  localparam int SH = 24 - 15 + MU;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   train;
  dp_t    e;
  dp_t    snap_m [DM];
  dp_t    snap_3 [D3];
  phase_t sph_3  [D3];
  dp_t    snap_2 [D2];
  phase_t sph_2  [D2];
  dp_t    snap_1 [D1];
  coef_t  w1 [2][2][T], w2 [2][2][T], w3 [2][2][T];
  coef_t  h  [2][M];
  logic [3:0] upd;

  bp_path #(.T(T), .M(M), .P(P), .B(1), .MU_SHIFT(MU)) dut (
    .clk(clk), .rst_n(rst_n), .train(train), .e(e),
    .snap_m(snap_m), .snap_3(snap_3), .sph_3(sph_3), .snap_2(snap_2),
    .sph_2(sph_2), .snap_1(snap_1), .w1(w1), .w2(w2), .w3(w3), .h(h), .upd(upd));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint rw1 [2][2][T], rw2 [2][2][T], rw3 [2][2][T], rh [2][M];

  // error windows of the reference (largest size)
  longint dre [L1][2], dim [L1][2];
  longint nre [L1][2], nim [L1][2];

  // one FIR backward step on dre/dim (length lo) with inputs xw[off + k];
  // updates weights rw and leaves the input error (length lo+T-1) in nre/nim
  task automatic ref_fir(input int lo, input dp_t xw [], input int off,
                         inout longint rw [2][2][T]);
    longint g [2][2][T];
    for (int p = 0; p < 2; p++)
      for (int q = 0; q < 2; q++)
        for (int j = 0; j < T; j++) begin
          g[p][q][j] = 0;
          for (int i = 0; i < lo; i++)
            g[p][q][j] += dre[i][p] * xw[off + i + j][q].re + dim[i][p] * xw[off + i + j][q].im;
        end
    for (int k = 0; k < lo + T - 1; k++)
      for (int q = 0; q < 2; q++) begin
        longint sr, si;
        sr = 0; si = 0;
        for (int i = 0; i < lo; i++)
          for (int p = 0; p < 2; p++)
            if (k - i >= 0 && k - i < T) begin
              sr += rw[p][q][k-i] * dre[i][p];
              si += rw[p][q][k-i] * dim[i][p];
            end
        nre[k][q] = ref_sat(ref_rne(sr, 15), 16);
        nim[k][q] = ref_sat(ref_rne(si, 15), 16);
      end
    for (int p = 0; p < 2; p++)
      for (int q = 0; q < 2; q++)
        for (int j = 0; j < T; j++) rw[p][q][j] = ref_sat(rw[p][q][j] - ref_rne(g[p][q][j], SH), 18);
  endtask

  // Kerr backward step (Taylor) from nre/nim into dre/dim, phases ph[off + k]
  task automatic ref_kerr(input int len, input phase_t ph [], input int off);
    for (int k = 0; k < len; k++)
      for (int p = 0; p < 2; p++) begin
        longint a;
        a = ph[off + k];
        dre[k][p] = ref_sat(nre[k][p] - ref_rne(a * nim[k][p], 10), 16);
        dim[k][p] = ref_sat(nim[k][p] + ref_rne(a * nre[k][p], 10), 16);
      end
  endtask

  task automatic ref_symbol();
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < M; j++) begin
        dre[j][p] = ref_sat(ref_rne(rh[p][j] * e[p].re, 15), 16);
        dim[j][p] = ref_sat(ref_rne(rh[p][j] * e[p].im, 15), 16);
        rh[p][j]  = ref_sat(rh[p][j] - ref_rne(longint'(e[p].re) * snap_m[j][p].re
                                          + longint'(e[p].im) * snap_m[j][p].im, SH), 18);
      end
    ref_fir(M, snap_3, P, rw3);
    ref_kerr(L3, sph_3, P);
    ref_fir(L3, snap_2, 2 * P, rw2);
    ref_kerr(L2, sph_2, 2 * P);
    ref_fir(L2, snap_1, 3 * P, rw1);
  endtask

  task automatic randomize_inputs();
    for (int p = 0; p < 2; p++) begin
      e[p].re = samp_t'(rnd(-1500, 1500));
      e[p].im = samp_t'(rnd(-1500, 1500));
    end
    for (int i = 0; i < DM; i++) for (int p = 0; p < 2; p++) begin
      snap_m[i][p].re = samp_t'(rnd(-3000, 3000)); snap_m[i][p].im = samp_t'(rnd(-3000, 3000));
    end
    for (int i = 0; i < D3; i++) begin
      sph_3[i] = phase_t'(rnd(0, 300));
      for (int p = 0; p < 2; p++) begin
        snap_3[i][p].re = samp_t'(rnd(-3000, 3000)); snap_3[i][p].im = samp_t'(rnd(-3000, 3000));
      end
    end
    for (int i = 0; i < D2; i++) begin
      sph_2[i] = phase_t'(rnd(0, 300));
      for (int p = 0; p < 2; p++) begin
        snap_2[i][p].re = samp_t'(rnd(-3000, 3000)); snap_2[i][p].im = samp_t'(rnd(-3000, 3000));
      end
    end
    for (int i = 0; i < D1; i++) for (int p = 0; p < 2; p++) begin
      snap_1[i][p].re = samp_t'(rnd(-3000, 3000)); snap_1[i][p].im = samp_t'(rnd(-3000, 3000));
    end
  endtask

  task automatic compare_weights();
    for (int p = 0; p < 2; p++) begin
      for (int q = 0; q < 2; q++)
        for (int j = 0; j < T; j++) begin
          checks += 3;
          if (longint'(w1[p][q][j]) !== rw1[p][q][j]) failures++;
          if (longint'(w2[p][q][j]) !== rw2[p][q][j]) failures++;
          if (longint'(w3[p][q][j]) !== rw3[p][q][j]) failures++;
        end
      for (int j = 0; j < M; j++) begin
        checks++;
        if (longint'(h[p][j]) !== rh[p][j]) failures++;
      end
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    train = 1'b0;
    randomize_inputs();
    #12 rst_n = 1'b1;
    for (int p = 0; p < 2; p++) begin
      for (int q = 0; q < 2; q++)
        for (int j = 0; j < T; j++) begin
          rw1[p][q][j] = (p == q && j == T / 2) ? 32768 : 0;
          rw2[p][q][j] = rw1[p][q][j];
          rw3[p][q][j] = rw1[p][q][j];
        end
      for (int j = 0; j < M; j++) rh[p][j] = (j == M / 2) ? 32768 : 0;
    end
    @(negedge clk);
    compare_weights();
    // isolated symbols: weights and update timing
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      randomize_inputs();
      train = 1'b1;
      ref_symbol();
      for (int c = 1; c <= 5; c++) begin
        @(negedge clk);
        train = 1'b0;
        checks++;
        if (upd !== ((c <= 4) ? (4'b0001 << (c - 1)) : 4'b0000)) begin
          failures++;
          $display("FAIL: upd %b at cycle %0d after symbol", upd, c);
        end
      end
      compare_weights();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

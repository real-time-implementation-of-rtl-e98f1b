// tb_fp_path: checks the forward path (T = 3, M = 5, P = 4 lanes, default
// Kerr coefficient) against a reference model with random weights, random
// input samples and random gaps in in_valid. The reference keeps its own
// delay lines, computes the Kerr rotation from a cos/sin table built with
// $cos/$sin, and predicts every output symbol, the symbol timing (P/2
// symbols one clock after each valid input clock) and every snapshot
// register.
module tb_fp_path;
  import ml_eq_pkg::*;
  import tb_ref_pkg::*;

  localparam int T = 3, M = 5, P = 4;
  localparam int DM = M + P - 2, D3 = M + T + P - 1, D2 = M + 2 * T + 2 * P - 2;
  localparam int D1 = M + 3 * T + 3 * P - 3;
  localparam int KG = 410;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   in_valid;
  dp_t    din [P];
  coef_t  w1 [2][2][T], w2 [2][2][T], w3 [2][2][T];
  coef_t  h  [2][M];
  logic   sym_valid;
  dsym_t  sym [P/2];
  dp_t    snap_m [DM];
  dp_t    snap_3 [D3];
  phase_t sph_3  [D3];
  dp_t    snap_2 [D2];
  phase_t sph_2  [D2];
  dp_t    snap_1 [D1];

  fp_path #(.T(T), .M(M), .P(P)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din),
    .w1(w1), .w2(w2), .w3(w3), .h(h), .sym_valid(sym_valid), .sym(sym),
    .snap_m(snap_m), .snap_3(snap_3), .sph_3(sph_3), .snap_2(snap_2),
    .sph_2(sph_2), .snap_1(snap_1));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nsym = 0, nphase = 0;

  // reference state
  dp_t r1 [D1], r2 [D2], r3 [D3], rm [DM];
  int  q2 [D2], q3 [D3];
  bit  e_valid;
  dsym_t e_sym [P/2];
  dp_t e_m [DM], e_3 [D3], e_2 [D2], e_1 [D1];
  int  e_p3 [D3], e_p2 [D2];

  function automatic longint ctab(input int k, input bit sn);
    real v;
    v = sn ? $sin(real'(k) / 1024.0) : $cos(real'(k) / 1024.0);
    return longint'($rtoi($floor(v * 16384.0 + 0.5)));
  endfunction

  function automatic dp_t rkerr(input dp_t a, output int ph);
    dp_t    o;
    longint pw, c, s, pf;
    pw = 0;
    for (int p = 0; p < 2; p++) pw += longint'(a[p].re) * a[p].re + longint'(a[p].im) * a[p].im;
    pf = ref_rne(pw * KG, 26);
    if (pf > 1023) pf = 1023;
    ph = int'(pf);
    c = ctab(ph, 1'b0);
    s = ctab(ph, 1'b1);
    for (int p = 0; p < 2; p++) begin
      o[p].re = samp_t'(ref_sat(ref_rne(a[p].re * c + a[p].im * s, 14), 16));
      o[p].im = samp_t'(ref_sat(ref_rne(a[p].im * c - a[p].re * s, 14), 16));
    end
    return o;
  endfunction

  function automatic dp_t rfir(input dp_t x [T], input coef_t w [2][2][T]);
    dp_t o;
    for (int p = 0; p < 2; p++) begin
      longint sr, si;
      sr = 0; si = 0;
      for (int j = 0; j < T; j++)
        for (int q = 0; q < 2; q++) begin
          sr += longint'(w[p][q][j]) * x[j][q].re;
          si += longint'(w[p][q][j]) * x[j][q].im;
        end
      o[p].re = samp_t'(ref_sat(ref_rne(sr, 15), 16));
      o[p].im = samp_t'(ref_sat(ref_rne(si, 15), 16));
    end
    return o;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      e_valid <= 1'b0;
      if (in_valid) begin
        dp_t x [T];
        dp_t k1 [P], f1 [P], k2 [P], f2 [P], k3 [P], f3 [P];
        int  a1, a2 [P], a3 [P];
        dsym_t ys [P/2];
        for (int l = 0; l < P; l++) begin
          k1[l] = rkerr(din[l], a1);
          for (int j = 0; j < T; j++) x[j] = r1[l + j];
          f1[l] = rfir(x, w1);
          k2[l] = rkerr(f1[l], a2[l]);
          for (int j = 0; j < T; j++) x[j] = r2[l + j];
          f2[l] = rfir(x, w2);
          k3[l] = rkerr(f2[l], a3[l]);
          for (int j = 0; j < T; j++) x[j] = r3[l + j];
          f3[l] = rfir(x, w3);
        end
        for (int k = 0; k < P / 2; k++)
          for (int p = 0; p < 2; p++) begin
            longint sr, si;
            sr = 0; si = 0;
            for (int j = 0; j < M; j++) begin
              sr += longint'(h[p][j]) * rm[2 * k + j][p].re;
              si += longint'(h[p][j]) * rm[2 * k + j][p].im;
            end
            ys[k][p].re = ssamp_t'(ref_sat(ref_rne(sr, 11), 20));
            ys[k][p].im = ssamp_t'(ref_sat(ref_rne(si, 11), 20));
          end
        e_valid <= 1'b1;
        e_sym <= ys;
        e_m <= rm; e_3 <= r3; e_2 <= r2; e_1 <= r1; e_p3 <= q3; e_p2 <= q2;
        for (int i = D1 - 1; i >= P; i--) r1[i] = r1[i-P];
        for (int i = D2 - 1; i >= P; i--) begin r2[i] = r2[i-P]; q2[i] = q2[i-P]; end
        for (int i = D3 - 1; i >= P; i--) begin r3[i] = r3[i-P]; q3[i] = q3[i-P]; end
        for (int i = DM - 1; i >= P; i--) rm[i] = rm[i-P];
        for (int l = 0; l < P; l++) begin
          r1[l] = k1[l];
          r2[l] = k2[l]; q2[l] = a2[l];
          r3[l] = k3[l]; q3[l] = a3[l];
          rm[l] = f3[l];
        end
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (sym_valid !== e_valid) begin
        failures++;
        $display("FAIL: sym_valid %0b expected %0b", sym_valid, e_valid);
      end else if (sym_valid) begin
        nsym++;
        checks++;
        if (sym !== e_sym) begin
          failures++;
          if (failures < 10) $display("FAIL: symbol %0d mismatch", nsym);
        end
        for (int i = 0; i < DM; i++) begin checks++; if (snap_m[i] !== e_m[i]) failures++; end
        for (int i = 0; i < D3; i++) begin
          checks += 2;
          if (snap_3[i] !== e_3[i]) failures++;
          if (int'(sph_3[i]) !== e_p3[i]) failures++;
          if (e_p3[i] !== 0) nphase++;
        end
        for (int i = 0; i < D2; i++) begin
          checks += 2;
          if (snap_2[i] !== e_2[i]) failures++;
          if (int'(sph_2[i]) !== e_p2[i]) failures++;
        end
        for (int i = 0; i < D1; i++) begin checks++; if (snap_1[i] !== e_1[i]) failures++; end
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2; p++) begin
      for (int q = 0; q < 2; q++)
        for (int j = 0; j < T; j++) begin
          w1[p][q][j] = coef_t'(rnd(-14000, 14000) + ((p == q && j == 1) ? 26000 : 0));
          w2[p][q][j] = coef_t'(rnd(-14000, 14000) + ((p == q && j == 1) ? 26000 : 0));
          w3[p][q][j] = coef_t'(rnd(-14000, 14000) + ((p == q && j == 1) ? 26000 : 0));
        end
      for (int j = 0; j < M; j++) h[p][j] = coef_t'(rnd(-20000, 20000));
    end
    for (int i = 0; i < D1; i++) r1[i] = '0;
    for (int i = 0; i < D2; i++) begin r2[i] = '0; q2[i] = 0; end
    for (int i = 0; i < D3; i++) begin r3[i] = '0; q3[i] = 0; end
    for (int i = 0; i < DM; i++) rm[i] = '0;
    e_valid = 1'b0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int l = 0; l < P; l++) din[l] = '0;
    #12 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) !== 0);
      for (int l = 0; l < P; l++)
        for (int p = 0; p < 2; p++) begin
          din[l][p].re = samp_t'(rnd(-3500, 3500));
          din[l][p].im = samp_t'(rnd(-3500, 3500));
        end
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (nsym < 1500 || nphase == 0) failures++;
    $display("symbols %0d, non-zero phases %0d", nsym, nphase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

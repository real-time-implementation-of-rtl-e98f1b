// bp_path: backward-propagation (training) path of the equalizer.
//
// It mirrors the forward path layer by layer, from the loss back to the first
// linear step:
//
//   e -> MF BP -> [s1] -> FIR3 BP -> Kerr3 BP -> [s2] -> FIR2 BP -> Kerr2 BP
//     -> [s3] -> FIR1 BP
//
// A trained symbol enters with its error e and the forward-path snapshot
// taken when that symbol was produced (fp_path, newest symbol lane). Each stage computes the
// gradient of its layer's weights and the error at the layer's input, which
// becomes the error window of the stage before it; [sN] are pipeline
// registers, so a symbol's contribution reaches the MF, FIR3, FIR2 and FIR1
// weights 0, 1, 2 and 3 cycles after it enters. The window of errors grows by
// T-1 samples per FIR stage (M, M+T-1, M+2T-2 samples). No stage is needed
// for Kerr1, since nothing before it is trained. Index offsets into the
// snapshots follow from the one-register-per-section structure of fp_path,
// whose delay lines shift by P samples per clock: the error window of FIR3's
// output starts at delay line position 0 of the matched filter, FIR3's inputs
// start at position P of h3, FIR2's at 2P of h2 and FIR1's at 3P of h1.
//
// Each trainable layer has a grad_update unit (mini-batch of B symbols, step
// 2^-MU_SHIFT) that holds its weights. On reset the FIRs start as identity
// filters (1.0 on the centre tap from a polarization to itself) and the
// matched filter as a single centre tap; this start point is this design's
// choice. The Kerr BP version is chosen by KERR_BP_LUT (0 = Taylor).
// One symbol can enter every cycle, i.e. every symbol is trained when P = 2;
// the backward path is fully parallel.
module bp_path
  import ml_eq_pkg::*;
#(
  parameter int T           = 7,
  parameter int M           = 9,
  parameter int P           = 2,
  parameter int B           = 16,
  parameter int MU_SHIFT    = 6,
  parameter bit KERR_BP_LUT = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   train,
  input  dp_t    e,
  input  dp_t    snap_m [M+P-2],
  input  dp_t    snap_3 [M+T+P-1],
  input  phase_t sph_3  [M+T+P-1],
  input  dp_t    snap_2 [M+2*T+2*P-2],
  input  phase_t sph_2  [M+2*T+2*P-2],
  input  dp_t    snap_1 [M+3*T+3*P-3],
  output coef_t  w1     [2][2][T],
  output coef_t  w2     [2][2][T],
  output coef_t  w3     [2][2][T],
  output coef_t  h      [2][M],
  output logic [3:0] upd            // {FIR1, FIR2, FIR3, MF} batch updates
);

  localparam int NW = 4 * T;
  localparam int NH = 2 * M;
  localparam int L3 = M + T - 1;        // error window at FIR3 input
  localparam int L2 = M + 2 * T - 2;    // error window at FIR2 input
  localparam int L1 = M + 3 * T - 3;    // input window of FIR1
  localparam int D3 = M + T + P - 1;
  localparam int D2 = M + 2 * T + 2 * P - 2;
  localparam int D1 = M + 3 * T + 3 * P - 3;
  localparam longint ONE = longint'(1) <<< CF;

  // ---------------- initial weights ----------------
  coef_t wi [NW];
  coef_t hi [NH];
  always_comb begin
    for (int n = 0; n < NW; n++)
      wi[n] = ((n / T == 0 || n / T == 3) && (n % T == T / 2)) ? coef_t'(ONE) : '0;
    for (int n = 0; n < NH; n++)
      hi[n] = (n % M == M / 2) ? coef_t'(ONE) : '0;
  end

  // ---------------- weight storage (flat <-> [p][q][j]) ----------------
  coef_t w1f [NW], w2f [NW], w3f [NW], hf [NH];
  grad_t g1f [NW], g2f [NW], g3f [NW], ghf [NH];
  grad_t g1 [2][2][T], g2 [2][2][T], g3 [2][2][T], gh [2][M];

  always_comb begin
    for (int p = 0; p < 2; p++)
      for (int q = 0; q < 2; q++)
        for (int j = 0; j < T; j++) begin
          w1[p][q][j]            = w1f[(p * 2 + q) * T + j];
          w2[p][q][j]            = w2f[(p * 2 + q) * T + j];
          w3[p][q][j]            = w3f[(p * 2 + q) * T + j];
          g1f[(p * 2 + q) * T + j] = g1[p][q][j];
          g2f[(p * 2 + q) * T + j] = g2[p][q][j];
          g3f[(p * 2 + q) * T + j] = g3[p][q][j];
        end
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < M; j++) begin
        h[p][j]         = hf[p * M + j];
        ghf[p * M + j]  = gh[p][j];
      end
  end

  // ---------------- stage A: matched filter BP ----------------
  dp_t dxm [M];
  mf_bp #(.M(M)) u_mfbp (.e(e), .x(snap_m[0:M-1]), .h(h), .grad(gh), .dx(dxm));

  logic   v1;
  dp_t    s1_d   [M];
  dp_t    s1_x3  [D3];
  phase_t s1_p3  [D3];
  dp_t    s1_x2  [D2];
  phase_t s1_p2  [D2];
  dp_t    s1_x1  [D1];

  // ---------------- stage B: FIR3 BP and Kerr3 BP ----------------
  dp_t dx3 [L3];
  dp_t d2n [L3];
  fir_bp #(.T(T), .LO(M)) u_f3bp (
    .delta(s1_d), .x(s1_x3[P:P+L3-1]), .w(w3), .grad(g3), .dx(dx3));
  kerr_bp #(.L(L3), .USE_LUT(KERR_BP_LUT)) u_k3bp (
    .din(dx3), .ph(s1_p3[P:P+L3-1]), .dout(d2n));

  logic   v2;
  dp_t    s2_d   [L3];
  dp_t    s2_x2  [D2];
  phase_t s2_p2  [D2];
  dp_t    s2_x1  [D1];

  // ---------------- stage C: FIR2 BP and Kerr2 BP ----------------
  dp_t dx2 [L2];
  dp_t d1n [L2];
  fir_bp #(.T(T), .LO(L3)) u_f2bp (
    .delta(s2_d), .x(s2_x2[2*P:2*P+L2-1]), .w(w2), .grad(g2), .dx(dx2));
  kerr_bp #(.L(L2), .USE_LUT(KERR_BP_LUT)) u_k2bp (
    .din(dx2), .ph(s2_p2[2*P:2*P+L2-1]), .dout(d1n));

  logic   v3;
  dp_t    s3_d   [L2];
  dp_t    s3_x1  [D1];

  // ---------------- stage D: FIR1 BP ----------------
  fir_bp #(.T(T), .LO(L2)) u_f1bp (
    .delta(s3_d), .x(s3_x1[3*P:3*P+L1-1]), .w(w1), .grad(g1), .dx());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
      for (int i = 0; i < M; i++) s1_d[i] <= '0;
      for (int i = 0; i < D3; i++) begin s1_x3[i] <= '0; s1_p3[i] <= '0; end
      for (int i = 0; i < D2; i++) begin
        s1_x2[i] <= '0; s1_p2[i] <= '0; s2_x2[i] <= '0; s2_p2[i] <= '0;
      end
      for (int i = 0; i < D1; i++) begin
        s1_x1[i] <= '0; s2_x1[i] <= '0; s3_x1[i] <= '0;
      end
      for (int i = 0; i < L3; i++) s2_d[i] <= '0;
      for (int i = 0; i < L2; i++) s3_d[i] <= '0;
    end else begin
      v1 <= train;
      v2 <= v1;
      v3 <= v2;
      if (train) begin
        s1_d  <= dxm;
        s1_x3 <= snap_3;
        s1_p3 <= sph_3;
        s1_x2 <= snap_2;
        s1_p2 <= sph_2;
        s1_x1 <= snap_1;
      end
      if (v1) begin
        s2_d  <= d2n;
        s2_x2 <= s1_x2;
        s2_p2 <= s1_p2;
        s2_x1 <= s1_x1;
      end
      if (v2) begin
        s3_d  <= d1n;
        s3_x1 <= s2_x1;
      end
    end
  end

  // ---------------- mini-batch weight updates ----------------
  grad_update #(.N(NH), .B(B), .MU_SHIFT(MU_SHIFT)) u_uph (
    .clk(clk), .rst_n(rst_n), .w_init(hi), .g_valid(train), .g(ghf), .w(hf), .upd(upd[0]));
  grad_update #(.N(NW), .B(B), .MU_SHIFT(MU_SHIFT)) u_up3 (
    .clk(clk), .rst_n(rst_n), .w_init(wi), .g_valid(v1), .g(g3f), .w(w3f), .upd(upd[1]));
  grad_update #(.N(NW), .B(B), .MU_SHIFT(MU_SHIFT)) u_up2 (
    .clk(clk), .rst_n(rst_n), .w_init(wi), .g_valid(v2), .g(g2f), .w(w2f), .upd(upd[2]));
  grad_update #(.N(NW), .B(B), .MU_SHIFT(MU_SHIFT)) u_up1 (
    .clk(clk), .rst_n(rst_n), .w_init(wi), .g_valid(v3), .g(g1f), .w(w1f), .upd(upd[3]));

endmodule

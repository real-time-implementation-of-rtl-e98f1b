// fp_path: forward-propagation (inference) path of the equalizer.
//
// Three sections, each a fixed Kerr compensator (kerr_fp) followed by a
// trainable 2x2 MIMO-FIR (mimo_fir), then a trainable matched filter
// (matched_filter) that downsamples from two samples per symbol to one:
//
//   din -> Kerr1 -> [h1] -> FIR1 -> Kerr2 -> [h2] -> FIR2 -> Kerr3 -> [h3]
//       -> FIR3 -> [hm] -> MF (even lanes) -> [sym]
//
// The path is unrolled over P parallel lanes: each clock with in_valid
// accepts P consecutive samples (din[0] is the newest, din[P-1] the oldest)
// and produces P/2 symbols (sym[k] from lane 2k, sym[0] the newest). Every
// delay line [hN] holds samples in time order, index 0 newest, and shifts by
// P per valid clock; lane l of a filter reads positions l .. l+T-1. The delay
// lines and the symbol register are the only pipeline registers, so a sample
// reaches the symbol register five valid clocks after it enters (plus the
// filters' own delays).
//
// Because every line shifts by the same P, a sample at position i of one line
// was produced from positions i+P .. i+P+T-1 of the line before it. The lines
// are kept deep enough (h3: M+T+P-1, h2: M+2T+2P-2, h1: M+3T+3P-3) to hold
// every sample that contributed to the newest symbol, and together with the
// Kerr phases of sections 2 and 3 they are copied into snapshot registers on
// every valid clock; this is the capture point of backward propagation (the
// newest symbol, sym[0], is the one that can be trained). The order
// Kerr-then-FIR within a section, the lane count default and the symbol lanes
// are this design's choices; the unrolling over parallel lanes follows the
// original design. P must be even.
module fp_path
  import ml_eq_pkg::*;
#(
  parameter int T      = 7,
  parameter int M      = 9,
  parameter int P      = 2,
  parameter int KERR_G = 410
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  dp_t    din    [P],
  input  coef_t  w1     [2][2][T],
  input  coef_t  w2     [2][2][T],
  input  coef_t  w3     [2][2][T],
  input  coef_t  h      [2][M],
  output logic   sym_valid,
  output dsym_t  sym    [P/2],
  // snapshots taken with each valid clock, newest sample at index 0
  output dp_t    snap_m [M+P-2],
  output dp_t    snap_3 [M+T+P-1],
  output phase_t sph_3  [M+T+P-1],
  output dp_t    snap_2 [M+2*T+2*P-2],
  output phase_t sph_2  [M+2*T+2*P-2],
  output dp_t    snap_1 [M+3*T+3*P-3]
);

  localparam int DM = M + P - 2;
  localparam int D3 = M + T + P - 1;
  localparam int D2 = M + 2 * T + 2 * P - 2;
  localparam int D1 = M + 3 * T + 3 * P - 3;

  dp_t    h1 [D1];
  dp_t    h2 [D2];
  phase_t p2 [D2];
  dp_t    h3 [D3];
  phase_t p3 [D3];
  dp_t    hm [DM];

  dp_t    k1_out [P], k2_out [P], k3_out [P];
  phase_t k2_ph  [P], k3_ph  [P];
  dp_t    f1_out [P], f2_out [P], f3_out [P];
  dsym_t  mf_out [P/2];

  for (genvar l = 0; l < P; l++) begin : g_lane
    // The phase of Kerr1 is not kept: nothing before it is trained.
    kerr_fp #(.KERR_G(KERR_G)) u_k1 (.din(din[l]),    .dout(k1_out[l]), .phase());
    mimo_fir #(.T(T))          u_f1 (.x(h1[l:l+T-1]), .w(w1), .y(f1_out[l]));
    kerr_fp #(.KERR_G(KERR_G)) u_k2 (.din(f1_out[l]), .dout(k2_out[l]), .phase(k2_ph[l]));
    mimo_fir #(.T(T))          u_f2 (.x(h2[l:l+T-1]), .w(w2), .y(f2_out[l]));
    kerr_fp #(.KERR_G(KERR_G)) u_k3 (.din(f2_out[l]), .dout(k3_out[l]), .phase(k3_ph[l]));
    mimo_fir #(.T(T))          u_f3 (.x(h3[l:l+T-1]), .w(w3), .y(f3_out[l]));
  end

  for (genvar k = 0; k < P / 2; k++) begin : g_sym
    matched_filter #(.M(M)) u_mf (.x(hm[2*k:2*k+M-1]), .h(h), .y(mf_out[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < D1; i++) h1[i] <= '0;
      for (int i = 0; i < D2; i++) begin h2[i] <= '0; p2[i] <= '0; end
      for (int i = 0; i < D3; i++) begin h3[i] <= '0; p3[i] <= '0; end
      for (int i = 0; i < DM; i++) hm[i] <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < P; i++) begin
        h1[i] <= k1_out[i];
        h2[i] <= k2_out[i];
        p2[i] <= k2_ph[i];
        h3[i] <= k3_out[i];
        p3[i] <= k3_ph[i];
        hm[i] <= f3_out[i];
      end
      for (int i = P; i < D1; i++) h1[i] <= h1[i-P];
      for (int i = P; i < D2; i++) begin h2[i] <= h2[i-P]; p2[i] <= p2[i-P]; end
      for (int i = P; i < D3; i++) begin h3[i] <= h3[i-P]; p3[i] <= p3[i-P]; end
      for (int i = P; i < DM; i++) hm[i] <= hm[i-P];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_valid <= 1'b0;
      for (int k = 0; k < P / 2; k++) sym[k] <= '0;
      for (int i = 0; i < DM; i++) snap_m[i] <= '0;
      for (int i = 0; i < D3; i++) begin snap_3[i] <= '0; sph_3[i] <= '0; end
      for (int i = 0; i < D2; i++) begin snap_2[i] <= '0; sph_2[i] <= '0; end
      for (int i = 0; i < D1; i++) snap_1[i] <= '0;
    end else begin
      sym_valid <= in_valid;
      if (in_valid) begin
        sym    <= mf_out;
        snap_m <= hm;
        snap_3 <= h3;
        sph_3  <= p3;
        snap_2 <= h2;
        sph_2  <= p2;
        snap_1 <= h1;
      end
    end
  end

endmodule

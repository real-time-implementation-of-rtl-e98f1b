// ml_equalizer: model-based machine-learning equalizer with on-chip training.
//
// Top level. The forward path (fp_path) equalizes a dual-polarization signal
// at two samples per symbol with three Kerr/linear split-step sections and a
// matched filter, over P parallel lanes: P samples in and P/2 symbols out per
// clock. The loss (eq_loss, one per symbol lane) compares each symbol with a
// reference: the pilot supplied on pilot (dd_sel = 0) or the symbol's own
// hard decision (dd_sel = 1, decision-directed mode). The backward path
// (bp_path) turns the error of the newest symbol lane into weight gradients
// for the matched filter and the three linear steps and updates them after
// every mini-batch, closing the adaptive loop.
//
// Interface: in_valid/din carry P samples per clock, din[0] the newest.
// sym_valid marks P/2 output symbols on sym (SF fraction bits, sym[0] the
// newest) with their decisions dec and errors err (DF fraction bits). The
// newest symbol is used for training when train_en is high and either dd_sel
// is high or pilot_valid marks pilot[0] as a pilot for it. The caller aligns
// the pilots with sym_valid; the symbol registers are five pipeline stages
// behind the input (plus the filters' own group delay). upd pulses when a
// layer's weights change ({FIR1, FIR2, FIR3, MF}). The error of the newest
// symbol reaches the weights of the MF, FIR3, FIR2 and FIR1 one to four
// clocks later, and only at the end of a mini-batch.
module ml_equalizer
  import ml_eq_pkg::*;
#(
  parameter int T           = 7,     // taps per MIMO-FIR
  parameter int M           = 9,     // matched-filter taps
  parameter int P           = 2,     // parallel sample lanes (even)
  parameter int B           = 16,    // mini-batch size in symbols
  parameter int MU_SHIFT    = 6,     // step size 2^-MU_SHIFT
  parameter int KERR_G      = 410,   // Kerr coefficient per section, Q.12
  parameter int A           = 2048,  // QPSK level, Q.DF
  parameter bit KERR_BP_LUT = 1'b0   // 0: Taylor Kerr BP, 1: LUT Kerr BP
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  dp_t        din   [P],
  input  dp_t        pilot [P/2],
  input  logic       pilot_valid,
  input  logic       dd_sel,
  input  logic       train_en,
  output logic       sym_valid,
  output dsym_t      sym   [P/2],
  output dp_t        dec   [P/2],
  output dp_t        err   [P/2],
  output logic       train,
  output logic [3:0] upd
);

  coef_t  w1 [2][2][T];
  coef_t  w2 [2][2][T];
  coef_t  w3 [2][2][T];
  coef_t  h  [2][M];
  dp_t    snap_m [M+P-2];
  dp_t    snap_3 [M+T+P-1];
  phase_t sph_3  [M+T+P-1];
  dp_t    snap_2 [M+2*T+2*P-2];
  phase_t sph_2  [M+2*T+2*P-2];
  dp_t    snap_1 [M+3*T+3*P-3];

  fp_path #(.T(T), .M(M), .P(P), .KERR_G(KERR_G)) u_fp (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din),
    .w1(w1), .w2(w2), .w3(w3), .h(h),
    .sym_valid(sym_valid), .sym(sym),
    .snap_m(snap_m), .snap_3(snap_3), .sph_3(sph_3),
    .snap_2(snap_2), .sph_2(sph_2), .snap_1(snap_1));

  for (genvar k = 0; k < P / 2; k++) begin : g_loss
    eq_loss #(.A(A)) u_loss (
      .sym(sym[k]), .pilot(pilot[k]), .dd_sel(dd_sel), .dec(dec[k]), .diff(err[k]));
  end

  assign train = sym_valid & train_en & (dd_sel | pilot_valid);

  bp_path #(.T(T), .M(M), .P(P), .B(B), .MU_SHIFT(MU_SHIFT), .KERR_BP_LUT(KERR_BP_LUT)) u_bp (
    .clk(clk), .rst_n(rst_n), .train(train), .e(err[0]),
    .snap_m(snap_m), .snap_3(snap_3), .sph_3(sph_3),
    .snap_2(snap_2), .sph_2(sph_2), .snap_1(snap_1),
    .w1(w1), .w2(w2), .w3(w3), .h(h), .upd(upd));

endmodule

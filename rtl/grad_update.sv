// grad_update: mini-batch gradient accumulation and weight update for one
// trainable layer of N real coefficients.
//
// Each cycle with g_valid high adds the gradient contribution g[] of one
// trained symbol to the accumulators. When the B-th contribution of a batch
// arrives, the weights are updated, w <= w - round(acc * 2^-(2*DF-CF+MU_SHIFT)),
// and the accumulators restart; upd pulses for one cycle after each update.
// The shift gives the step size mu = 2^-MU_SHIFT; it is rounded to even and
// the result saturated, as everywhere in the backward path. The weights
// restart from w_init on reset. Batch processing as such follows the
// original design; the batch size, step size and the plain gradient-descent
// rule are this design's choices. Latency: weights change on the clock edge
// that accepts the last contribution of a batch.
module grad_update
  import ml_eq_pkg::*;
#(
  parameter int N        = 28,
  parameter int B        = 16,
  parameter int MU_SHIFT = 6,
  parameter int AW       = 52
) (
  input  logic  clk,
  input  logic  rst_n,
  input  coef_t w_init [N],
  input  logic  g_valid,
  input  grad_t g      [N],
  output coef_t w      [N],
  output logic  upd
);

  localparam int SH = 2 * DF - CF + MU_SHIFT;
  localparam int BCW = $clog2(B + 1);

  logic signed [AW-1:0] acc [N];
  logic [BCW-1:0]       cnt;
  logic                 last;
  coef_t                w_next [N];

  assign last = g_valid && (cnt == BCW'(B - 1));

  // weights after applying the batch that ends with the current contribution
  always_comb begin
    for (int n = 0; n < N; n++)
      w_next[n] = sat_coef(longint'(w[n]) - rne_shift(longint'(acc[n]) + longint'(g[n]), SH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) begin
        acc[n] <= '0;
        w[n]   <= w_init[n];
      end
      cnt <= '0;
      upd <= 1'b0;
    end else begin
      upd <= last;
      if (g_valid) begin
        if (last) begin
          cnt <= '0;
          for (int n = 0; n < N; n++) begin
            w[n]   <= w_next[n];
            acc[n] <= '0;
          end
        end else begin
          cnt <= cnt + 1'b1;
          for (int n = 0; n < N; n++) acc[n] <= acc[n] + AW'(g[n]);
        end
      end
    end
  end

endmodule

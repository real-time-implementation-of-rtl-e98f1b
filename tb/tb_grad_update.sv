// tb_grad_update: checks mini-batch accumulation and the weight update of a
// small layer (N = 4, B = 4, MU_SHIFT = 2) against a cycle-by-cycle reference:
// weights change only on the B-th contribution of a batch, by the rounded
// (ties to even) accumulated gradient, saturated; upd follows one cycle later.
module tb_grad_update;
  import ml_eq_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 4, B = 4, MU = 2;
  localparam int SH = 2 * 12 - 15 + MU;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  coef_t w_init [N];
  logic  g_valid;
  grad_t g [N];
  coef_t w [N];
  logic  upd;
  int checks = 0, failures = 0, updates = 0, sats = 0;

  longint racc [N];
  longint rw [N];
  int     rcnt;
  logic   rupd;

  grad_update #(.N(N), .B(B), .MU_SHIFT(MU)) dut (
    .clk(clk), .rst_n(rst_n), .w_init(w_init), .g_valid(g_valid), .g(g), .w(w), .upd(upd));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) w_init[n] = coef_t'(rnd(-20000, 20000));
    rst_n = 1'b0;
    g_valid = 1'b0;
    for (int n = 0; n < N; n++) g[n] = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin racc[n] = 0; rw[n] = w_init[n]; end
    rcnt = 0;
    rupd = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // compare state
      for (int n = 0; n < N; n++) begin
        checks++;
        if (longint'(w[n]) !== rw[n]) failures++;
      end
      checks++;
      if (upd !== rupd) failures++;
      // next stimulus
      g_valid = ($urandom_range(0, 2) !== 0);
      for (int n = 0; n < N; n++) begin
        g[n] = grad_t'(rnd(-40000000, 40000000));
        if (c % 200 < 20) g[n] = grad_t'(-2000000000);   // drive towards saturation
        if (c % 7 == 0) g[n] = grad_t'(longint'(1) << (SH - 1)) * ((n % 2 == 0) ? 3 : 1);
      end
      @(posedge clk);
      rupd = 1'b0;
      if (g_valid) begin
        if (rcnt == B - 1) begin
          for (int n = 0; n < N; n++) begin
            longint nw;
            nw = rw[n] - ref_rne(racc[n] + g[n], SH);
            if (nw > 131071 || nw < -131072) sats++;
            rw[n] = ref_sat(nw, 18);
            racc[n] = 0;
          end
          rcnt = 0;
          rupd = 1'b1;
          updates++;
        end else begin
          for (int n = 0; n < N; n++) racc[n] += g[n];
          rcnt++;
        end
      end
    end
    checks += 2;
    if (updates == 0) failures++;
    if (sats == 0) failures++;
    $display("updates %0d, saturating updates %0d", updates, sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

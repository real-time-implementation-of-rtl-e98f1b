// trig_lut: cosine/sine look-up table for the Kerr compensator and its
// backward-propagation step.
//
// The phase code ph is an unsigned angle with LSB 2^-PHW rad, so the table
// covers 0 to just under 1 rad, which is ample for the per-section non-linear
// phase of a Kerr step. The table is filled at elaboration from
// ml_eq_pkg::trig_entry(), i.e. cos(k*2^-PHW) and sin(k*2^-PHW) rounded to LF
// fraction bits. Purely combinational: cos_o and sin_o follow ph with no
// latency. Table size and phase resolution are this design's choice.
module trig_lut
  import ml_eq_pkg::*;
(
  input  phase_t ph,
  output trig_t  cos_o,
  output trig_t  sin_o
);

  localparam int N = 2 ** PHW;

  trig_t cos_tab [N];
  trig_t sin_tab [N];

  for (genvar k = 0; k < N; k++) begin : g_tab
    localparam trig_t C = trig_entry(k, 1'b0);
    localparam trig_t S = trig_entry(k, 1'b1);
    assign cos_tab[k] = C;
    assign sin_tab[k] = S;
  end

  assign cos_o = cos_tab[ph];
  assign sin_o = sin_tab[ph];

endmodule

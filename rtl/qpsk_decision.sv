// qpsk_decision: hard decision of a dual-polarization QPSK symbol.
//
// Each of the four real components is sliced at zero and replaced by the
// ideal constellation level +A or -A (DF fraction bits), giving the decided
// symbol that the loss stage uses as reference in decision-directed mode.
// A zero component decides to +A. Combinational. The level A (0.5 by
// default) is this design's choice of normalisation.
module qpsk_decision
  import ml_eq_pkg::*;
#(
  parameter int A = 2048
) (
  input  dsym_t sym,
  output dp_t   dec
);

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      dec[p].re = sym[p].re[SW-1] ? samp_t'(-A) : samp_t'(A);
      dec[p].im = sym[p].im[SW-1] ? samp_t'(-A) : samp_t'(A);
    end
  end

endmodule

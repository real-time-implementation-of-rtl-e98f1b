// eq_loss: loss stage of the equalizer with pilot and decision-directed mode.
//
// The reference symbol is chosen by dd_sel: input 0 of the multiplexer is the
// known pilot, input 1 the hard decision of the equalized symbol itself. The
// difference is symbol minus reference, i.e. the error whose gradient starts
// the backward path. The symbol carries SF fraction bits and the error is
// reduced to DF bits with the unbiased round-half-to-even rule and saturated
// to DW bits; a round-half-up here would bias every error slightly positive.
// The multiplexer, the decision block and the subtraction follow the loss
// block structure of the design; the widths are this design's choice.
// Combinational: diff is valid in the same cycle as sym.
module eq_loss
  import ml_eq_pkg::*;
#(
  parameter int A = 2048
) (
  input  dsym_t sym,
  input  dp_t   pilot,
  input  logic  dd_sel,
  output dp_t   dec,
  output dp_t   diff
);

  dp_t ref_sym;

  qpsk_decision #(.A(A)) u_dec (.sym(sym), .dec(dec));

  assign ref_sym = dd_sel ? dec : pilot;

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      longint dre;
      longint dim;
      dre = longint'(sym[p].re) - (longint'(ref_sym[p].re) <<< (SF - DF));
      dim = longint'(sym[p].im) - (longint'(ref_sym[p].im) <<< (SF - DF));
      diff[p].re = sat_samp(rne_shift(dre, SF - DF));
      diff[p].im = sat_samp(rne_shift(dim, SF - DF));
    end
  end

endmodule
